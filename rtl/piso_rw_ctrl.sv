// piso_rw_ctrl: write/read control for the channel's two serializers.
//
// The acquisition side drives two signals: ck_sync, the serial clock, and
// rn_piso, a level that says which serializer may talk. While rn_piso = 1 the
// "odd" serializer is out of reset and the "even" one is held in reset;
// while rn_piso = 0 it is the other way round. Each serializer's mode is
//   mode = active_level AND (active_level registered on ck_sync),
// so on the first ck_sync edge after the active level arrives the mode is
// still 0 (parallel write) and from the second edge on it is 1 (shift).
// A toggle of rn_piso thus starts one complete transfer: one load clock and
// WIDTH-1 shift clocks put all bits of the new word on the line.
//
// Interface: ck_sync, rn_piso from the acquisition side; rst_n clears the two
// flip-flops; mode_odd / mode_even (WriteN_shift / Write_shiftN) go to the two
// serializers. Timing: the mode change follows rn_piso at once when it drops
// (combinational AND) and one ck_sync edge later when it rises.
// The flip-flop-plus-AND arrangement and the buffer/inverter split of
// rn_piso between the two halves are the schematic's; the reset is this
// design's.
`timescale 1ps / 1fs

module piso_rw_ctrl (
  input  logic                ck_sync,
  input  logic                rst_n,
  input  logic                rn_piso,
  output tdc_pkg::piso_mode_e mode_odd,
  output tdc_pkg::piso_mode_e mode_even
);
  logic act_odd, act_even;
  logic dly_odd, dly_even;

  assign act_odd  = rn_piso;
  assign act_even = ~rn_piso;

  always_ff @(posedge ck_sync or negedge rst_n) begin
    if (!rst_n) begin
      dly_odd  <= 1'b0;
      dly_even <= 1'b0;
    end else begin
      dly_odd  <= act_odd;
      dly_even <= act_even;
    end
  end

  assign mode_odd  = tdc_pkg::piso_mode_e'(act_odd  & dly_odd);
  assign mode_even = tdc_pkg::piso_mode_e'(act_even & dly_even);
endmodule
