// mem_clear_pulse: short clear pulse for an event memory after its word
// has been sent.
//
// The serializer's mode signal falls when the acquisition side takes the
// line away from this half of the channel, i.e. after the last bit has gone
// out. The block forms
//   clear_n = mode OR NOT(mode delayed)
// which is 0 only between that falling edge and the moment the delayed copy
// catches up. The delay is one ck_sync register here (the pulse therefore
// lasts until the next rising ck_sync edge, at most one sync period); in the
// full-custom circuit it is an analog delay cell. rst_n clears the register,
// which keeps clear_n high. The OR-with-inverted-delay structure is the
// schematic's; using a ck_sync flip-flop as the delay is this design's choice.
`timescale 1ps / 1fs

module mem_clear_pulse (
  input  logic                ck_sync,
  input  logic                rst_n,
  input  tdc_pkg::piso_mode_e mode,     // WriteN_shift of one serializer
  output logic                clear_n   // active-low clear to the event memory
);
  logic mode_dly;

  always_ff @(posedge ck_sync or negedge rst_n) begin
    if (!rst_n) mode_dly <= 1'b0;
    else        mode_dly <= mode;
  end

  assign clear_n = mode | ~mode_dly;
endmodule
