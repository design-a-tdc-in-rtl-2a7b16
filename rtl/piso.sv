// piso: parallel-in serial-out shift register (the channel serializer).
//
// A chain of WIDTH flip-flops on the sync clock ck_out. Flip-flop 0 always
// loads d[0]; every other flip-flop k has a two-way selector in front of it:
// with mode = PISO_WRITE (0) it loads d[k], with mode = PISO_SHIFT (1) it
// loads flip-flop k-1. The last flip-flop is the serial output. So one
// ck_out edge in write mode puts d[WIDTH-1] on serial_out, and each following
// edge in shift mode presents d[WIDTH-2], ..., d[0]: the word leaves MSB
// first, one bit per clock, WIDTH clocks per word. rst_n (active low,
// asynchronous) clears the chain so that serial_out is 0 while the
// serializer is idle; the serializer is reset briefly after each transfer.
//
// The structure (selector per stage, first stage wired to its data bit,
// output from the last stage, write = 0 / shift = 1) follows the 4-bit
// serializer schematic; the MSB-first numbering of the 8-bit version is this
// design's reading of it.
`timescale 1ps / 1fs

module piso #(
  parameter int unsigned WIDTH = tdc_pkg::TIME_W
) (
  input  logic               ck_out,      // sync clock from the acquisition side
  input  logic               rst_n,       // asynchronous clear, active low
  input  tdc_pkg::piso_mode_e mode,       // WriteN/Shift: 0 load, 1 shift
  input  logic [WIDTH-1:0]   d,           // parallel word
  output logic               serial_out
);
  logic [WIDTH-1:0] sr;

  always_ff @(posedge ck_out or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0;
    end else begin
      sr[0] <= d[0];
      for (int k = 1; k < WIDTH; k++)
        sr[k] <= (mode == tdc_pkg::PISO_SHIFT) ? sr[k-1] : d[k];
    end
  end

  assign serial_out = sr[WIDTH-1];
endmodule
