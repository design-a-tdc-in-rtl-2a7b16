// sync_counter: the TDC's free-running synchronous time counter.
//
// The oscillator clock ck_vco is itself the least significant bit, Q0, of the
// time word; Q1..Q[W-1] are flip-flops that all share ck_vco, so they switch
// together and their settling does not depend on a ripple through the chain.
// Each flip-flop toggles when every lower bit is 1 (a binary carry chain).
// The flip-flops advance on the falling edge of ck_vco, which is the moment Q0
// goes from 1 to 0; the word {Q[W-1:1], Q0} therefore counts in binary once
// every half period of the oscillator. At 2 GHz one code is 250 ps and the
// 8-bit word wraps every 64 ns.
//
// Interface: ck_vco in, rst_n asynchronous active-low clear of Q1..Q[W-1],
// q out (the time word, combinational from the flip-flops and ck_vco).
// Taking Q0 from the clock and using the synchronous structure follow the
// counter schematic; the falling-edge choice and the reset are this design's.
`timescale 1ps / 1fs

module sync_counter #(
  parameter int unsigned WIDTH = tdc_pkg::TIME_W
) (
  input  logic             ck_vco,
  input  logic             rst_n,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:1] cnt;

  always_ff @(negedge ck_vco or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign q = {cnt, ck_vco};

endmodule
