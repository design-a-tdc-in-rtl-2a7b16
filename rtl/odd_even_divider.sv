// odd_even_divider: splits the event stream into odd and even events.
//
// A divide-by-two: one flip-flop clocked by the event, its inverted output fed
// back to its input, so sel toggles on every rising event edge. sel rises on
// the 1st, 3rd, 5th ... event after reset and sel_n on the 2nd, 4th ...;
// each of the two edges strobes one of the channel's two event memories.
// rst_n (active low, asynchronous) sets sel = 0, so the first event goes to
// the "odd" memory. The toggle structure follows the serializer schematic;
// the reset value is this design's choice.
`timescale 1ps / 1fs

module odd_even_divider (
  input  logic event_i,  // discriminator pulse (start/stop)
  input  logic rst_n,
  output logic sel,      // rises on odd events
  output logic sel_n     // rises on even events
);
  always_ff @(posedge event_i or negedge rst_n) begin
    if (!rst_n) sel <= 1'b0;
    else        sel <= ~sel;
  end
  assign sel_n = ~sel;
endmodule
