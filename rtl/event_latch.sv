// event_latch: one "Memory/latch" block of the TDC.
//
// A bank of WIDTH D flip-flops that share one clock, the event strobe. On the
// rising edge of stop the flip-flops take a picture of the counter word d and
// hold it on q until the next strobe, so the stored word is the time of the
// event. rst_n (active low, asynchronous) clears the word; in a channel it is
// pulsed after the stored word has been sent out.
//
// The rising-edge capture and the flip-flop bank follow the document; the
// asynchronous clear on rst_n matches the RN pin of the memory symbol.
`timescale 1ps / 1fs

module event_latch #(
  parameter int unsigned WIDTH = tdc_pkg::TIME_W
) (
  input  logic             stop,   // event strobe, captures on rising edge
  input  logic             rst_n,  // asynchronous clear, active low
  input  logic [WIDTH-1:0] d,      // counter word
  output logic [WIDTH-1:0] q       // stored time word
);
  always_ff @(posedge stop or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
