// sync_counter_tb: checks the synchronous time counter.
//
// A 2 GHz clock is applied. The bench keeps its own count of clock
// half-periods since reset release and checks after every clock edge that
// the counter word equals that count modulo 256, i.e. that the LSB is the
// clock level and the word advances once per half period; it runs through
// two wrap-arounds and checks that reset clears the word.
`timescale 1ps / 1fs

module sync_counter_tb;
  int checks = 0, failures = 0;
  logic       ck = 1'b0;
  logic       rst_n = 1'b1;
  logic [7:0] q;
  int unsigned halves;

  sync_counter #(.WIDTH(8)) dut (.ck_vco(ck), .rst_n(rst_n), .q(q));

  always #250 ck = ~ck;

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous reset acts
    #100;
    @(posedge ck) #10;  // ck = 1
    checks++;
    if (q !== 8'd1) begin failures++; $display("FAIL reset value %0d", q); end
    @(negedge ck) #10 rst_n = 1'b1;  // released with ck low, word 0
    halves = 0;
    repeat (600) begin
      @(ck) #20;
      halves++;
      checks++;
      if (q !== 8'(halves)) begin
        failures++;
        $display("FAIL after %0d half periods: q=%0d", halves, q);
      end
    end
    // Wrap: 600 half periods = two wraps plus 88.
    checks++;
    if (q !== 8'(600 % 256)) begin failures++; $display("FAIL wrap"); end
    rst_n = 1'b0;
    #5;
    checks++;
    if (q[7:1] !== 7'd0) begin failures++; $display("FAIL reset clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
