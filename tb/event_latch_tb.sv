// event_latch_tb: checks the event memory.
//
// Random words are presented; on each rising edge of stop the memory must
// hold the word present at that edge, and it must keep it while the input
// changes and on a falling stop edge. The asynchronous clear is checked too.
`timescale 1ps / 1fs

module event_latch_tb;
  int checks = 0, failures = 0;
  logic       stop = 1'b0, rst_n = 1'b1;
  logic [7:0] d, q, ref_q;

  event_latch #(.WIDTH(8)) dut (.stop(stop), .rst_n(rst_n), .d(d), .q(q));

  task automatic expect_q(logic [7:0] e, string what);
    checks++;
    if (q !== e) begin failures++; $display("FAIL %s: q=%h expected %h", what, q, e); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous reset acts
    d = 8'h5a;
    #10 expect_q(8'h00, "reset");
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      d = 8'($urandom);
      #10 stop = 1'b1;
      ref_q = d;
      #1 expect_q(ref_q, "capture");
      d = 8'($urandom);
      #10 stop = 1'b0;
      #1 expect_q(ref_q, "hold on falling edge");
      d = 8'($urandom);
      #10 expect_q(ref_q, "hold while input changes");
    end
    rst_n = 1'b0;
    #1 expect_q(8'h00, "clear");
    rst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
