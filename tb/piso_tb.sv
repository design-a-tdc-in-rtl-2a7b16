// piso_tb: checks the parallel-in serial-out register.
//
// One clock in write mode loads a random word, then shift clocks follow.
// After the load edge the output must be d[7], after the n-th shift edge
// d[7-n]; after the word the first stage keeps feeding d[0]. The parallel
// input is changed during shifting to make sure it is ignored then, and
// the asynchronous reset must force the output to 0.
`timescale 1ps / 1fs

module piso_tb;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic       ck = 1'b0, rst_n = 1'b1;
  piso_mode_e mode = PISO_WRITE;
  logic [7:0] d, word;
  logic       so;

  piso #(.WIDTH(8)) dut (.ck_out(ck), .rst_n(rst_n), .mode(mode), .d(d), .serial_out(so));

  always #500 ck = ~ck;

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
    checks++;
    if (so !== 1'b0) begin failures++; $display("FAIL reset output"); end
    @(negedge ck) rst_n = 1'b1;
    for (int w = 0; w < 50; w++) begin
      word = 8'($urandom);
      @(negedge ck) begin d = word; mode = PISO_WRITE; end
      @(negedge ck) mode = PISO_SHIFT;   // one load edge has passed
      checks++;
      if (so !== word[7]) begin failures++; $display("FAIL bit 7 of %h", word); end
      for (int n = 1; n < 8; n++) begin
        d = 8'($urandom);                 // must be ignored while shifting
        @(negedge ck);
        checks++;
        if (so !== word[7-n]) begin
          failures++;
          $display("FAIL bit %0d of %h: got %b", 7 - n, word, so);
        end
      end
      if (w % 10 == 9) begin
        rst_n = 1'b0;
        #1;
        checks++;
        if (so !== 1'b0) begin failures++; $display("FAIL reset clears"); end
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
