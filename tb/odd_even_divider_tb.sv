// odd_even_divider_tb: checks the odd/even event splitter.
//
// After reset sel = 0. For each event pulse the bench checks that sel rises
// on odd-numbered events and sel_n on even-numbered ones, and that sel_n is
// always the complement of sel.
`timescale 1ps / 1fs

module odd_even_divider_tb;
  int checks = 0, failures = 0;
  logic ev = 1'b0, rst_n = 1'b1;
  logic sel, sel_n;

  odd_even_divider dut (.event_i(ev), .rst_n(rst_n), .sel(sel), .sel_n(sel_n));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous reset acts
    #10;
    checks++;
    if (sel !== 1'b0 || sel_n !== 1'b1) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int n = 1; n <= 101; n++) begin
      #(10 + $urandom_range(0, 20)) ev = 1'b1;
      #2;
      checks++;
      if (sel !== logic'(n % 2) || sel_n !== ~sel) begin
        failures++;
        $display("FAIL event %0d: sel=%b sel_n=%b", n, sel, sel_n);
      end
      #(3 + $urandom_range(0, 10)) ev = 1'b0;
      #1;
      checks++;
      if (sel !== logic'(n % 2)) begin failures++; $display("FAIL falling edge moved sel"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
