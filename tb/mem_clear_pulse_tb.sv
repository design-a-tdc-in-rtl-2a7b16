// mem_clear_pulse_tb: checks the memory clear pulse.
//
// The mode input is driven with random levels that change between sync
// edges. clear_n must be 0 exactly from a falling edge of mode until the
// next rising sync edge, and 1 at all other times; rising mode edges and
// steady levels must never produce a pulse.
`timescale 1ps / 1fs

module mem_clear_pulse_tb;
  import tdc_pkg::*;
  int checks = 0, failures = 0, pulses = 0;
  logic       ck = 1'b0, rst_n = 1'b1;
  piso_mode_e mode = PISO_WRITE;
  logic       clear_n;
  logic       fell_since_edge = 1'b0;

  mem_clear_pulse dut (.ck_sync(ck), .rst_n(rst_n), .mode(mode), .clear_n(clear_n));

  always #500 ck = ~ck;

  task automatic check_now();
    checks++;
    if (clear_n !== ~fell_since_edge) begin
      failures++;
      $display("FAIL t=%0t mode=%b clear_n=%b expected %b", $time, mode, clear_n, ~fell_since_edge);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous reset acts
    #100 check_now();
    @(negedge ck) rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      piso_mode_e nm;
      // change somewhere in the low half of the clock
      #($urandom_range(10, 200));
      nm = piso_mode_e'($urandom_range(0, 1));
      if (mode == PISO_SHIFT && nm == PISO_WRITE) begin
        fell_since_edge = 1'b1;
        pulses++;
      end
      mode = nm;
      #1 check_now();
      @(posedge ck) #1 fell_since_edge = 1'b0;
      check_now();
      @(negedge ck) check_now();
    end
    checks++;
    if (pulses == 0) begin failures++; $display("FAIL no pulse exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
