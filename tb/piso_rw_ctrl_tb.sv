// piso_rw_ctrl_tb: checks the write/read control of the two serializers.
//
// rn_piso is toggled after random numbers of sync clocks. The rule checked:
// a half's mode is WRITE while the half is idle (odd half idle when rn_piso
// is 0, even half idle when it is 1) and during the first sync clock of its
// turn; from the second sync clock of its turn on it is SHIFT. The bench
// counts sync edges since each toggle, independently of the block.
`timescale 1ps / 1fs

module piso_rw_ctrl_tb;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic       ck = 1'b0, rst_n = 1'b1, rn = 1'b0;
  piso_mode_e m_odd, m_even;
  int         edges_since_toggle;

  piso_rw_ctrl dut (.ck_sync(ck), .rst_n(rst_n), .rn_piso(rn),
                    .mode_odd(m_odd), .mode_even(m_even));

  always #500 ck = ~ck;

  always @(posedge ck) edges_since_toggle <= edges_since_toggle + 1;

  task automatic check_modes();
    piso_mode_e e_odd, e_even;
    e_odd  = (rn  && edges_since_toggle >= 1) ? PISO_SHIFT : PISO_WRITE;
    e_even = (!rn && edges_since_toggle >= 1) ? PISO_SHIFT : PISO_WRITE;
    checks++;
    if (m_odd !== e_odd || m_even !== e_even) begin
      failures++;
      $display("FAIL rn=%b edges=%0d: odd=%b even=%b", rn, edges_since_toggle, m_odd, m_even);
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
    edges_since_toggle = 0;
    #100;
    checks++;
    if (m_odd !== PISO_WRITE || m_even !== PISO_WRITE) begin failures++; $display("FAIL reset"); end
    @(negedge ck) begin rst_n = 1'b1; edges_since_toggle = 0; end
    for (int t = 0; t < 60; t++) begin
      int len;
      len = $urandom_range(1, 12);
      for (int c = 0; c < len; c++) begin
        @(negedge ck);
        check_modes();
      end
      rn = ~rn;
      edges_since_toggle = 0;
      #1 check_modes();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
