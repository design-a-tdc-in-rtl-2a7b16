// vco_ring_tb: checks the ring-oscillator model.
//
// For several control voltages the bench measures the period of ck_vco
// between rising edges and compares it with the period expected from the
// linear tuning law, f = 600 MHz + 2600 MHz * (V - 0.7 V) / 2.3 V, worked out
// here independently. It also checks that the seven outputs keep the ring
// relation out[k] = ~out[k-1] for all stages but the one that switches next
// (exactly one "pending" stage), and that the ring stops below 0.7 V.
`timescale 1ps / 1fs

module vco_ring_tb;
  int checks = 0, failures = 0;
  int unsigned vcont_mv;
  logic [7:1] out;
  logic       ck_vco;

  vco_ring dut (.vcont_mv(vcont_mv), .out(out), .ck_vco(ck_vco));

  function automatic real expected_period_ps(int unsigned v);
    real f_mhz;
    f_mhz = 600.0 + 2600.0 * (real'(v) - 700.0) / 2300.0;
    return 1.0e6 / f_mhz;
  endfunction

  task automatic check_period(int unsigned v);
    realtime t0, t1;
    real exp_p;
    vcont_mv = v;
    repeat (3) @(posedge ck_vco);
    t0 = $realtime;
    repeat (10) @(posedge ck_vco);
    t1 = $realtime;
    exp_p = expected_period_ps(v);
    checks++;
    // Integer MHz rounding in the model: allow 0.2 % error.
    if ((t1 - t0) / 10.0 > exp_p * 1.002 || (t1 - t0) / 10.0 < exp_p * 0.998) begin
      failures++;
      $display("FAIL period at %0d mV: %f ps, expected %f ps", v, (t1 - t0) / 10.0, exp_p);
    end
  endtask

  // Ring consistency: count stages whose output equals their input.
  always @(out) begin
    int pending;
    #1;
    pending = 0;
    for (int k = 1; k <= 7; k++) begin
      if (k == 1) pending += (out[1] == out[7]) ? 1 : 0;
      else        pending += (out[k] == out[k-1]) ? 1 : 0;
    end
    checks++;
    if (pending != 1) begin
      failures++;
      $display("FAIL ring state %b has %0d pending stages", out, pending);
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vcont_mv = 2000;
    check_period(2000);
    check_period(700);
    check_period(3000);
    check_period(1500);
    // Below the range: no oscillation.
    begin
      int edges = 0;
      vcont_mv = 500;
      #5000;
      fork
        begin forever begin @(ck_vco); edges++; end end
        #20000;
      join_any
      disable fork;
      checks++;
      if (edges != 0) begin failures++; $display("FAIL ring oscillates at 500 mV"); end
    end
    check_period(2500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
