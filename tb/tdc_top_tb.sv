// tdc_top_tb: end-to-end test of the complete 8-channel TDC at its default
// size (8 channels, 8-bit words, 7-stage oscillator).
//
// The oscillator runs at about 2 GHz (control voltage 1938 mV). The bench
// counts the oscillator's edges itself since reset release; an event placed
// 60 ps after an edge must be stamped with that edge count modulo 256 (one
// code per half period). Events are fired on random channels, both between
// and during serial transfers; transfers read all eight serial lines in
// parallel, 8 sync clocks (1 GHz) per word, and each word is compared with a
// reference model of the odd/even memories. Half way through, the control
// voltage is raised (oscillator retune) and the measured frequency is
// checked against the tuning law. Mechanisms counted, each must occur:
// odd and even stores on every channel, transfers from both halves, a word
// stored while the other half sends, a word lost to pile-up, a memory clear,
// counter wrap-around and the retune.
`timescale 1ps / 1fs

module tdc_top_tb;
  localparam int NC = tdc_pkg::N_CH;
  int checks = 0, failures = 0;

  int unsigned     vcont_mv = 1938;
  logic            rst_n = 1'b1, ck = 1'b0, rn = 1'b0;
  logic [NC-1:0]   ev = '0;
  logic            ck_vco;
  logic [NC-1:0]   vec;

  tdc_top dut (.vcont_mv(vcont_mv), .rst_n(rst_n), .event_i(ev), .ck_sync(ck),
               .rn_piso(rn), .ck_vco(ck_vco), .vector_o(vec));

  always #500 ck = ~ck;

  // Independent time reference: oscillator edges since reset release.
  longint unsigned edges = 0;
  bit              counting = 1'b0;
  always @(ck_vco) if (counting) edges++;

  // Reference model of every channel.
  logic [7:0] ref_mem [NC][2];
  logic       next_half [NC];
  logic       talking = 1'b0;
  bit         in_transfer = 1'b0;
  int n_store [NC][2];
  int n_tx_odd = 0, n_tx_even = 0, n_other = 0, n_lost = 0, n_clear = 0, n_wrap = 0, n_retune = 0;

  task automatic fire_event(int c);
    @(ck_vco);
    #60 ev[c] = 1'b1;
    ref_mem[c][next_half[c]] = 8'(edges);
    n_store[c][next_half[c]]++;
    if (edges >= 256) n_wrap++;
    if (in_transfer && next_half[c] != talking) n_other++;
    if (in_transfer && next_half[c] == talking) n_lost++;
    next_half[c] = ~next_half[c];
    #100 ev[c] = 1'b0;
  endtask

  task automatic transfer(bit with_event);
    logic [7:0] got [NC];
    logic [7:0] exp_w [NC];
    @(negedge ck);
    rn = ~rn;
    for (int c = 0; c < NC; c++) begin
      if (ref_mem[c][talking] != 0) n_clear++;
      ref_mem[c][talking] = '0;
    end
    talking = rn;
    for (int c = 0; c < NC; c++) exp_w[c] = ref_mem[c][talking];
    if (talking) n_tx_odd++; else n_tx_even++;
    in_transfer = 1'b1;
    fork
      for (int i = 7; i >= 0; i--) begin
        @(negedge ck);
        for (int c = 0; c < NC; c++) got[c][i] = vec[c];
      end
      if (with_event) begin
        @(negedge ck); @(negedge ck);  // after the load clock
        fire_event($urandom_range(0, NC - 1));
      end
    join
    in_transfer = 1'b0;
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (got[c] !== exp_w[c]) begin
        failures++;
        $display("FAIL t=%0t ch%0d %s half: got %h expected %h", $time, c, talking ? "odd" : "even", got[c], exp_w[c]);
      end
    end
  endtask

  task automatic check_freq(int unsigned v);
    realtime t0, t1;
    real exp_p, p;
    repeat (2) @(posedge ck_vco);
    t0 = $realtime;
    repeat (20) @(posedge ck_vco);
    t1 = $realtime;
    p = (t1 - t0) / 20.0;
    exp_p = 1.0e6 / (600.0 + 2600.0 * (real'(v) - 700.0) / 2300.0);
    checks++;
    if (p > exp_p * 1.002 || p < exp_p * 0.998) begin
      failures++;
      $display("FAIL oscillator period %f ps, expected %f ps", p, exp_p);
    end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NC; c++) begin
      ref_mem[c][0] = '0; ref_mem[c][1] = '0; next_half[c] = 1'b1;
      n_store[c][0] = 0; n_store[c][1] = 0;
    end
    // Pulse rn_piso so that both serializers see a reset edge, and let the
    // sync clock define the control flip-flops before the global reset
    // edge arrives.
    #1 rn = 1'b1;
    #1 rn = 1'b0;
    repeat (3) @(posedge ck);
    #1 rst_n = 1'b0;
    check_freq(vcont_mv);
    @(negedge ck_vco);
    #10 rst_n = 1'b1;
    counting = 1'b1;
    repeat (10) @(negedge ck);
    for (int r = 0; r < 300; r++) begin
      if (r == 150) begin
        vcont_mv = 2600;
        n_retune++;
        check_freq(vcont_mv);
      end
      repeat ($urandom_range(0, 4)) fire_event($urandom_range(0, NC - 1));
      transfer($urandom_range(0, 3) == 0);
      repeat ($urandom_range(0, 40)) @(negedge ck);
    end
    for (int c = 0; c < NC; c++)
      for (int h = 0; h < 2; h++) begin
        checks++;
        if (n_store[c][h] == 0) begin failures++; $display("FAIL ch%0d half %0d never stored", c, h); end
      end
    checks += 7;
    if (n_tx_odd == 0 || n_tx_even == 0) begin failures++; $display("FAIL a half never sent"); end
    if (n_other == 0)  begin failures++; $display("FAIL no store during other half's transfer"); end
    if (n_lost == 0)   begin failures++; $display("FAIL no pile-up loss"); end
    if (n_clear == 0)  begin failures++; $display("FAIL no memory clear"); end
    if (n_wrap == 0)   begin failures++; $display("FAIL counter never wrapped"); end
    if (n_retune == 0) begin failures++; $display("FAIL no retune"); end
    $display("transfers odd/even %0d/%0d, stored while other half sent %0d, lost to pile-up %0d, cleared %0d, wrapped stamps %0d, oscillator edges %0d",
             n_tx_odd, n_tx_even, n_other, n_lost, n_clear, n_wrap, edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
