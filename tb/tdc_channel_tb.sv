// tdc_channel_tb: end-to-end check of one TDC channel.
//
// The bench drives the counter word itself and keeps a reference model of
// the channel: events alternate between the odd and the even memory, a half
// loses its stored word when the line is taken away from it, and a
// transfer sends the word its memory held at the first sync clock, MSB
// first. Events are fired between transfers and also in the middle of
// transfers, both into the idle half (the double-buffer case the split was
// made for) and into the half that is talking (whose word is then lost at
// the next switch: pile-up). Each transfer must take exactly 8 sync clocks.
// The bench counts how often each of these cases happened and fails if one
// never did.
`timescale 1ps / 1fs

module tdc_channel_tb;
  int checks = 0, failures = 0;
  logic       rst_n = 1'b1, ev = 1'b0, ck = 1'b0, rn = 1'b0;
  logic [7:0] count = '0;
  logic       vec;

  tdc_channel #(.WIDTH(8)) dut (.rst_n(rst_n), .count(count), .event_i(ev),
                               .ck_sync(ck), .rn_piso(rn), .vector_o(vec));

  always #500 ck = ~ck;

  // Reference model.
  logic [7:0] ref_mem [2];  // [0] even half, [1] odd half
  logic       next_half;    // half that the next event goes to (1 = odd)
  logic       talking;      // half that owns the line (rn)
  // Mechanism counters.
  int n_ev_odd = 0, n_ev_even = 0, n_tx_odd = 0, n_tx_even = 0;
  int n_store_while_other_sends = 0, n_lost = 0, n_cleared_nonzero = 0;

  task automatic fire_event(logic [7:0] value, bit mid_transfer);
    count = value;
    #20 ev = 1'b1;
    ref_mem[next_half] = value;
    if (next_half) n_ev_odd++; else n_ev_even++;
    if (mid_transfer && next_half != talking) n_store_while_other_sends++;
    if (mid_transfer && next_half == talking) n_lost++;
    next_half = ~next_half;
    #60 ev = 1'b0;
    #20 count = 8'($urandom);
  endtask

  // Hands the line to the other half and reads the word it sends.
  task automatic transfer(bit with_event);
    logic [7:0] exp_w, got;
    int         t_start;
    @(negedge ck);
    rn = ~rn;
    // The half that lost the line is cleared.
    if (ref_mem[talking] != 0) n_cleared_nonzero++;
    ref_mem[talking] = '0;
    talking = rn;
    exp_w = ref_mem[talking];
    if (talking) n_tx_odd++; else n_tx_even++;
    t_start = int'($time / 1000);
    for (int i = 7; i >= 0; i--) begin
      @(negedge ck);
      got[i] = vec;
      if (with_event && i == 5) fire_event(8'($urandom), 1'b1);
    end
    checks++;
    if (got !== exp_w) begin
      failures++;
      $display("FAIL transfer from %s half: got %h expected %h", talking ? "odd" : "even", got, exp_w);
    end
    checks++;
    if (int'($time / 1000) - t_start != 8) begin
      failures++;
      $display("FAIL transfer took %0d sync clocks", int'($time / 1000) - t_start);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Pulse rn_piso so that both serializers see a reset edge, and let the
    // sync clock define the control flip-flops before the global reset
    // edge arrives.
    #1 rn = 1'b1;
    #1 rn = 1'b0;
    repeat (3) @(posedge ck);
    #1 rst_n = 1'b0;
    ref_mem[0] = '0; ref_mem[1] = '0;
    next_half = 1'b1;
    talking   = 1'b0;
    #100 rst_n = 1'b1;
    // Let the idle even half finish its start-up transfer of a zero word.
    repeat (10) @(negedge ck);
    for (int r = 0; r < 200; r++) begin
      int n;
      n = $urandom_range(0, 2);
      for (int e = 0; e < n; e++) fire_event(8'($urandom), 1'b0);
      transfer($urandom_range(0, 3) == 0);
      repeat ($urandom_range(0, 3)) @(negedge ck);
    end
    if (n_ev_odd == 0)  begin failures++; $display("FAIL no odd event"); end
    if (n_ev_even == 0) begin failures++; $display("FAIL no even event"); end
    if (n_tx_odd == 0)  begin failures++; $display("FAIL no odd transfer"); end
    if (n_tx_even == 0) begin failures++; $display("FAIL no even transfer"); end
    if (n_store_while_other_sends == 0) begin failures++; $display("FAIL no store during transfer"); end
    if (n_lost == 0)    begin failures++; $display("FAIL no pile-up loss"); end
    if (n_cleared_nonzero == 0) begin failures++; $display("FAIL no memory clear"); end
    checks += 7;
    $display("events odd/even %0d/%0d, transfers odd/even %0d/%0d, stored while other half sent %0d, lost to pile-up %0d, cleared words %0d",
             n_ev_odd, n_ev_even, n_tx_odd, n_tx_even, n_store_while_other_sends, n_lost, n_cleared_nonzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
