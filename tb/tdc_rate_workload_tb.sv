// tdc_rate_workload_tb: periodic-event workloads on single-channel cores.
//
// Two runs, each on its own tdc_core with one channel, the oscillator clock
// at 2 GHz and the serial clock at 2 GHz:
//   * the 4-bit prototype test: 7107 events at a fixed 70 MHz rate, every
//     word read out and histogrammed over its 16 codes;
//   * the 8-bit design at a 100 MHz event rate, 2000 events.
// After each event the bench, acting as the acquisition side, toggles
// rn_piso and reads the word. The word must equal floor(2 t / T) mod 2^W,
// where t is the event time since reset release and T the oscillator
// period, computed here from the bench's own clock. The next event must not
// be due before the word is in, which would mean the readout cannot keep up
// with the rate. Events that fall within 2 ps of an oscillator edge are
// counted but not compared, because the stamp there is legitimately either
// code. With periodic events the histogram is not flat; the bench prints it.
`timescale 1ps / 1fs

module tdc_rate_workload_tb;
  import tdc_pkg::*;
  int checks = 0, failures = 0;

  localparam longint unsigned T_VCO_FS  = 500_000;  // 2 GHz
  localparam longint unsigned T_SYNC_FS = 500_000;  // 2 GHz

  logic       ck_vco = 1'b0, ck = 1'b0, rst_n = 1'b1;
  logic [1:0] ev = '0, rn = '0, vec;
  logic [3:0] count4;
  logic [7:0] count8;

  always #(T_VCO_FS / 2 * 1fs) ck_vco = ~ck_vco;
  always #(T_SYNC_FS / 2 * 1fs) ck = ~ck;

  tdc_core #(.N_CH(1), .WIDTH(4)) u_core4 (
    .ck_vco(ck_vco), .rst_n(rst_n), .event_i(ev[0]), .ck_sync(ck),
    .rn_piso(rn[0]), .count(count4), .vector_o(vec[0]));

  tdc_core #(.N_CH(1), .WIDTH(8)) u_core8 (
    .ck_vco(ck_vco), .rst_n(rst_n), .event_i(ev[1]), .ck_sync(ck),
    .rn_piso(rn[1]), .count(count8), .vector_o(vec[1]));

  realtime t_release;
  int      hist4 [16];

  task automatic run(int idx, int width, int n_events, real period_ps, output int n_read);
    realtime t_next, t_ev;
    longint unsigned t_fs, ph;
    logic [7:0] exp_w, got;
    int ambiguous = 0;
    n_read = 0;
    t_next = $realtime + 3000.0 + 77.0;
    for (int k = 0; k < n_events; k++) begin
      if (t_next <= $realtime) begin
        failures++;
        $display("FAIL run %0d: readout of event %0d not done before the next event", idx, k);
        t_next = $realtime + 1.0;
      end
      #(t_next - $realtime);
      t_ev = $realtime;
      ev[idx] = 1'b1;
      t_fs = longint'((t_ev - t_release) * 1000.0);
      exp_w = expected_code(t_fs, T_VCO_FS) & 8'((1 << width) - 1);
      ph = t_fs % (T_VCO_FS / 2);
      #1000 ev[idx] = 1'b0;
      t_next = t_next + period_ps;
      @(negedge ck) rn[idx] = ~rn[idx];
      got = '0;
      for (int i = width - 1; i >= 0; i--) begin
        @(negedge ck);
        got[i] = vec[idx];
      end
      n_read++;
      if (width == 4) hist4[got[3:0]]++;
      if (ph < 2000 || ph > T_VCO_FS / 2 - 2000) begin
        ambiguous++;
      end else begin
        checks++;
        if (got !== exp_w) begin
          failures++;
          $display("FAIL run %0d event %0d: word %h expected %h", idx, k, got, exp_w);
        end
      end
    end
    $display("run %0d: %0d-bit words, %0d events at %.1f MHz, %0d read, %0d near an edge",
             idx, width, n_events, 1.0e6 / period_ps, n_read, ambiguous);
  endtask

  initial begin
    #50_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    foreach (hist4[i]) hist4[i] = 0;
    // Reset edges for both serializer halves, then the global reset.
    #1 rn = 2'b11;
    #1 rn = 2'b00;
    repeat (3) @(posedge ck);
    #1 rst_n = 1'b0;
    #3000;
    @(negedge ck_vco);
    #10 rst_n = 1'b1;
    t_release = $realtime - 10.0;   // ck_vco fell 10 ps ago: code 0 starts there
    repeat (4) @(negedge ck);

    run(0, 4, 7107, 1.0e6 / 70.0, n);
    checks++;
    if (n != 7107) begin failures++; $display("FAIL 4-bit run read %0d words", n); end
    $write("4-bit histogram (code:count):");
    foreach (hist4[i]) $write(" %0d:%0d", i, hist4[i]);
    $write("\n");

    run(1, 8, 2000, 1.0e6 / 100.0, n);
    checks++;
    if (n != 2000) begin failures++; $display("FAIL 8-bit run read %0d words", n); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
