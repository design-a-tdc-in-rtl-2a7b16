// tdc_core: the synthesizable part of the multi-channel TDC.
//
// One synchronous counter, clocked by the ring-oscillator clock ck_vco,
// distributes its time word to N_CH channels. Each channel stores the word
// at the rising edge of its event input and sends it, MSB first, on its own
// serial line vector_o[ch] when the acquisition side toggles rn_piso and
// clocks ck_sync; rn_piso and ck_sync are shared by all channels, so every
// channel sends in lockstep. The time word counts half periods of ck_vco:
// with 2 GHz one LSB is 250 ps and the 8-bit word covers 64 ns.
//
// The shared counter, the 8-bit word, the 8 channels and the shared
// write/shift and sync clock lines follow the block diagram; rst_n is this
// design's global reset.
`timescale 1ps / 1fs

module tdc_core #(
  parameter int unsigned N_CH  = tdc_pkg::N_CH,
  parameter int unsigned WIDTH = tdc_pkg::TIME_W
) (
  input  logic             ck_vco,
  input  logic             rst_n,
  input  logic [N_CH-1:0]  event_i,
  input  logic             ck_sync,
  input  logic             rn_piso,
  output logic [WIDTH-1:0] count,
  output logic [N_CH-1:0]  vector_o
);
  sync_counter #(.WIDTH(WIDTH)) u_cnt (
    .ck_vco (ck_vco),
    .rst_n  (rst_n),
    .q      (count)
  );

  for (genvar ch = 0; ch < N_CH; ch++) begin : g_ch
    tdc_channel #(.WIDTH(WIDTH)) u_ch (
      .rst_n    (rst_n),
      .count    (count),
      .event_i  (event_i[ch]),
      .ck_sync  (ck_sync),
      .rn_piso  (rn_piso),
      .vector_o (vector_o[ch])
    );
  end
endmodule
