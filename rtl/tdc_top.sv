// tdc_top: the complete TDC, ring oscillator plus digital core.
//
// The 7-stage ring oscillator (a behavioural model, see vco_ring) produces
// ck_vco from its control voltage; tdc_core counts it and time-stamps the
// events of N_CH channels, which leave on one serial line per channel.
// The acquisition side drives ck_sync and rn_piso and samples vector_o on
// the falling edge of ck_sync (data change on the rising edge).
// Because the oscillator is a timing model, this top simulates but is not
// itself synthesizable; tdc_core is the synthesizable part.
`timescale 1ps / 1fs

module tdc_top #(
  parameter int unsigned N_CH  = tdc_pkg::N_CH,
  parameter int unsigned WIDTH = tdc_pkg::TIME_W
) (
  input  int unsigned      vcont_mv,   // oscillator control voltage, mV
  input  logic             rst_n,
  input  logic [N_CH-1:0]  event_i,
  input  logic             ck_sync,
  input  logic             rn_piso,
  output logic             ck_vco,     // oscillator clock, for monitoring
  output logic [N_CH-1:0]  vector_o
);
  logic [tdc_pkg::VCO_STAGES:1] ring;
  logic [WIDTH-1:0]             count;

  vco_ring #(.STAGES(tdc_pkg::VCO_STAGES)) u_vco (
    .vcont_mv (vcont_mv),
    .out      (ring),
    .ck_vco   (ck_vco)
  );

  tdc_core #(.N_CH(N_CH), .WIDTH(WIDTH)) u_core (
    .ck_vco   (ck_vco),
    .rst_n    (rst_n),
    .event_i  (event_i),
    .ck_sync  (ck_sync),
    .rn_piso  (rn_piso),
    .count    (count),
    .vector_o (vector_o)
  );
endmodule
