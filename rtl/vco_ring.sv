// vco_ring: behavioural model of the voltage-controlled ring oscillator.
//
// This is a simulation model, not synthesizable logic: the real block is a
// ring of seven inverters whose supply (the control voltage) sets the stage
// delay and therefore the frequency. The model keeps the ring's structure:
// out[1]..out[7] are the seven inverter outputs, out[k] = not out[k-1] and
// out[1] = not out[7], and a single transition travels round the ring with one
// stage delay per inverter, so the period is 2 * STAGES * stage delay.
// ck_vco, the clock for the counter, is taken at the output of the first
// inverter, as in the channel block diagram.
//
// Frequency: the control voltage vcont_mv (millivolts) maps linearly onto the
// measured tuning range, F_MIN_MHZ at V_MIN_MV up to F_MAX_MHZ at V_MAX_MV
// (0.7 V -> 600 MHz, 3 V -> 3.2 GHz). The measured curve is not a straight
// line; the linear map is this model's simplification. Below V_MIN_MV the
// ring does not oscillate and the outputs hold. vcont_mv is read afresh
// every stage, so a change takes effect within one stage delay.
// The default operating point used by the TDC is 2 GHz.
// A synthesis tool that ignores the delays sees the ring as what it is, a
// combinational loop of inverters; that loop is the oscillator and stands.
`timescale 1ps / 1fs

module vco_ring #(
  parameter int unsigned STAGES    = 7,
  parameter int unsigned V_MIN_MV  = 700,
  parameter int unsigned V_MAX_MV  = 3000,
  parameter int unsigned F_MIN_MHZ = 600,
  parameter int unsigned F_MAX_MHZ = 3200
) (
  input  int unsigned       vcont_mv,  // control voltage (inverter supply), mV
  output logic [STAGES:1]   out,       // inverter outputs out1..out7
  output logic              ck_vco     // clock to the counter (= out1)
);

  // Frequency in MHz for a control voltage, linear inside the range.
  function automatic int unsigned freq_mhz(int unsigned v);
    int unsigned vc;
    vc = (v > V_MAX_MV) ? V_MAX_MV : v;
    return F_MIN_MHZ + ((F_MAX_MHZ - F_MIN_MHZ) * (vc - V_MIN_MV)) / (V_MAX_MV - V_MIN_MV);
  endfunction

  // Stage delay in ps: period / (2 * STAGES), period = 1e6 / f[MHz] ps.
  function automatic real stage_delay_ps(int unsigned v);
    return 1.0e6 / (real'(freq_mhz(v)) * 2.0 * real'(STAGES));
  endfunction

  int unsigned next_stage;  // inverter whose output switches next

  initial begin
    // A consistent ring state with one pending transition at stage 1:
    // out[k] = ~out[k-1] for k >= 2 and out[1] == out[STAGES].
    for (int k = 1; k <= STAGES; k++) out[k] = (k % 2 == 0);
    out[1]     = out[STAGES];
    next_stage = 1;
  end

  // One pass of this block moves the single wavefront by one inverter.
  always begin
    if (vcont_mv < V_MIN_MV) wait (vcont_mv >= V_MIN_MV);
    #(stage_delay_ps(vcont_mv));
    if (next_stage == 1) out[1] = ~out[STAGES];
    else                 out[next_stage] = ~out[next_stage-1];
    next_stage = (next_stage == STAGES) ? 1 : next_stage + 1;
  end

  assign ck_vco = out[1];

endmodule
