// Audio modulation chain: carrier generator, DSB/SSB modulator and harmonic
// FIR filter, producing the 12-bit HF samples for the DAC.
//
// Carrier: a 9-bit step counter clocked at 50 MHz addresses two copies of
// the 512 x 12-bit sine table, one at the counter value (sine) and one a
// quarter cycle ahead (cosine), so f_carrier = 50e6 * step / 512 Hz.
// Audio oscillator (SSB only): a second step counter that advances once per
// audio sample addresses two more tables, giving f0 = f_audio * lo_step/512.
// The modulator output passes through the 60-tap direct-form low-pass FIR,
// which runs at the full 50 MHz rate, before it leaves as dac_data.
//
// The counter/table carrier, its frequency formula, the modulator and the
// FIR ahead of the DAC follow the published design. The quarter-cycle
// cosine table, the audio oscillator for the Weaver method and the register
// timing are choices of this implementation.
//
// Timing: a change of step reaches dac_data after 1 (counter) + 1 (table)
// + 2 (modulator) + 1 (FIR) clocks, and then through the FIR delay line.
module audio_modulation
  import tx_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  phase_t    step,
  input  phase_t    lo_step,
  input  mod_mode_e mode,
  input  audio_t    audio,
  input  logic      audio_valid,
  output hf_t       dac_data
);

  localparam phase_t QUARTER = phase_t'(TABLE_DEPTH / 4);

  phase_t hf_phase, lo_phase;
  sine_t  c_sin, c_cos, l_sin, l_cos;
  hf_t    mod_out;

  phase_counter #(.PHASE_W(PHASE_W)) u_hf_counter (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .step(step), .phase(hf_phase));

  sine_table #(.DEPTH(TABLE_DEPTH), .WIDTH(SINE_W)) u_hf_sin (
    .clk(clk), .addr(hf_phase), .data(c_sin));
  sine_table #(.DEPTH(TABLE_DEPTH), .WIDTH(SINE_W)) u_hf_cos (
    .clk(clk), .addr(hf_phase + QUARTER), .data(c_cos));

  phase_counter #(.PHASE_W(PHASE_W)) u_lo_counter (
    .clk(clk), .rst_n(rst_n), .en(audio_valid), .step(lo_step), .phase(lo_phase));

  sine_table #(.DEPTH(TABLE_DEPTH), .WIDTH(SINE_W)) u_lo_sin (
    .clk(clk), .addr(lo_phase), .data(l_sin));
  sine_table #(.DEPTH(TABLE_DEPTH), .WIDTH(SINE_W)) u_lo_cos (
    .clk(clk), .addr(lo_phase + QUARTER), .data(l_cos));

  dsb_ssb_modulator u_mod (
    .clk(clk), .rst_n(rst_n), .mode(mode),
    .audio(audio), .audio_valid(audio_valid),
    .carrier_sin(c_sin), .carrier_cos(c_cos),
    .lo_sin(l_sin), .lo_cos(l_cos),
    .y(mod_out));

  fir_filter #(.TAPS(FIR_TAPS), .IN_W(DAC_W), .OUT_W(DAC_W), .COEFS(HF_LPF_COEFS)) u_hf_fir (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .x(mod_out), .y(dac_data), .y_valid());   // runs every clock

endmodule
