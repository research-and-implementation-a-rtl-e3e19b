// DSB-SC / SSB modulator: combines an audio sample stream with the HF
// carrier.
//
// DSB (mode = MODE_DSB): the held audio sample multiplies the carrier sine,
// a balanced (suppressed-carrier) modulator.
// SSB (mode = MODE_SSB), Weaver method: the audio is mixed with an audio-band
// oscillator of frequency f0 in two branches (sin and cos), each branch is
// low-pass filtered at the audio rate, the filtered branches multiply the
// carrier sine and cosine, and the two products are added:
//   I = LPF{m(t) sin w0 t} = (Vm/2) sin (w0-wm)t
//   Q = LPF{m(t) cos w0 t} = (Vm/2) cos (w0-wm)t
//   I sin wc t + Q cos wc t = (Vm/2) cos (wc - w0 + wm)t
// so a tone at fm appears at fc - f0 + fm only. The sum is doubled (with
// saturation) so that a full-scale tone reaches the same peak in both modes.
//
// DSB/SSB operation, the Weaver structure and the 12x16 multiply with a
// 12-bit result follow the published design. The branch filters (60-tap
// windowed-sinc low-pass at 1.5 kHz for 48 kHz audio), keeping 16 bits in
// the audio-rate branches, the doubling and the pipeline are choices of this
// implementation.
//
// Timing: audio is latched on audio_valid and held (zero-order hold).
// lo_sin/lo_cos must be the audio oscillator value belonging to that sample
// and stable two clocks after audio_valid (the oscillator advances on
// audio_valid and its table has one clock latency). carrier_sin/cos change
// every clock. In DSB mode y follows carrier_sin by 2 clocks; in SSB mode
// the carrier products also take 2 clocks, and a new audio sample reaches y
// after the 3-clock branch pipeline plus the branch filter delay.
module dsb_ssb_modulator
  import tx_pkg::*;
#(
  parameter int unsigned WEAVER_TAPS                = tx_pkg::FIR_TAPS,
  parameter tx_pkg::coef_t WEAVER_COEFS [WEAVER_TAPS] = tx_pkg::WEAVER_LPF_COEFS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  mod_mode_e mode,
  input  audio_t    audio,
  input  logic      audio_valid,
  input  sine_t     carrier_sin,
  input  sine_t     carrier_cos,
  input  sine_t     lo_sin,
  input  sine_t     lo_cos,
  output hf_t       y
);

  localparam int signed HF_MAX = (1 <<< (DAC_W-1)) - 1;
  localparam int signed HF_MIN = -(1 <<< (DAC_W-1));

  audio_t     audio_q;
  logic [2:0] strobe_d;     // audio_valid delayed 1..3 clocks

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      audio_q  <= '0;
      strobe_d <= '0;
    end else begin
      if (audio_valid) audio_q <= audio;
      strobe_d <= {strobe_d[1:0], audio_valid};
    end
  end

  // ---------------- DSB: audio x carrier ----------------
  hf_t dsb;
  am_multiplier #(.A_W(AUDIO_W), .B_W(SINE_W), .OUT_W(DAC_W)) u_dsb_mul (
    .clk(clk), .a(audio_q), .b(carrier_sin), .p(dsb));

  // ---------------- SSB (Weaver) ----------------
  // audio x audio oscillator, keeping audio scale (Q1.11 oscillator)
  audio_t mix_i, mix_q, bb_i, bb_q;

  am_multiplier #(.A_W(AUDIO_W), .B_W(SINE_W), .OUT_W(AUDIO_W), .SHIFT(SINE_W-1)) u_mix_i (
    .clk(clk), .a(audio_q), .b(lo_sin), .p(mix_i));
  am_multiplier #(.A_W(AUDIO_W), .B_W(SINE_W), .OUT_W(AUDIO_W), .SHIFT(SINE_W-1)) u_mix_q (
    .clk(clk), .a(audio_q), .b(lo_cos), .p(mix_q));

  // mix_* hold the product of the new sample 3 clocks after audio_valid
  fir_filter #(.TAPS(WEAVER_TAPS), .IN_W(AUDIO_W), .OUT_W(AUDIO_W), .COEFS(WEAVER_COEFS)) u_lpf_i (
    .clk(clk), .rst_n(rst_n), .en(strobe_d[2]), .x(mix_i), .y(bb_i), .y_valid());
  fir_filter #(.TAPS(WEAVER_TAPS), .IN_W(AUDIO_W), .OUT_W(AUDIO_W), .COEFS(WEAVER_COEFS)) u_lpf_q (
    .clk(clk), .rst_n(rst_n), .en(strobe_d[2]), .x(mix_q), .y(bb_q), .y_valid());

  hf_t v3, v4;
  am_multiplier #(.A_W(AUDIO_W), .B_W(SINE_W), .OUT_W(DAC_W)) u_hf_i (
    .clk(clk), .a(bb_i), .b(carrier_sin), .p(v3));
  am_multiplier #(.A_W(AUDIO_W), .B_W(SINE_W), .OUT_W(DAC_W)) u_hf_q (
    .clk(clk), .a(bb_q), .b(carrier_cos), .p(v4));

  int signed ssb_sum;
  always_comb ssb_sum = 2 * (int'(v3) + int'(v4));

  always_ff @(posedge clk) begin
    if (!rst_n)                y <= '0;
    else if (mode == MODE_DSB) y <= dsb;
    else if (ssb_sum > HF_MAX) y <= hf_t'(HF_MAX);
    else if (ssb_sum < HF_MIN) y <= hf_t'(HF_MIN);
    else                       y <= hf_t'(ssb_sum);
  end

endmodule
