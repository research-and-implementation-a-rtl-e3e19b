// Direct-form ("canonical") FIR filter, y[k] = sum_j w[j] * x[k-j].
//
// A TAPS-deep delay line of input samples feeds TAPS multipliers whose
// products are summed in one wide accumulator; the sum is scaled by
// 2^-COEF_FRAC with rounding and saturated to OUT_W bits. A new sample is
// taken on every clock that en is high, so the same block runs at the
// 50 MHz DAC rate (harmonic filter, en tied high) or at the audio sample
// rate (Weaver SSB branch filters). The direct-form structure, the 60-tap
// default and the place of the filter before the DAC follow the published
// design; the coefficient values (a windowed-sinc low-pass, see tx_pkg),
// their Q1.15 format and the rounding/saturation are choices of this
// implementation.
//
// Timing: y and y_valid are registered; y_valid pulses one clock after an
// input with en high, and y then already includes that input sample.
module fir_filter
  import tx_pkg::*;
#(
  parameter int unsigned TAPS             = tx_pkg::FIR_TAPS,
  parameter int unsigned IN_W             = 12,
  parameter int unsigned OUT_W            = 12,
  parameter tx_pkg::coef_t COEFS [TAPS]   = tx_pkg::HF_LPF_COEFS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y,
  output logic                    y_valid
);

  localparam int unsigned ACC_W = IN_W + COEF_W + $clog2(TAPS) + 1;
  localparam logic signed [ACC_W-1:0] MAX_OUT = ACC_W'((1 <<< (OUT_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] MIN_OUT = -ACC_W'(1 <<< (OUT_W-1));

  logic signed [IN_W-1:0]  taps_q [TAPS];   // taps_q[j] = x[k-j]
  logic signed [ACC_W-1:0] acc, scaled;

  // The newest sample enters at tap 0; the sum below uses the sample being
  // shifted in so that the output includes it.
  always_comb begin
    acc = ACC_W'(x) * ACC_W'(COEFS[0]);
    for (int j = 1; j < TAPS; j++)
      acc += ACC_W'(taps_q[j-1]) * ACC_W'(COEFS[j]);
    scaled = (acc + ACC_W'(1 <<< (COEF_FRAC-1))) >>> COEF_FRAC;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < TAPS; j++) taps_q[j] <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en;
      if (en) begin
        taps_q[0] <= x;
        for (int j = 1; j < TAPS; j++) taps_q[j] <= taps_q[j-1];
        if (scaled > MAX_OUT)      y <= MAX_OUT[OUT_W-1:0];
        else if (scaled < MIN_OUT) y <= MIN_OUT[OUT_W-1:0];
        else                       y <= scaled[OUT_W-1:0];
      end
    end
  end

endmodule
