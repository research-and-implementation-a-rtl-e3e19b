// Signed multiplier that modulates a carrier sample with an audio sample
// (the "Multiply" block).
//
// It forms the full A_W x B_W product of the audio sample a (Q1.15 for the
// default 16 bits) and the carrier sample b (12 bits), drops the A_W-1
// fraction bits of a (SHIFT, default A_W-1) with rounding to nearest, and
// saturates the result to OUT_W bits. Other SHIFT values let the same block
// mix audio with a 12-bit oscillator and keep audio precision. With a full-scale audio sample the output therefore follows
// the carrier sample one for one. The 12 x 16 multiply with a 12-bit output
// follows the published design; rounding, saturation and the one-clock
// output register are choices of this implementation.
//
// Timing: p is registered, one clock after a and b.
module am_multiplier #(
  parameter int unsigned A_W   = 16,
  parameter int unsigned B_W   = 12,
  parameter int unsigned OUT_W = 12,
  parameter int unsigned SHIFT = A_W - 1
) (
  input  logic                    clk,
  input  logic signed [A_W-1:0]   a,
  input  logic signed [B_W-1:0]   b,
  output logic signed [OUT_W-1:0] p
);

  localparam int unsigned PROD_W = A_W + B_W;
  localparam logic signed [PROD_W-1:0] MAX_OUT = PROD_W'((1 <<< (OUT_W-1)) - 1);
  localparam logic signed [PROD_W-1:0] MIN_OUT = -PROD_W'(1 <<< (OUT_W-1));

  logic signed [PROD_W-1:0] prod, scaled;

  always_comb begin
    prod   = PROD_W'(a) * PROD_W'(b);
    scaled = (prod + PROD_W'(1 <<< (SHIFT-1))) >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (scaled > MAX_OUT)      p <= MAX_OUT[OUT_W-1:0];
    else if (scaled < MIN_OUT) p <= MIN_OUT[OUT_W-1:0];
    else                       p <= scaled[OUT_W-1:0];
  end

endmodule
