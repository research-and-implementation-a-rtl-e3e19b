// Step counter that addresses the sine table (the "Counter" block of the
// carrier generator).
//
// On every enabled clock the counter adds STEP to itself and wraps modulo
// 2^PHASE_W. Reading a 2^PHASE_W-entry sine table at that address gives a
// sine of frequency f = f_clk * step / 2^PHASE_W; with the default 9-bit
// counter and a 50 MHz clock, step = 128 gives 12.5 MHz and step = 185
// gives 18.066 MHz. The 9-bit width, the step input and the frequency
// formula follow the published design. The enable input (so the same block
// can also run at the audio sample rate, as the Weaver SSB audio oscillator)
// and the synchronous active-low reset to phase 0 are choices of this
// implementation.
//
// Interface: step is sampled every clock; phase is a register, so a change
// of step shows in phase one clock later.
module phase_counter #(
  parameter int unsigned PHASE_W = 9
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [PHASE_W-1:0] step,
  output logic [PHASE_W-1:0] phase
);

  always_ff @(posedge clk) begin
    if (!rst_n)  phase <= '0;
    else if (en) phase <= phase + step;
  end

endmodule
