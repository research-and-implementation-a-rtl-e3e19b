// Testbench for dsb_ssb_modulator. Carrier and audio-oscillator samples are
// generated here from round(2047*sin(2*pi*p/512)); audio arrives every 8
// clocks so the audio-rate filters settle quickly.
//  1. DSB, random audio: y equals round(audio*sin/2^15) of two clocks
//     earlier, sample for sample.
//  2. DSB, audio tone fm: both sidebands fc+-fm are present at about half
//     the product amplitude.
//  3. SSB (Weaver), same tone: the wanted line at fc - f0 + fm carries the
//     tone at close to the full amplitude and the opposite sideband
//     fc + f0 - fm is at least 20 dB below it.
// All frequencies below are in cycles per clock.
module dsb_ssb_modulator_tb;
  import tx_pkg::*;
  localparam int    D     = 8;            // clocks per audio sample
  localparam int    CSTEP = 64;           // carrier: 64/512 = 0.125
  localparam int    LSTEP = 18;           // audio LO: 18/512 per audio sample
  localparam real   PI    = 3.14159265358979;
  localparam real   FM    = 0.0313 / D;   // audio tone
  localparam real   FC    = real'(CSTEP) / 512.0;
  localparam real   F0    = real'(LSTEP) / 512.0 / D;

  logic clk = 0, rst_n = 0, audio_valid = 0;
  mod_mode_e mode = MODE_DSB;
  audio_t audio = '0;
  sine_t carrier_sin = '0, carrier_cos = '0, lo_sin = '0, lo_cos = '0;
  hf_t y;
  int checks = 0, failures = 0;
  int cph = 0, lph = 0, cyc = 0;
  logic tone_on = 0;
  audio_t aq_m = '0;
  int exp_q [$];

  dsb_ssb_modulator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int tab(int p);
    real v = 2047.0 * $sin(2.0 * PI * (p % 512) / 512.0);
    return (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int mul(int a, int b);
    int q = int'($floor(real'(a) * real'(b) / 32768.0 + 0.5));
    return (q > 2047) ? 2047 : (q < -2048) ? -2048 : q;
  endfunction

  // stimulus and DSB reference, all on the clock edge
  always @(posedge clk) begin
    exp_q.push_back(mul(aq_m, carrier_sin));
    if (audio_valid) aq_m <= audio;
    cyc <= cyc + 1;
    cph = (cph + CSTEP) % 512;
    carrier_sin <= sine_t'(tab(cph));
    carrier_cos <= sine_t'(tab(cph + 128));
    audio_valid <= ((cyc + 1) % D == 0);
    if ((cyc + 1) % D == 0) begin
      lph = (lph + LSTEP) % 512;
      lo_sin <= sine_t'(tab(lph));
      lo_cos <= sine_t'(tab(lph + 128));
      if (tone_on)
        audio <= audio_t'($rtoi($floor(16384.0 * $cos(2.0 * PI * FM * (cyc + 1)) + 0.5)));
      else
        audio <= audio_t'($urandom);
    end
  end

  task automatic measure(input real f, input int n, output real amp);
    real si, sq;
    si = 0; sq = 0;
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      si += real'(y) * $sin(2.0 * PI * f * cyc);
      sq += real'(y) * $cos(2.0 * PI * f * cyc);
    end
    amp = 2.0 * $sqrt(si * si + sq * sq) / n;
  endtask

  initial begin
    real a_w, a_i, a_u, a_l;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (4) @(posedge clk);
    // 1. DSB exact
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk); #1;
      checks++;
      if (int'(y) != exp_q[exp_q.size() - 2]) begin
        failures++;
        if (failures < 10) $display("FAIL dsb y=%0d exp=%0d", y, exp_q[exp_q.size() - 2]);
      end
    end
    // 2. DSB tone: both sidebands
    tone_on = 1;
    repeat (200) @(posedge clk);
    measure(FC + FM, 16384, a_u);
    measure(FC - FM, 16384, a_l);
    $display("DSB sidebands: upper %f lower %f", a_u, a_l);
    checks += 2;
    if (a_u < 400 || a_u > 620) begin failures++; $display("FAIL DSB upper"); end
    if (a_l < 400 || a_l > 620) begin failures++; $display("FAIL DSB lower"); end
    // 3. SSB
    mode = MODE_SSB;
    repeat (2000) @(posedge clk);
    measure(FC - F0 + FM, 32768, a_w);
    measure(FC + F0 - FM, 32768, a_i);
    $display("SSB wanted %f image %f", a_w, a_i);
    checks += 2;
    if (a_w < 850 || a_w > 1150) begin failures++; $display("FAIL SSB wanted amplitude"); end
    if (a_i > 0.1 * a_w) begin failures++; $display("FAIL SSB image not suppressed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
