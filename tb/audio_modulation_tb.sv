// Testbench for audio_modulation (carrier generator + modulator + FIR).
//  1. DSB with a held audio value: every dac_data sample equals the 60-tap
//     FIR of round(audio*sin(2*pi*P/512)*2047/2^15), with the carrier phase
//     P modelled here, for several audio values and steps.
//  2. Carrier frequency: with step 185 and full-scale audio the output has
//     exactly 185 rising zero crossings per 512 clocks on average
//     (f = 50e6*185/512 = 18 066 406 Hz); with step 128, 128 per 512.
//  3. SSB: a tone fed at one audio sample per 8 clocks comes out at
//     fc - f0 + fm, with the other sideband 20 dB down.
module audio_modulation_tb;
  import tx_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, audio_valid = 0;
  phase_t step = 9'd185, lo_step = 9'd18;
  mod_mode_e mode = MODE_DSB;
  audio_t audio = '0;
  hf_t dac_data;
  int checks = 0, failures = 0;
  int ph = 0;            // model of the carrier counter after each edge
  int hist [$];          // model products, one per clock
  longint cyc = 0;
  logic ssb_feed = 0;

  audio_modulation dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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
  function automatic int fir_model();   // newest product is hist[$-3]
    longint acc = 0;
    int n = hist.size();
    for (int j = 0; j < FIR_TAPS; j++) acc += longint'(hist[n - 4 - j]) * HF_LPF_COEFS[j];
    acc = (acc + 16384) >>> 15;
    return (acc > 2047) ? 2047 : (acc < -2048) ? -2048 : int'(acc);
  endfunction

  // phase model: hist gets the product for the counter value of each edge
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      hist.push_back(mul(audio, tab(ph)));
      ph = (ph + step) % 512;
    end
    if (ssb_feed) begin
      audio_valid <= ((cyc + 1) % 8 == 0);
      audio <= audio_t'($rtoi($floor(16384.0 * $cos(2.0 * PI * 0.0313 / 8.0 * (cyc + 1)) + 0.5)));
    end
  end

  task automatic set_audio(input int v);
    audio <= audio_t'(v); audio_valid <= 1; @(posedge clk); audio_valid <= 0;
  endtask

  task automatic exact_run(input int n);
    repeat (FIR_TAPS + 8) @(posedge clk);
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      checks++;
      if (int'(dac_data) != fir_model()) begin
        failures++; if (failures < 10) $display("FAIL y=%0d exp=%0d", dac_data, fir_model());
      end
    end
  endtask

  task automatic crossings(input int n, output int c);
    logic signed [11:0] prev;
    c = 0; prev = dac_data;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      if (prev < 0 && dac_data >= 0) c++;
      prev = dac_data;
    end
  endtask

  task automatic measure(input real f, input int n, output real amp);
    real si, sq;
    si = 0; sq = 0;
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      si += real'(dac_data) * $sin(2.0 * PI * f * cyc);
      sq += real'(dac_data) * $cos(2.0 * PI * f * cyc);
    end
    amp = 2.0 * $sqrt(si * si + sq * sq) / n;
  endtask

  initial begin
    int c;
    real a_w, a_i;
    // audio must be 0 before reset release so the model and DUT agree
    repeat (3) @(posedge clk);
    set_audio(0);
    rst_n <= 1;
    // the held sample is latched on audio_valid; the model uses 'audio'
    // directly, so hold audio steady and wait for the pipeline
    set_audio(32767);  exact_run(2000);
    set_audio(-12345); exact_run(1000);
    step = 9'd37;
    set_audio(20000);  exact_run(1000);
    // frequency
    step = 9'd185; set_audio(32767);
    repeat (100) @(posedge clk);
    crossings(51200, c);
    checks++;
    $display("step 185: %0d crossings in 51200 clocks", c);
    if (c < 18499 || c > 18501) begin failures++; $display("FAIL 18.066 MHz carrier"); end
    step = 9'd128;
    repeat (100) @(posedge clk);
    crossings(5120, c);
    checks++;
    if (c < 1279 || c > 1281) begin failures++; $display("FAIL 12.5 MHz carrier %0d", c); end
    // SSB
    step = 9'd64; mode = MODE_SSB; ssb_feed = 1;
    repeat (3000) @(posedge clk);
    measure(0.125 - 18.0/512.0/8.0 + 0.0313/8.0, 32768, a_w);
    measure(0.125 + 18.0/512.0/8.0 - 0.0313/8.0, 32768, a_i);
    $display("SSB wanted %f image %f", a_w, a_i);
    checks += 2;
    if (a_w < 800 || a_w > 1150) begin failures++; $display("FAIL SSB level"); end
    if (a_i > 0.1 * a_w) begin failures++; $display("FAIL SSB image"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
