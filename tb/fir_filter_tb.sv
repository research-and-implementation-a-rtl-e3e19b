// Testbench for fir_filter at its defaults (60 taps, harmonic low-pass).
//  1. The coefficients match a Hamming-windowed sinc with fc = 22/50,
//     recomputed here in real arithmetic (within 1 LSB after rounding).
//  2. Random input with random en gaps: y equals the direct-form sum
//     computed here, rounded and saturated, one clock after each input.
//  3. Impulse response: a 2047 impulse gives round(2047*w[j]/2^15).
//  4. Filtering: a 5 MHz tone passes (gain within 0.5 dB of 1) and a
//     24 MHz tone is attenuated by more than 20 dB.
module fir_filter_tb;
  import tx_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [11:0] x = '0, y;
  logic y_valid;
  int checks = 0, failures = 0;
  int hist [FIR_TAPS];

  fir_filter dut (.clk, .rst_n, .en, .x, .y, .y_valid);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int model_out();
    longint acc = 0;
    for (int j = 0; j < FIR_TAPS; j++) acc += longint'(hist[j]) * longint'(HF_LPF_COEFS[j]);
    acc = (acc + 16384) >>> 15;
    if (acc > 2047) acc = 2047;
    if (acc < -2048) acc = -2048;
    return int'(acc);
  endfunction

  task automatic push(input int v, input logic e);
    x <= 12'(v); en <= e;
    @(posedge clk); #1;
    if (e) begin
      for (int j = FIR_TAPS-1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = v;
    end
    checks++;
    if (y_valid !== e) begin failures++; $display("FAIL y_valid"); end
    if (e) begin
      checks++;
      if (int'(y) != model_out()) begin failures++; $display("FAIL y=%0d exp=%0d", y, model_out()); end
    end
  endtask

  // tone amplitude through the filter, measured by correlation
  task automatic tone_gain(input real f, output real gain);
    real si, sq; int n;
    si = 0; sq = 0; n = 2000;
    for (int k = 0; k < 200 + n; k++) begin
      x <= 12'($rtoi($floor(1500.0 * $sin(2.0*3.14159265358979*f*k) + 0.5)));
      en <= 1; @(posedge clk); #1;
      if (k >= 200) begin
        si += real'(y) * $sin(2.0*3.14159265358979*f*(k-1));
        sq += real'(y) * $cos(2.0*3.14159265358979*f*(k-1));
      end
    end
    gain = 2.0 * $sqrt(si*si + sq*sq) / n / 1500.0;
  endtask

  initial begin
    real g;
    // 1. coefficient design
    for (int i = 0; i < FIR_TAPS; i++) begin
      real t, h, w, sum;
      t = i - (FIR_TAPS - 1) / 2.0; sum = 0;
      for (int k = 0; k < FIR_TAPS; k++) begin
        real tk;
        tk = k - (FIR_TAPS - 1) / 2.0;
        sum += $sin(2.0*3.14159265358979*0.44*tk) / (3.14159265358979*tk)
               * (0.54 - 0.46*$cos(2.0*3.14159265358979*k/(FIR_TAPS-1)));
      end
      h = $sin(2.0*3.14159265358979*0.44*t) / (3.14159265358979*t);
      w = 0.54 - 0.46*$cos(2.0*3.14159265358979*i/(FIR_TAPS-1));
      checks++;
      if (h*w/sum*32768.0 - real'(HF_LPF_COEFS[i]) > 1.0 || real'(HF_LPF_COEFS[i]) - h*w/sum*32768.0 > 1.0) begin
        failures++; $display("FAIL coef %0d: %0d vs %f", i, HF_LPF_COEFS[i], h*w/sum*32768.0);
      end
    end
    foreach (hist[j]) hist[j] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1; @(posedge clk); #1;
    // 2. random data with gaps, including full-scale values
    for (int i = 0; i < 3000; i++) begin
      automatic int v = (i % 7 == 0) ? ((i % 2) ? 2047 : -2048) : int'($signed(12'($urandom)));
      push(v, ($urandom % 3) != 0);
    end
    // 3. impulse response
    for (int i = 0; i < FIR_TAPS; i++) push(0, 1);
    push(2047, 1);
    for (int j = 1; j <= FIR_TAPS + 2; j++) push(0, 1);
    // 4. pass band / stop band
    tone_gain(5.0/50.0, g);
    checks++;
    $display("5 MHz gain %f", g);
    if (g < 0.944 || g > 1.059) begin failures++; $display("FAIL passband gain %f", g); end
    tone_gain(24.0/50.0, g);
    checks++;
    $display("24 MHz gain %f", g);
    if (g > 0.1) begin failures++; $display("FAIL stopband gain %f", g); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
