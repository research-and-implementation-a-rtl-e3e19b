// Workload testbench: the output FIR lengthened from 60 to 128 taps, the
// variant the transmitter was also measured with. The 128 coefficients are
// made here by the same rule as the default set (Hamming-windowed sinc,
// fc = 22 MHz at 50 MHz, unity DC gain, Q1.15). A 128-tap and the default
// 60-tap instance are fed the same samples; the 128-tap output must match
// the direct-form sum sample for sample, pass a 5 MHz tone and attenuate a
// 22.9 MHz tone further than the 60-tap filter does.
module fir_filter_128_tb;
  import tx_pkg::*;
  localparam int  N  = 128;
  localparam real PI = 3.14159265358979;
  typedef coef_t coef128_t [N];

  function automatic coef128_t make_coefs();
    real h [N];
    real sum, t;
    sum = 0;
    for (int i = 0; i < N; i++) begin
      t = i - (N - 1) / 2.0;
      h[i] = $sin(2.0 * PI * 0.44 * t) / (PI * t) * (0.54 - 0.46 * $cos(2.0 * PI * i / (N - 1)));
      sum += h[i];
    end
    for (int i = 0; i < N; i++)
      make_coefs[i] = coef_t'($rtoi($floor(h[i] / sum * 32768.0 + 0.5)));
  endfunction

  localparam coef128_t C128 = make_coefs();

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [11:0] x = '0, y128, y60;
  logic v128, v60;
  int checks = 0, failures = 0;
  int hist [N];

  fir_filter #(.TAPS(N), .COEFS(C128)) dut (.clk, .rst_n, .en, .x, .y(y128), .y_valid(v128));
  fir_filter ref60 (.clk, .rst_n, .en, .x, .y(y60), .y_valid(v60));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int model_out();
    longint acc = 0;
    for (int j = 0; j < N; j++) acc += longint'(hist[j]) * longint'(C128[j]);
    acc = (acc + 16384) >>> 15;
    return (acc > 2047) ? 2047 : (acc < -2048) ? -2048 : int'(acc);
  endfunction

  task automatic tone(input real f, output real g128, output real g60);
    real a1, b1, a2, b2;
    int n;
    a1 = 0; b1 = 0; a2 = 0; b2 = 0; n = 4000;
    for (int k = 0; k < 300 + n; k++) begin
      automatic int v = $rtoi($floor(1500.0 * $sin(2.0 * PI * f * k) + 0.5));
      x <= 12'(v); en <= 1;
      @(posedge clk); #1;
      for (int j = N - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = v;
      checks++;
      if (int'(y128) != model_out()) begin
        failures++; if (failures < 10) $display("FAIL y=%0d exp=%0d", y128, model_out());
      end
      if (k >= 300) begin
        a1 += real'(y128) * $sin(2.0 * PI * f * (k - 1)); b1 += real'(y128) * $cos(2.0 * PI * f * (k - 1));
        a2 += real'(y60)  * $sin(2.0 * PI * f * (k - 1)); b2 += real'(y60)  * $cos(2.0 * PI * f * (k - 1));
      end
    end
    g128 = 2.0 * $sqrt(a1 * a1 + b1 * b1) / n / 1500.0;
    g60  = 2.0 * $sqrt(a2 * a2 + b2 * b2) / n / 1500.0;
  endtask

  initial begin
    real g128, g60;
    foreach (hist[j]) hist[j] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1; @(posedge clk); #1;
    tone(5.0 / 50.0, g128, g60);
    $display("5 MHz: 128 taps %f, 60 taps %f", g128, g60);
    checks++;
    if (g128 < 0.944 || g128 > 1.059) begin failures++; $display("FAIL 128-tap passband"); end
    tone(22.9 / 50.0, g128, g60);
    $display("22.9 MHz: 128 taps %f, 60 taps %f", g128, g60);
    checks += 2;
    if (g128 > 0.05) begin failures++; $display("FAIL 128-tap stopband"); end
    if (g128 >= g60) begin failures++; $display("FAIL 128 taps not sharper than 60"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
