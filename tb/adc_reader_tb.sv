// Testbench for adc_reader: an I2S codec model (64 bit clocks per frame,
// BCLK = clk/16, as a codec on a 12.5 MHz master clock would run) sends
// random left/right words; every frame must appear on sample_l/sample_r
// with one valid pulse, spaced exactly one frame (1024 clocks) apart.
module adc_reader_tb;
  logic clk = 0, rst_n = 0;
  logic bclk, lrck, dat, frame;
  logic [15:0] l_in = '0, r_in = '0, l_sent, r_sent;
  logic signed [15:0] sample_l, sample_r;
  logic valid;
  int checks = 0, failures = 0;
  int frames = 0, valids = 0;
  longint last_valid = -1, cyc = 0;
  logic [15:0] exp_l [$], exp_r [$];

  i2s_codec_model #(.HALF(8), .SLOT(32)) codec (.clk, .rst_n, .l_in, .r_in, .bclk, .lrck, .dat,
                                                .frame, .l_sent, .r_sent);
  adc_reader dut (.clk, .rst_n, .bclk, .adclrck(lrck), .adcdat(dat), .sample_l, .sample_r, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (frame) begin
      exp_l.push_back(l_in); exp_r.push_back(r_in);   // latched this clock
      frames <= frames + 1;
      l_in <= (frames % 5 == 0) ? 16'h8000 : (frames % 5 == 1) ? 16'h7fff : 16'($urandom);
      r_in <= 16'($urandom);
    end
    if (valid && rst_n) begin
      valids <= valids + 1;
      checks++;
      if (exp_l.size() == 0) begin failures++; $display("FAIL valid without frame"); end
      else begin
        logic [15:0] el, er;
        el = exp_l.pop_front(); er = exp_r.pop_front();
        if (sample_l !== el || sample_r !== er) begin
          failures++; $display("FAIL got %h/%h exp %h/%h", sample_l, sample_r, el, er);
        end
      end
      if (last_valid >= 0) begin
        checks++;
        if (cyc - last_valid != 1024) begin failures++; $display("FAIL spacing %0d", cyc - last_valid); end
      end
      last_valid <= cyc;
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    wait (valids == 150);
    @(posedge clk);
    checks++;
    if (frames < 150) begin failures++; $display("FAIL frames"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
