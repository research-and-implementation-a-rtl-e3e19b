// End-to-end testbench of hf_transmitter at its default parameters.
//
// A codec model (I2S master, 64 bit clocks per frame at clk/16, i.e. a
// 48.8 kHz audio rate) supplies audio, a control-bus model acknowledges the
// codec configuration, and AXI4-Lite tasks play the host. The run:
//   1. waits for the codec configuration after reset and checks the nine
//      control words (line input) and the status register;
//   2. DSB, full-scale constant audio: the DAC shows 18 066 406 Hz
//      (step 185, 18500 rising crossings of mid-scale in 51200 clocks);
//   3. host changes the step to 128: 12.5 MHz;
//   4. DSB with a 3052 Hz audio tone: both sidebands fc +- fm at about
//      half of the tone amplitude times 2047, the carrier itself absent;
//   5. host switches to SSB (Weaver) with a 1528 Hz tone: the line at
//      fc - f0 + fm is present and fc + f0 - fm is suppressed; at the same
//      time the host selects the microphone input and restarts the codec
//      configuration, whose new words are checked;
//   6. host disables the DAC: mid-scale and power-down.
// Each mechanism (step change, mode switch, codec reconfiguration, DAC
// disable, audio frames delivered) is counted; one that never happened
// counts as a failure.
module hf_transmitter_tb;
  import tx_pkg::*;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic [7:0]  s_awaddr = '0, s_araddr = '0;
  logic        s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [31:0] s_wdata = '0;
  logic [3:0]  s_wstrb = '0;
  logic        s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0]  s_bresp, s_rresp;
  logic [31:0] s_rdata;
  logic        AUD_XCK, AUD_BCLK, AUD_ADCLRCK, AUD_ADCDAT, I2C_SCLK, I2C_SDAT_OE;
  logic [11:0] DAC_D;
  logic        DAC_CLK, DAC_PD;
  logic        sda_pull, frame, nack = 0;
  wire         sda = !(I2C_SDAT_OE || sda_pull);
  logic [15:0] l_in = '0, r_in = '0, l_sent, r_sent;
  int          n_words;
  logic [15:0] words [32];
  logic [7:0]  dev_bytes [32];

  int checks = 0, failures = 0;
  int n_step_change = 0, n_mode_switch = 0, n_reconfig = 0, n_dac_off = 0, n_frames = 0;
  longint cyc = 0;
  int tone_mode = 0;        // 0: constant full scale, 1: 3052 Hz, 2: 1528 Hz
  longint frame_no = 0;

  hf_transmitter dut (
    .CLOCK_50(clk), .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .AUD_XCK, .AUD_BCLK, .AUD_ADCLRCK, .AUD_ADCDAT,
    .I2C_SCLK, .I2C_SDAT_OE, .I2C_SDAT_IN(sda),
    .DAC_D, .DAC_CLK, .DAC_PD);

  i2s_codec_model #(.HALF(8), .SLOT(32)) codec (
    .clk, .rst_n, .l_in, .r_in, .bclk(AUD_BCLK), .lrck(AUD_ADCLRCK), .dat(AUD_ADCDAT),
    .frame, .l_sent, .r_sent);
  i2c_slave_model bus (.clk, .scl(I2C_SCLK), .sda, .nack, .sda_pull, .n_words, .words, .dev_bytes);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // audio source: next frame's words
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (frame) begin
      n_frames <= n_frames + 1;
      frame_no <= frame_no + 1;
      case (tone_mode)
        0:       l_in <= 16'h7fff;
        1:       l_in <= 16'($rtoi($floor(16384.0 * $sin(2.0 * PI * (frame_no + 1) / 16.0) + 0.5)));
        default: l_in <= 16'($rtoi($floor(16384.0 * $cos(2.0 * PI * 0.0313 * (frame_no + 1)) + 0.5)));
      endcase
      r_in <= 16'($urandom);
    end
  end

  // ---------------- host ----------------
  task automatic axi_write(input logic [7:0] a, input logic [31:0] d);
    s_awaddr <= a; s_wdata <= d; s_wstrb <= 4'hf; s_awvalid <= 1; s_wvalid <= 1; s_bready <= 1;
    do @(posedge clk); while (!(s_awready && s_wready));
    s_awvalid <= 0; s_wvalid <= 0;
    do @(posedge clk); while (!s_bvalid);
    s_bready <= 0;
  endtask

  task automatic axi_read(input logic [7:0] a, output logic [31:0] d);
    s_araddr <= a; s_arvalid <= 1; s_rready <= 1;
    do @(posedge clk); while (!s_arready);
    s_arvalid <= 0;
    do @(posedge clk); while (!s_rvalid);
    d = s_rdata;
    s_rready <= 0;
  endtask

  task automatic wait_codec_done();
    logic [31:0] st;
    do begin repeat (1000) @(posedge clk); axi_read(8'h14, st); end while (st[0] != 1'b1 || st[2]);
    checks++;
    if (st[1]) begin failures++; $display("FAIL codec ack error"); end
  endtask

  task automatic check_words(input int first, input logic mic);
    logic [15:0] e [9] = '{16'h1E00, 16'h0017, 16'h0217, 16'h0812, 16'h0A00,
                           16'h0C00, 16'h0E42, 16'h1000, 16'h1201};
    if (mic) e[3] = 16'h0815;
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (words[first + i] !== e[i] || dev_bytes[first + i] !== 8'h34) begin
        failures++; $display("FAIL codec word %0d = %h", first + i, words[first + i]);
      end
    end
  endtask

  function automatic int dac_signed();
    return int'($signed(DAC_D ^ 12'h800));
  endfunction

  task automatic crossings(input int n, output int c);
    int prev, now;
    c = 0; prev = dac_signed();
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      now = dac_signed();
      if (prev < 0 && now >= 0) c++;
      prev = now;
    end
  endtask

  task automatic measure(input real f, input int n, output real amp);
    real si, sq;
    si = 0; sq = 0;
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      si += real'(dac_signed()) * $sin(2.0 * PI * f * cyc);
      sq += real'(dac_signed()) * $cos(2.0 * PI * f * cyc);
    end
    amp = 2.0 * $sqrt(si * si + sq * sq) / n;
  endtask

  initial begin
    int c;
    real a_u, a_l, a_c, a_w, a_i;
    real fc, fm, f0;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    // 1. codec configuration after reset
    wait_codec_done();
    checks++;
    if (n_words != 9) begin failures++; $display("FAIL %0d codec words", n_words); end
    check_words(0, 1'b0);
    // 2. default carrier 18.066 MHz, DSB, constant audio
    repeat (3000) @(posedge clk);
    crossings(51200, c);
    $display("step 185: %0d crossings in 51200 clocks (%0d Hz)", c, longint'(c) * 50_000_000 / 51200);
    checks++;
    if (c < 18499 || c > 18501) begin failures++; $display("FAIL 18.066 MHz"); end
    checks++;
    if (DAC_PD !== 1'b0) begin failures++; $display("FAIL DAC powered down"); end
    // 3. step change
    axi_write(8'h00, 32'd128); n_step_change++;
    repeat (200) @(posedge clk);
    crossings(5120, c);
    checks++;
    if (c < 1279 || c > 1281) begin failures++; $display("FAIL 12.5 MHz: %0d", c); end
    // 4. DSB tone, fm = fs/16 with fs = 50e6/1024
    tone_mode = 1;
    fc = 128.0 / 512.0; fm = 1.0 / 16.0 / 1024.0;
    repeat (3000) @(posedge clk);
    measure(fc + fm, 65536, a_u);
    measure(fc - fm, 65536, a_l);
    measure(fc, 65536, a_c);
    $display("DSB: upper %f lower %f carrier %f", a_u, a_l, a_c);
    checks += 3;
    if (a_u < 420 || a_u > 600) begin failures++; $display("FAIL DSB upper sideband"); end
    if (a_l < 420 || a_l > 600) begin failures++; $display("FAIL DSB lower sideband"); end
    if (a_c > 0.05 * a_u) begin failures++; $display("FAIL DSB carrier not suppressed"); end
    // 5. SSB, and a codec reconfiguration for the microphone meanwhile
    tone_mode = 2;
    axi_write(8'h04, 32'h1); n_mode_switch++;
    axi_write(8'h0C, 32'h3); n_reconfig++;
    fm = 0.0313 / 1024.0; f0 = 18.0 / 512.0 / 1024.0;
    repeat (80_000) @(posedge clk);
    measure(fc - f0 + fm, 540_000, a_w);
    measure(fc + f0 - fm, 540_000, a_i);
    $display("SSB: wanted %f opposite sideband %f", a_w, a_i);
    checks += 2;
    if (a_w < 800 || a_w > 1150) begin failures++; $display("FAIL SSB wanted level"); end
    if (a_i > 0.1 * a_w) begin failures++; $display("FAIL SSB opposite sideband"); end
    wait_codec_done();
    checks++;
    if (n_words != 18) begin failures++; $display("FAIL %0d codec words", n_words); end
    check_words(9, 1'b1);
    // back to DSB
    axi_write(8'h04, 32'h0); n_mode_switch++;
    // 6. DAC disable
    axi_write(8'h10, 32'h0); n_dac_off++;
    repeat (5) @(posedge clk); #1;
    checks++;
    if (DAC_D !== 12'h800 || DAC_PD !== 1'b1) begin failures++; $display("FAIL DAC disable"); end
    // mechanisms
    $display("mechanisms: step changes %0d, mode switches %0d, codec reconfigs %0d, DAC off %0d, audio frames %0d",
             n_step_change, n_mode_switch, n_reconfig, n_dac_off, n_frames);
    checks += 5;
    if (n_step_change == 0) failures++;
    if (n_mode_switch == 0) failures++;
    if (n_reconfig == 0) failures++;
    if (n_dac_off == 0) failures++;
    if (n_frames < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
