// Testbench for audio_control (bus scaled to clk/40 so the run is short):
// after reset the nine control words reach a bus model with the codec
// address, the analogue-path word follows input_sel, a restart with the
// microphone selected resends the list, a missing acknowledge is flagged,
// SCL runs at the set rate and xck is clk/4.
module audio_control_tb;
  logic clk = 0, rst_n = 0, start = 0, input_sel = 0, nack = 0;
  logic xck, scl, sda_oe, busy, done, ack_error, sda_pull;
  wire  sda = !(sda_oe || sda_pull);
  int n_words;
  logic [15:0] words [32];
  logic [7:0] dev_bytes [32];
  int checks = 0, failures = 0;
  logic [15:0] expw [9] = '{16'h1E00, 16'h0017, 16'h0217, 16'h0812, 16'h0A00,
                            16'h0C00, 16'h0E42, 16'h1000, 16'h1201};

  audio_control #(.CLK_HZ(400_000), .I2C_HZ(10_000)) dut (
    .clk, .rst_n, .start, .input_sel, .xck, .scl, .sda_oe, .sda_in(sda), .busy, .done, .ack_error);
  i2c_slave_model bus (.clk, .scl, .sda, .nack, .sda_pull, .n_words, .words, .dev_bytes);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_list(input int first, input logic mic);
    for (int i = 0; i < 9; i++) begin
      logic [15:0] e;
      e = expw[i];
      if (i == 3 && mic) e = 16'h0815;
      checks += 2;
      if (words[first+i] !== e) begin failures++; $display("FAIL word %0d: %h exp %h", i, words[first+i], e); end
      if (dev_bytes[first+i] !== 8'h34) begin failures++; $display("FAIL dev %h", dev_bytes[first+i]); end
    end
  endtask

  // SCL period: 4 quarters of 10 clocks
  longint cyc = 0, last_rise = -1;
  int bad_period = 0, periods = 0;
  logic scl_q = 1;
  always @(posedge clk) begin
    cyc <= cyc + 1; scl_q <= scl;
    if (scl && !scl_q) begin
      if (last_rise >= 0 && busy && cyc - last_rise < 60) begin
        periods++;
        if (cyc - last_rise != 40) bad_period++;
      end
      last_rise <= cyc;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // xck divide by 4
    begin
      int rises; logic xq;
      rises = 0; xq = xck;
      for (int i = 0; i < 400; i++) begin @(posedge clk); if (xck && !xq) rises++; xq = xck; end
      checks++; if (rises < 99 || rises > 101) begin failures++; $display("FAIL xck rises %0d", rises); end
    end
    wait (done);
    repeat (50) @(posedge clk);
    checks += 3;
    if (n_words != 9) begin failures++; $display("FAIL n_words %0d", n_words); end
    if (ack_error) begin failures++; $display("FAIL ack_error"); end
    if (busy) begin failures++; $display("FAIL busy"); end
    check_list(0, 1'b0);
    // restart with microphone input
    input_sel <= 1; start <= 1; @(posedge clk); start <= 0;
    @(posedge clk); checks++; if (!busy || done) begin failures++; $display("FAIL restart"); end
    wait (done); repeat (50) @(posedge clk);
    checks++; if (n_words != 18) begin failures++; $display("FAIL n_words %0d", n_words); end
    check_list(9, 1'b1);
    // no acknowledge
    nack <= 1; start <= 1; @(posedge clk); start <= 0;
    repeat (2) @(posedge clk);
    wait (done); repeat (10) @(posedge clk);
    checks++; if (!ack_error) begin failures++; $display("FAIL nack not flagged"); end
    checks++;
    if (periods < 100 || bad_period != 0) begin failures++; $display("FAIL scl periods %0d bad %0d", periods, bad_period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
