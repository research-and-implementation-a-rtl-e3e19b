// Testbench for ctrl_regs: reset values, write/read of every register with
// random AXI4-Lite handshake delays, byte strobes, the self-clearing codec
// start pulse, the read-only status word and unmapped addresses.
module ctrl_regs_tb;
  import tx_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] awaddr = '0, araddr = '0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [31:0] wdata = '0, rdata;
  logic [3:0] wstrb = '0;
  logic [1:0] bresp, rresp;
  phase_t carrier_step, lo_step;
  mod_mode_e mode;
  logic input_sel, codec_start, dac_enable;
  logic codec_done = 0, codec_ack_error = 0, codec_busy = 0;
  int checks = 0, failures = 0, start_pulses = 0;

  ctrl_regs dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (codec_start && rst_n) start_pulses++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic axi_write(input logic [7:0] a, input logic [31:0] d, input logic [3:0] s = 4'hf);
    awaddr <= a; wdata <= d; wstrb <= s; awvalid <= 1; wvalid <= 1;
    do @(posedge clk); while (!(awready && wready));
    awvalid <= 0; wvalid <= 0;
    repeat ($urandom % 3) @(posedge clk);       // late bready: bvalid must hold
    bready <= 1;
    do @(posedge clk); while (!bvalid);
    checks++; if (bresp != 2'b00) begin failures++; $display("FAIL check 1"); end
    bready <= 0;
  endtask

  task automatic axi_read(input logic [7:0] a, output logic [31:0] d);
    araddr <= a; arvalid <= 1;
    do @(posedge clk); while (!arready);
    arvalid <= 0;
    repeat ($urandom % 3) @(posedge clk);
    rready <= 1;
    do @(posedge clk); while (!rvalid);
    d = rdata;
    checks++; if (rresp != 2'b00) begin failures++; $display("FAIL check 2"); end
    rready <= 0;
  endtask

  task automatic expect_rd(input logic [7:0] a, input logic [31:0] e);
    logic [31:0] d;
    axi_read(a, d);
    checks++;
    if (d !== e) begin failures++; $display("FAIL read %h: %h exp %h", a, d, e); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1; @(posedge clk);
    checks += 5;
    if (carrier_step != 9'd185) begin failures++; $display("FAIL check 3"); end
    if (mode != MODE_DSB) begin failures++; $display("FAIL check 4"); end
    if (lo_step != 9'd18) begin failures++; $display("FAIL check 5"); end
    if (dac_enable != 1'b1 || input_sel != 1'b0) begin failures++; $display("FAIL check 6"); end
    if (codec_start) begin failures++; $display("FAIL check 7"); end
    expect_rd(8'h00, 32'd185);
    expect_rd(8'h08, 32'd18);
    for (int i = 0; i < 40; i++) begin
      logic [8:0] s; s = 9'($urandom);
      axi_write(8'h00, 32'(s));
      checks++; if (carrier_step != s) begin failures++; $display("FAIL step out"); end
      expect_rd(8'h00, 32'(s));
    end
    axi_write(8'h04, 32'h1);
    checks++; if (mode != MODE_SSB) begin failures++; $display("FAIL check 8"); end
    expect_rd(8'h04, 32'h1);
    axi_write(8'h08, 32'h1ff);
    expect_rd(8'h08, 32'h1ff);
    // byte strobe: only byte 1 written -> step bit 8 changes, bits 7:0 kept
    axi_write(8'h00, 32'h0000_0055);
    axi_write(8'h00, 32'h0000_01AA, 4'b0010);
    expect_rd(8'h00, 32'h155);
    // codec start pulse with microphone select
    axi_write(8'h0C, 32'h3);
    repeat (2) @(posedge clk);
    checks += 2;
    if (start_pulses != 1) begin failures++; $display("FAIL start pulses %0d", start_pulses); end
    if (input_sel != 1'b1) begin failures++; $display("FAIL check 9"); end
    expect_rd(8'h0C, 32'h1);
    axi_write(8'h10, 32'h0);
    checks++; if (dac_enable != 1'b0) begin failures++; $display("FAIL check 10"); end
    expect_rd(8'h10, 32'h0);
    codec_done <= 1; codec_ack_error <= 1; codec_busy <= 0; @(posedge clk);
    expect_rd(8'h14, 32'h3);
    codec_done <= 0; codec_ack_error <= 0; codec_busy <= 1; @(posedge clk);
    expect_rd(8'h14, 32'h4);
    axi_write(8'h14, 32'hffff_ffff);   // read only
    expect_rd(8'h14, 32'h4);
    axi_write(8'h3C, 32'h1234);
    expect_rd(8'h3C, 32'h0);
    checks++; if (start_pulses != 1) begin failures++; $display("FAIL check 11"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
