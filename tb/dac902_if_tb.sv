// Testbench for dac902_if: offset-binary coding one clock after the input,
// mid-scale and power-down while disabled or in reset, and the DAC clock
// being the inverted system clock.
module dac902_if_tb;
  logic clk = 0, rst_n = 0, enable = 0;
  logic signed [11:0] data = '0;
  logic [11:0] dac_d;
  logic dac_clk, dac_pd;
  int checks = 0, failures = 0;

  dac902_if dut (.clk, .rst_n, .enable, .data, .dac_d, .dac_clk, .dac_pd);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++; if (dac_d !== 12'h800 || dac_pd !== 1'b1) begin failures++; $display("FAIL reset"); end
    rst_n <= 1; enable <= 1;
    for (int i = 0; i < 1000; i++) begin
      logic signed [11:0] v;
      v = (i == 0) ? -12'sd2048 : (i == 1) ? 12'sd2047 : (i == 2) ? 12'sd0 : 12'($urandom);
      data <= v; enable <= (i % 50) != 49;
      @(posedge clk); #1;
      checks += 3;
      if (enable && (int'(dac_d) != int'(v) + 2048)) begin failures++; $display("FAIL %0d -> %h", v, dac_d); end
      if (!enable && dac_d !== 12'h800) begin failures++; $display("FAIL disabled value"); end
      if (dac_pd !== !enable) begin failures++; $display("FAIL pd"); end
      if (dac_clk !== ~clk) begin failures++; $display("FAIL dac_clk"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
