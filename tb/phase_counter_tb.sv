// Testbench for phase_counter: the counter advances by step modulo 512 on
// enabled clocks only, resets to 0, and the resulting wrap rate equals
// 50e6*step/512 (checked as wraps per 512 clocks == step).
module phase_counter_tb;
  logic clk = 0, rst_n = 0, en = 0;
  logic [8:0] step = '0, phase;
  int checks = 0, failures = 0;
  int unsigned model;
  int step_list [4] = '{1, 37, 128, 185};

  phase_counter dut (.clk, .rst_n, .en, .step, .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic [8:0] exp, input string what);
    checks++;
    if (phase !== exp) begin failures++; $display("FAIL %s: phase=%0d exp=%0d", what, phase, exp); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1; @(posedge clk); #1 chk(0, "reset");
    model = 0;
    // random steps and enables
    for (int i = 0; i < 2000; i++) begin
      step <= 9'($urandom); en <= ($urandom % 4) != 0;
      @(posedge clk); #1;
      if (en) model = (model + step) % 512;
      chk(9'(model), "random");
    end
    // frequency: count wraps over 512 clocks for several steps
    foreach (step_list[k]) begin
      int wraps; logic [8:0] prev;
      wraps = 0;
      step <= step_list[k]; en <= 1; @(posedge clk); #1;
      prev = phase;
      for (int c = 0; c < 512; c++) begin
        @(posedge clk); #1;
        if (phase < prev) wraps++;
        prev = phase;
      end
      checks++;
      if (wraps != step_list[k]) begin
        failures++; $display("FAIL freq step=%0d wraps=%0d", step_list[k], wraps);
      end else $display("step %0d -> %0d Hz", step_list[k], 64'(50_000_000) * step_list[k] / 512);
    end
    // synchronous reset
    rst_n <= 0; @(posedge clk); #1 chk(0, "reset2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
