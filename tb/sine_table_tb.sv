// Testbench for sine_table: every entry equals round(2047*sin(2*pi*i/512))
// computed here in real arithmetic, one clock after the address.
module sine_table_tb;
  logic clk = 0;
  logic [8:0] addr = '0;
  logic signed [11:0] data;
  int checks = 0, failures = 0;

  sine_table dut (.clk, .addr, .data);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int expect_at(int i);
    real v = 2047.0 * $sin(2.0 * 3.14159265358979 * i / 512.0);
    return (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  initial begin
    for (int k = 0; k < 1100; k++) begin
      int a = (k < 512) ? k : int'($urandom % 512);
      addr <= 9'(a);
      @(posedge clk); #1;
      checks++;
      if (int'(data) != expect_at(a)) begin
        failures++; $display("FAIL addr %0d data %0d exp %0d", a, data, expect_at(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
