// Testbench for am_multiplier: default 12x16 -> 12-bit instance and the
// audio-scale (SHIFT=11, 16-bit out) instance against a real-arithmetic
// model: round(a*b/2^SHIFT) saturated, registered one clock.
module am_multiplier_tb;
  logic clk = 0;
  logic signed [15:0] a = '0;
  logic signed [11:0] b = '0;
  logic signed [11:0] p12;
  logic signed [15:0] p16;
  int checks = 0, failures = 0;

  am_multiplier dut (.clk, .a, .b, .p(p12));
  am_multiplier #(.A_W(16), .B_W(12), .OUT_W(16), .SHIFT(11)) dut16 (.clk, .a, .b, .p(p16));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic longint model(longint x, longint y, int sh, int w);
    longint q = $rtoi($floor(real'(x * y) / real'(longint'(1) << sh) + 0.5));
    longint mx = (longint'(1) << (w - 1)) - 1;
    if (q > mx) q = mx;
    if (q < -mx - 1) q = -mx - 1;
    return q;
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      case (i % 10)
        0: begin a <= 16'sh7fff; b <= 12'sd2047; end
        1: begin a <= -16'sh8000; b <= -12'sd2048; end
        2: begin a <= -16'sh8000; b <= 12'sd2047; end
        default: begin a <= 16'($urandom); b <= 12'($urandom); end
      endcase
      @(posedge clk); #1;
      checks += 2;
      if (longint'(p12) != model(a, b, 15, 12)) begin
        failures++; $display("FAIL 12: %0d*%0d -> %0d exp %0d", a, b, p12, model(a, b, 15, 12));
      end
      if (longint'(p16) != model(a, b, 11, 16)) begin
        failures++; $display("FAIL 16: %0d*%0d -> %0d exp %0d", a, b, p16, model(a, b, 11, 16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
