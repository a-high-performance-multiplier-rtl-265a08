// tb_hmp_overflow_detect: for every pair of 4-bit two's complement numbers
// feeds the sign bits of the operands and of the wrapped sum, and checks
// ovf against whether the true sum leaves -8..7; also that it stays low
// when msb is low.
module tb_hmp_overflow_detect;
  logic msb, a, b, s, ovf;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  hmp_overflow_detect dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int x = -8; x < 8; x++) for (int y = -8; y < 8; y++) begin
      logic [3:0] xs, ys, ss; bit e;
      xs = 4'(x); ys = 4'(y); ss = xs + ys;
      e = (x + y > 7) || (x + y < -8);
      msb = 1; a = xs[3]; b = ys[3]; s = ss[3]; #1;
      checks++; if (ovf !== e) begin failures++; $display("FAIL %0d+%0d", x, y); end
      msb = 0; #1;
      checks++; if (ovf !== 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
