// tb_hmp_serial_addsub: adds and subtracts random 32-bit words bit-serially,
// LSB first, with pauses between serial clocks, and compares the gathered
// result with b + a or b - a.
module tb_hmp_serial_addsub;
  logic clk = 0, rst_n = 0, init = 0, en = 0, sub = 0, a = 0, b = 0, s, a_eff;
  int checks = 0, failures = 0;
  hmp_serial_addsub dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] x, y, r, e;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      x = (i == 0) ? 32'hFFFF_FFFF : $urandom; y = (i == 1) ? 32'h0 : $urandom; sub = 1'($urandom);
      e = sub ? y - x : y + x;
      init = 1; @(negedge clk); init = 0;
      for (int k = 0; k < 32; k++) begin
        if ($urandom_range(0, 5) == 0) begin en = 0; @(negedge clk); end
        en = 1; a = x[k]; b = y[k]; #1;
        r[k] = s;
        checks++; if (a_eff !== (x[k] ^ sub)) failures++;
        @(negedge clk);
      end
      en = 0;
      checks++;
      if (r !== e) begin failures++; $display("FAIL %h %s %h = %h want %h", y, sub ? "-" : "+", x, r, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
