// tb_hmp_status_reg: random set and clear pulses checked against a model
// of the two sticky flags, including set and clear in the same cycle.
module tb_hmp_status_reg;
  logic clk = 0, rst_n = 0, set_ovf = 0, set_adr = 0, clr = 0; logic [1:0] status, ms;
  int checks = 0, failures = 0;
  hmp_status_reg dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk); checks++; if (status !== 0) failures++;
    rst_n = 1; ms = 0;
    for (int i = 0; i < 2000; i++) begin
      set_ovf = ($urandom_range(0, 7) == 0); set_adr = ($urandom_range(0, 7) == 0); clr = ($urandom_range(0, 5) == 0);
      if (clr) ms = 0;
      if (set_ovf) ms[0] = 1;
      if (set_adr) ms[1] = 1;
      @(negedge clk);
      checks++; if (status !== ms) begin failures++; $display("FAIL %b want %b", status, ms); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
