// tb_hmp_m_regs: random writes to M4..M1, single and several at once,
// checked word by word against a model after every cycle.
module tb_hmp_m_regs;
  logic clk = 0, rst_n = 0; logic [3:0] we = 0; logic [15:0] wdata = 0; logic [63:0] m, mm;
  int checks = 0, failures = 0;
  hmp_m_regs dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk); checks++; if (m !== 0) failures++;
    rst_n = 1; mm = 0;
    for (int i = 0; i < 2000; i++) begin
      we = 4'($urandom); wdata = 16'($urandom);
      for (int k = 0; k < 4; k++) if (we[k]) mm[16*k +: 16] = wdata;
      @(negedge clk);
      checks++;
      if (m !== mm) begin failures++; $display("FAIL %h want %h", m, mm); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
