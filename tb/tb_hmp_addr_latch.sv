// tb_hmp_addr_latch: checks the address latch loads A8..A1 and read/write
// only when enabled and holds them otherwise, against a model, for random
// stimulus, and that reset clears it.
module tb_hmp_addr_latch;
  logic clk = 0, rst_n = 0, le = 0, rw_in = 0, rw_q;
  logic [7:0] a_in = 0, a_q;
  logic [7:0] ma; logic mrw;
  int checks = 0, failures = 0;
  hmp_addr_latch dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk);
    checks++; if (a_q !== 8'h0 || rw_q !== 1'b1) failures++;
    rst_n = 1; ma = 0; mrw = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      le = ($urandom_range(0, 2) == 0); a_in = 8'($urandom); rw_in = 1'($urandom);
      if (le) begin ma = a_in; mrw = rw_in; end
      @(negedge clk);
      le = 0; a_in = 8'($urandom); rw_in = 1'($urandom);
      checks++;
      if (a_q !== ma || rw_q !== mrw) begin
        failures++; $display("FAIL %0d: %h/%b want %h/%b", i, a_q, rw_q, ma, mrw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
