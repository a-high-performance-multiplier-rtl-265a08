// tb_hmp_p_regs: random bus writes, serial shifts of the 32-bit window
// (P2:P1, P4:P3 untouched) and the 64-bit window (P4..P1), and low-bit
// clears, checked against a model every cycle, including the
// accumulator-out bit and the window sign bit.
module tb_hmp_p_regs;
  logic clk = 0, rst_n = 0, shift = 0, wide = 0, sin = 0, clr_low = 0, acc_out, win_msb;
  logic [3:0] we = 0; logic [15:0] wdata = 0; logic [4:0] clr_n = 0;
  logic [63:0] p, mp;
  int checks = 0, failures = 0;
  hmp_p_regs dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk); rst_n = 1; mp = 0;
    for (int i = 0; i < 5000; i++) begin
      shift = ($urandom_range(0, 1) == 0); wide = 1'($urandom); sin = 1'($urandom);
      clr_low = ($urandom_range(0, 15) == 0); clr_n = 5'($urandom);
      we = ($urandom_range(0, 5) == 0) ? 4'($urandom) : 4'h0; wdata = 16'($urandom);
      #1;
      checks++;
      if (acc_out !== mp[0] || win_msb !== (wide ? mp[63] : mp[31])) begin
        failures++; $display("FAIL serial outputs");
      end
      if (shift) begin
        if (wide) mp = {sin, mp[63:1]};
        else      mp = {mp[63:32], sin, mp[31:1]};
      end
      if (clr_low) for (int b = 0; b < 32; b++) if (b < clr_n) mp[b] = 0;
      for (int k = 0; k < 4; k++) if (we[k]) mp[16*k +: 16] = wdata;
      @(negedge clk);
      checks++;
      if (p !== mp) begin failures++; $display("FAIL %0d: %h want %h", i, p, mp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
