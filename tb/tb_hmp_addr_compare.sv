// tb_hmp_addr_compare: checks board select for the default base (host
// addresses FFFE00-FFFFFF) and an overridden one, with the strobe on and
// off, for addresses just inside, just outside and at random.
module tb_hmp_addr_compare;
  logic [14:0] a_hi; logic as_i, sel_d, sel_o;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  hmp_addr_compare dut_d (.a_hi, .as_i, .board_sel(sel_d));
  hmp_addr_compare #(.BOARD_BASE(15'h0123)) dut_o (.a_hi, .as_i, .board_sel(sel_o));
  task automatic chk(input logic [23:0] addr, input logic s);
    logic ed, eo;
    a_hi = addr[23:9]; as_i = s; #1;
    ed = s && (addr >= 24'hFFFE00);
    eo = s && (addr >= 24'h024600) && (addr <= 24'h0247FF);
    checks++;
    if (sel_d !== ed || sel_o !== eo) begin
      failures++; $display("FAIL %h as=%b: %b %b want %b %b", addr, s, sel_d, sel_o, ed, eo);
    end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    chk(24'hFFFE00, 1); chk(24'hFFFFFE, 1); chk(24'hFFFDFE, 1); chk(24'hFFFE06, 0);
    chk(24'h024600, 1); chk(24'h0247FE, 1); chk(24'h024800, 1); chk(24'h0245FE, 1);
    for (int i = 0; i < 2000; i++) chk(24'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
