// tb_hmp_clock_counter: starts functions with random serial clock counts
// (including zero) and checks the busy time (count+6 for a multiply,
// count+7 for a scale), one load strobe in the first busy cycle, exactly
// count shift clocks numbered 0..count-1 right after the set-up cycles,
// one finish and one done strobe at the right places.
module tb_hmp_clock_counter;
  logic clk = 0, rst_n = 0, start = 0, is_scale = 0;
  logic [6:0] count = 0, bit_idx;
  logic busy, load, shift, finish, done;
  int checks = 0, failures = 0;
  hmp_clock_counter dut (.*);
  always #5 clk = ~clk;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int c, nb, ns, nl, nf, nd, first_shift, idx_ok, done_at, fin_at, post;
      c = (t < 2) ? t * 94 : $urandom_range(0, 94);
      @(negedge clk);
      start = 1; count = 7'(c); is_scale = 1'($urandom);
      post = is_scale ? 5 : 4;
      @(negedge clk);
      start = 0; count = 7'($urandom);
      nb = 0; ns = 0; nl = 0; nf = 0; nd = 0; first_shift = -1; idx_ok = 1; done_at = -1; fin_at = -1;
      while (busy) begin
        if (load) begin nl++; chk(nb == 0, "load in first cycle"); end
        if (shift) begin
          if (first_shift < 0) first_shift = nb;
          if (int'(bit_idx) != ns) idx_ok = 0;
          ns++;
        end
        if (finish) begin nf++; fin_at = nb; end
        if (done) begin nd++; done_at = nb; end
        nb++;
        @(negedge clk);
      end
      chk(nb == c + 2 + post, $sformatf("busy %0d want %0d", nb, c + 2 + post));
      chk(ns == c && idx_ok, $sformatf("shifts %0d want %0d", ns, c));
      chk(c == 0 || first_shift == 2, "shift after set-up");
      chk(nl == 1 && nf == 1 && nd == 1, "one load/finish/done");
      chk(done_at == nb - 1 && fin_at == c + 2, "done last, finish after shifts");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
