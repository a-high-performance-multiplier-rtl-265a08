// tb_hmp_transfer_logic: drives the bus sequencer with accesses and a
// stand-in for the clock counter (busy for a fixed time after start), and
// checks: a register write is acknowledged in the cycle after the latch
// with reg_en; a multiply write also starts; while busy, M register
// transfers pass at once but P, status and function accesses are held
// off until busy falls; an illegal access gives adr_err and zero data; a
// scale read starts, waits for done and answers with P2 (32-bit result)
// or P1 (16-bit result); the read of the next word then answers with P1
// without a start; served blocks a second acknowledge until the strobe
// drops.
module tb_hmp_transfer_logic;
  import hmp_pkg::*;
  logic clk = 0, rst_n = 0, access = 0, busy = 0, done, rw = 1;
  fn_t fn = '0; logic [7:0] a_word = 0;
  logic latch_en, reg_en, start, adr_err, holdoff, dtack; res_e rd_res;
  int checks = 0, failures = 0, bcnt = 0, BUSY_LEN = 20;
  hmp_transfer_logic dut (.*);
  always #5 clk = ~clk;
  // stand-in for the clock counter
  always @(posedge clk) begin
    if (start) begin busy <= 1; bcnt <= BUSY_LEN - 1; end
    else if (busy) begin
      if (bcnt == 0) busy <= 0;
      bcnt <= bcnt - 1;
    end
  end
  assign done = busy && bcnt == 0;

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // one access; the "latch" is modelled here: a_word/rw/fn follow latch_en
  task automatic acc(input bit r, input logic [7:0] a, input fn_t f,
                     output int cyc, output res_e res, output bit st, output bit re, output bit ae);
    @(negedge clk);
    access = 1; cyc = 0; st = 0; re = 0; ae = 0;
    forever begin
      #1;
      if (latch_en) begin a_word <= a; rw <= r; fn <= f; end
      if (start) st = 1;
      if (reg_en) re = 1;
      if (adr_err) ae = 1;
      if (dtack) begin res = rd_res; break; end
      @(negedge clk); cyc++;
      if (cyc > 500) break;
    end
    @(negedge clk);
    chk(!dtack, "single dtack while strobe held");
    access = 0;
    @(negedge clk);
  endtask

  fn_t f_reg, f_mul, f_sc_qp, f_sc_dp;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int cyc; res_e res; bit st, re, ae;
    f_reg = '0; f_reg.rd_ok = 1; f_reg.wr_ok = 1;
    f_mul = '0; f_mul.wr_ok = 1; f_mul.op = OP_MUL; f_mul.count = 32;
    f_sc_qp = '0; f_sc_qp.rd_ok = 1; f_sc_qp.op = OP_SCALE; f_sc_qp.wide = 1;
    f_sc_dp = f_sc_qp; f_sc_dp.wide = 0;
    repeat (2) @(negedge clk); rst_n = 1;

    acc(0, 8'h05, f_reg, cyc, res, st, re, ae);
    chk(cyc == 1 && re && !st && !ae, $sformatf("register write cyc=%0d", cyc));
    acc(1, 8'h01, f_reg, cyc, res, st, re, ae);
    chk(cyc == 1 && re && res == RES_REG, "register read");
    acc(0, 8'h0F, f_mul, cyc, res, st, re, ae);
    chk(cyc == 1 && re && st, "multiply write: no wait, start");
    chk(busy, "host runs in parallel");
    acc(0, 8'h05, f_reg, cyc, res, st, re, ae);
    chk(cyc == 1 && re && busy, "M4 write passes a busy processor");
    acc(1, 8'h06, f_reg, cyc, res, st, re, ae);
    chk(cyc == 1 && re && busy, "M3 read passes a busy processor");
    acc(0, 8'h01, f_reg, cyc, res, st, re, ae);
    chk(cyc >= 5 && re && !busy, $sformatf("P4 write held off %0d cycles", cyc));
    acc(0, 8'h0F, f_mul, cyc, res, st, re, ae);
    acc(0, 8'h0F, f_mul, cyc, res, st, re, ae);
    chk(cyc >= BUSY_LEN - 3 && re && st, $sformatf("second multiply held off %0d cycles", cyc));
    acc(1, 8'h07, f_reg, cyc, res, st, re, ae);
    chk(cyc >= BUSY_LEN - 3 && re, $sformatf("status read held off %0d cycles", cyc));
    acc(1, 8'h0F, f_mul, cyc, res, st, re, ae);
    chk(ae && !re && !st && res == RES_ERR, "illegal read");
    acc(0, 8'hDE, f_sc_qp, cyc, res, st, re, ae);
    chk(ae && !st, "illegal write of scale address");
    acc(1, 8'hDE, f_sc_qp, cyc, res, st, re, ae);
    chk(st && !re && res == RES_P2 && cyc == BUSY_LEN + 1, $sformatf("Q.P. scale read cyc=%0d", cyc));
    acc(1, 8'hDF, f_sc_qp, cyc, res, st, re, ae);
    chk(!st && !re && res == RES_P1 && cyc == 1, "second word");
    acc(1, 8'hE0, f_sc_qp, cyc, res, st, re, ae);
    chk(st && res == RES_P2, "third read is a new function");
    acc(1, 8'h05, f_reg, cyc, res, st, re, ae);
    acc(1, 8'hE1, f_sc_qp, cyc, res, st, re, ae);
    chk(st && res == RES_P2, "second word only right after");
    acc(1, 8'h8E, f_sc_dp, cyc, res, st, re, ae);
    chk(st && res == RES_P1, "D.P. scale read gives P1");
    acc(1, 8'h8F, f_sc_dp, cyc, res, st, re, ae);
    chk(st && res == RES_P1, "no second word after 16-bit result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
