// tb_hmp_xlate_prom: checks the translation PROM at the addresses of the
// example address map (each multiply function, the scale addresses at
// both ends and at 2^0), the execution times those entries give at 62.5 ns
// per clock (busy = count+6 or count+7 clocks), and every one of the 256
// words against the field rules worked out from the map.
module tb_hmp_xlate_prom;
  import hmp_pkg::*;
  logic [7:0] a; fn_t fn;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  hmp_xlate_prom dut (.*);

  task automatic look(input logic [15:0] addr);
    a = addr[8:1]; #1;
  endtask
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  // time in ns of a function whose address is addr
  function automatic int ns_of(input fn_t f);
    return (int'(f.count) + (f.op == OP_SCALE ? 7 : 6)) * 625 / 10;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    look(16'hFE1E); chk(fn.op == OP_MUL && !fn.wide && !fn.clr && !fn.sub && fn.wr_ok && !fn.rd_ok, "FE1E");
    look(16'hFE3E); chk(fn.op == OP_MUL && fn.clr && !fn.sub && fn.wr_ok, "FE3E");
    look(16'hFE5E); chk(fn.op == OP_MUL && !fn.clr && fn.sub && fn.wr_ok, "FE5E");
    look(16'hFE7E); chk(fn.op == OP_MUL && fn.clr && fn.sub && fn.wr_ok, "FE7E");
    look(16'hFE8E); chk(fn.op == OP_NONE && fn.wr_ok, "FE8E");
    look(16'hFE90); chk(fn.op == OP_MUL && fn.wide && !fn.clr && !fn.sub && fn.wr_ok, "FE90");
    look(16'hFE10); chk(!fn.wr_ok && !fn.rd_ok, "FE10 illegal");
    look(16'hFE1E); chk(ns_of(fn) == 2375, "S.P. multiply 2.38 us");
    look(16'hFE90); chk(ns_of(fn) == 4375, "D.P. multiply 4.38 us");
    look(16'hFF00); chk(fn.op == OP_SCALE && !fn.wide && fn.n == -14 && fn.rd_ok && ns_of(fn) == 3312, "FF00 3.31 us");
    look(16'hFF1A); chk(fn.n == -1, "FF1A");
    look(16'hFF1C); chk(fn.n == 0 && ns_of(fn) == 2437, "FF1C 2.44 us");
    look(16'hFF1E); chk(fn.n == 1, "FF1E");
    look(16'hFF38); chk(fn.n == 14 && ns_of(fn) == 1562, "FF38 1.56 us");
    look(16'hFF3A); chk(!fn.rd_ok && !fn.wr_ok, "FF3A illegal");
    look(16'hFF80); chk(fn.op == OP_SCALE && fn.wide && fn.n == -30 && ns_of(fn) == 6312, "FF80 6.31 us");
    look(16'hFFBA); chk(fn.n == -1, "FFBA");
    look(16'hFFBC); chk(fn.n == 0 && ns_of(fn) == 4437, "FFBC 4.44 us");
    look(16'hFFBE); chk(fn.n == 1, "FFBE");
    look(16'hFFF8); chk(fn.n == 30 && ns_of(fn) == 2562, "FFF8 2.56 us");
    look(16'hFFFA); chk(!fn.rd_ok, "FFFA illegal");
    look(16'hFE00); chk(fn.rd_ok && fn.wr_ok && fn.op == OP_NONE, "FE00");
    look(16'hFE0E); chk(fn.rd_ok && fn.wr_ok && fn.op == OP_NONE, "FE0E");
    for (int i = 0; i < 256; i++) begin
      int w, nn; bit ok;
      a = 8'(i); #1;
      if (i >= 128) begin
        w  = (i >= 192) ? 64 : 32;
        nn = (i % 64) - (w == 64 ? 30 : 14);
        ok = (w == 64) ? (i % 64) <= 60 : (i % 64) <= 28;
        chk(fn.op == OP_SCALE && !fn.wr_ok && fn.rd_ok == ok &&
            (!ok || (int'(fn.n) == nn && int'(fn.count) == w - nn)), $sformatf("scale %0d", i));
      end else if (i & 8) begin
        chk(fn.op == OP_MUL && !fn.rd_ok && fn.clr == ((i >> 4) & 1) && fn.sub == ((i >> 5) & 1) &&
            fn.wr_ok == ((i & 64) ? (i % 8) == 0 : (i % 8) == 7) &&
            int'(fn.count) == ((i & 64) ? 64 : 32), $sformatf("mul %0d", i));
      end else begin
        chk(fn.op == OP_NONE && fn.rd_ok == ((i & 8'h70) == 0) && fn.wr_ok == ((i & 8'h30) == 0),
            $sformatf("reg %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
