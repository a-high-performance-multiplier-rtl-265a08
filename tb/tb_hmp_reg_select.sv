// tb_hmp_reg_select: checks the register decode for all eight register
// codes in both directions against the address map: FE00 read-clear
// status / write M1, FE02-FE08 P4..P1, FE0A M4, FE0C M3, FE0E write M2 /
// read status.
module tb_hmp_reg_select;
  import hmp_pkg::*;
  logic [2:0] a_reg; logic rw; reg_sel_t sel, e;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  hmp_reg_select dut (.*);
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int byteoff = 0; byteoff < 16; byteoff += 2) begin
      for (int r = 0; r < 2; r++) begin
        a_reg = 3'(byteoff >> 1); rw = 1'(r); #1;
        e = '0;
        case (byteoff)
          0:  if (r) begin e.stat_rd = 1; e.stat_clr = 1; end else e.m_we = 4'b0001;
          2:  if (r) e.p_rd = 4'b1000; else e.p_we = 4'b1000;
          4:  if (r) e.p_rd = 4'b0100; else e.p_we = 4'b0100;
          6:  if (r) e.p_rd = 4'b0010; else e.p_we = 4'b0010;
          8:  if (r) e.p_rd = 4'b0001; else e.p_we = 4'b0001;
          10: if (r) e.m_rd = 4'b1000; else e.m_we = 4'b1000;
          12: if (r) e.m_rd = 4'b0100; else e.m_we = 4'b0100;
          14: if (r) e.stat_rd = 1;   else e.m_we = 4'b0010;
          default: ;
        endcase
        checks++;
        if (sel !== e) begin failures++; $display("FAIL FE%02h rw=%0d: %h want %h", byteoff, r, sel, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
