// hmp_reg_select: register select logic.
//
// Decodes latched address bits A3..A1 and the read/write line into one-hot
// write enables of M4..M1 and P4..P1 and a one-hot read selection.  Codes
// follow the address map: 0 status read-and-clear (write: M1), 1..4 P4..P1,
// 5 M4, 6 M3, 7 status read (write: M2).  M2 and M1 are write-only, so
// their read selects (m_rd[1:0]) are always zero.  Combinational.
// Mapping code 0 writes to M1 follows the map entry FE90 "write M1";
// everything else is the map as printed.
module hmp_reg_select
  import hmp_pkg::*;
(
  input  logic [2:0] a_reg,
  input  logic       rw,      // 1 = read
  output reg_sel_t   sel
);
  always_comb begin
    sel = '0;
    unique case (reg_code_e'(a_reg))
      REG_STAT_M1: if (rw) begin sel.stat_rd = 1'b1; sel.stat_clr = 1'b1; end
                   else    sel.m_we[0] = 1'b1;
      REG_P4:      if (rw) sel.p_rd[3] = 1'b1; else sel.p_we[3] = 1'b1;
      REG_P3:      if (rw) sel.p_rd[2] = 1'b1; else sel.p_we[2] = 1'b1;
      REG_P2:      if (rw) sel.p_rd[1] = 1'b1; else sel.p_we[1] = 1'b1;
      REG_P1:      if (rw) sel.p_rd[0] = 1'b1; else sel.p_we[0] = 1'b1;
      REG_M4:      if (rw) sel.m_rd[3] = 1'b1; else sel.m_we[3] = 1'b1;
      REG_M3:      if (rw) sel.m_rd[2] = 1'b1; else sel.m_we[2] = 1'b1;
      REG_M2_STAT: if (rw) sel.stat_rd = 1'b1; else sel.m_we[1] = 1'b1;
      default: ;
    endcase
  end
endmodule
