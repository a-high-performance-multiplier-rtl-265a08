// hmp_addr_compare: board select comparator.
//
// Compares host address bits A23..A9 with the board's base address and
// raises board_sel while the access strobe is active and they match.  The
// processor thus owns one 512-byte window; inside it A8..A1 carry register
// and function.  Combinational.  The comparator over A9-A23 follows the
// control block diagram; the default base 7FFF (host addresses FFFE00-FFFFFF,
// the 24-bit form of the short addresses FE00-FFFE of the address map) is
// this design's choice.
module hmp_addr_compare #(
  parameter logic [14:0] BOARD_BASE = 15'h7FFF
) (
  input  logic [14:0] a_hi,
  input  logic        as_i,
  output logic        board_sel
);
  always_comb board_sel = as_i && (a_hi == BOARD_BASE);
endmodule
