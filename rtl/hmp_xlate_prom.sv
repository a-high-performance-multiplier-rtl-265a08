// hmp_xlate_prom: translation PROM, 256 words addressed by A8..A1.
//
// Every processor address carries its own function.  This table turns the
// latched address into a function word (hmp_pkg::fn_t): which access
// directions are legal, which operation to run, its precision, the clear
// and subtract options, the scale exponent N and the number of serial
// clocks the clock counter must give.  Combinational (a ROM); it is written
// as the rule that fills it rather than as 256 listed words.
//
// Address fields (a[k-1] is host address bit Ak):
//   A8=0, A4=0  register transfer; A5/A6 must be 0 (A7 may be 1 on writes,
//               as in "FE8E write M2").
//   A8=0, A4=1  multiply: A5 clear accumulator, A6 subtract, A7 double
//               precision.  Legal only as a write of M2 (single precision,
//               A3..A1=7) or of M1 (double precision, A3..A1=0).
//               Serial clocks: 32 (single) or 64 (double).
//   A8=1        scale-and-round read.  A7=0: 32-bit P2:P1 times 2^N,
//               N = A6..A1 - 14 in -14..14, rounded to 16 bits.
//               A7=1: 64-bit P4..P1 times 2^N, N = A6..A1 - 30 in -30..30,
//               rounded to 32 bits.  Serial clocks: width - N.
// The field meanings come from the example address map; the clock counts
// come from the function execution time table (62.5 ns per clock).  Which
// addresses count as illegal is this design's choice.
module hmp_xlate_prom
  import hmp_pkg::*;
(
  input  logic [7:0] a,
  output fn_t        fn
);
  logic [5:0] code;
  logic [2:0] rsel;

  always_comb begin
    code = a[5:0];
    rsel = a[2:0];
    fn   = '0;
    if (a[7]) begin
      fn.op   = OP_SCALE;
      fn.wide = a[6];
      if (!a[6]) begin
        fn.rd_ok = (code <= 6'd28);
        fn.n     = 6'(signed'({1'b0, code}) - 7'sd14);
        fn.count = 7'(7'sd32 - 7'(fn.n));
      end else begin
        fn.rd_ok = (code <= 6'd60);
        fn.n     = 6'(signed'({1'b0, code}) - 7'sd30);
        fn.count = 7'(8'sd64 - 8'(fn.n));
      end
      if (!fn.rd_ok) begin
        fn.n     = '0;
        fn.count = '0;
      end
    end else if (a[3]) begin
      fn.op    = OP_MUL;
      fn.clr   = a[4];
      fn.sub   = a[5];
      fn.wide  = a[6];
      fn.wr_ok = a[6] ? (rsel == 3'd0) : (rsel == 3'd7);
      fn.count = a[6] ? 7'(QP_W) : 7'(SP_W);
    end else begin
      fn.op    = OP_NONE;
      fn.rd_ok = (a[6:4] == 3'b000);
      fn.wr_ok = (a[5:4] == 2'b00);
    end
  end
endmodule
