// hmp_serial_mult: two's complement serial/parallel multiplier.
//
// The multiplicand is held in parallel, the multiplier is shifted in one
// bit per serial clock, least significant bit first, and the 2N-bit product
// leaves one bit per serial clock, least significant bit first.  On load
// both operands are captured and the partial sum cleared.  On each of the
// next 2N shift clocks prod_bit is product bit 0, 1, ... 2N-1: it is bit 0
// of partial sum + (multiplier bit) x multiplicand, the multiplicand being
// subtracted for the multiplier's sign bit, and the partial sum then moves
// right one place.  After N clocks the multiplier is used up and the upper
// half of the product drains out.  The processor uses one with N=16 for the
// single precision product (SPROD) and one with N=32 for the double
// precision product (DPROD).  That the multiply is done serially by
// serial/parallel multiplier parts follows the original design; this array-free
// add-and-shift form is the simplest circuit that does the same.
module hmp_serial_mult #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [N-1:0] mcand,
  input  logic [N-1:0] mplr,
  output logic         prod_bit
);
  localparam int unsigned CW = $clog2(2*N + 1);

  logic signed [N+1:0] acc, term, sum;
  logic        [N-1:0] x, y;
  logic        [CW-1:0] cnt;

  always_comb begin
    term = '0;
    if (cnt < CW'(N) && y[0]) begin
      if (cnt == CW'(N - 1)) term = -(N+2)'(signed'(x));
      else                   term =  (N+2)'(signed'(x));
    end
    sum      = acc + term;
    prod_bit = sum[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      x   <= '0;
      y   <= '0;
      cnt <= '0;
    end else if (load) begin
      acc <= '0;
      x   <= mcand;
      y   <= mplr;
      cnt <= '0;
    end else if (shift) begin
      acc <= sum >>> 1;
      y   <= y >> 1;
      cnt <= cnt + CW'(1);
    end
  end
endmodule
