// hmp_serial_addsub: bit-serial adder / subtractor.
//
// Adds (sub=0) or subtracts (sub=1) operand a to or from operand b, one bit
// per serial clock, least significant bit first: s = b + a or b - a.
// Subtraction inverts a and starts with a carry of one.  init, given before
// the first bit of a word, sets the carry flip-flop to sub; each clock with
// en high moves the carry out into it.  s and a_eff (a after inversion)
// are combinational from the present bits and carry.  The serial
// add-subtract follows the block diagram; the carry handling is the
// standard one.
module hmp_serial_addsub (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic en,
  input  logic sub,
  input  logic a,
  input  logic b,
  output logic s,
  output logic a_eff
);
  logic c;

  always_comb begin
    a_eff = a ^ sub;
    s     = a_eff ^ b ^ c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    c <= 1'b0;
    else if (init) c <= sub;
    else if (en)   c <= (a_eff & b) | (a_eff & c) | (b & c);
  end
endmodule
