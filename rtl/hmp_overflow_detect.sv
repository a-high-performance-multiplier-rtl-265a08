// hmp_overflow_detect: accumulation overflow detector.
//
// Watches the serial adder's operand bits a (after any inversion for
// subtraction) and b and its result bit s.  At the sign bit of the word
// (msb high) two operands of equal sign giving a result of the other sign
// mean the two's complement sum overflowed the accumulator: ovf is high
// for that clock.  Combinational.  Overflow detection on the serial result
// follows the block diagram; the sign rule is the standard one.
module hmp_overflow_detect (
  input  logic msb,
  input  logic a,
  input  logic b,
  input  logic s,
  output logic ovf
);
  always_comb ovf = msb && (a == b) && (s != a);
endmodule
