// hmp_serial_mux: operand selector of the serial adder.
//
// Operand a of the serial add-subtract is the single precision product bit
// (SPROD), the double precision product bit (DPROD), the round pulse or
// zero, as src selects; operand b is the accumulator out bit, forced to
// zero when the function clears the accumulator.  Combinational.  The four
// inputs follow the block diagram; splitting them over the adder's two
// inputs this way is this design's choice.
module hmp_serial_mux
  import hmp_pkg::*;
(
  input  src_e src,
  input  logic acc_zero,
  input  logic sprod,
  input  logic dprod,
  input  logic acc_out,
  input  logic round_pulse,
  output logic a_bit,
  output logic b_bit
);
  always_comb begin
    unique case (src)
      SRC_SPROD: a_bit = sprod;
      SRC_DPROD: a_bit = dprod;
      SRC_ROUND: a_bit = round_pulse;
      default:   a_bit = 1'b0;
    endcase
    b_bit = acc_zero ? 1'b0 : acc_out;
  end
endmodule
