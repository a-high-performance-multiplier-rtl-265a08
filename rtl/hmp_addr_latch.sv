// hmp_addr_latch: address latch of the processor's control section.
//
// Holds address bits A8..A1 and the read/write line of the host access being
// served, so that register selection, the translation PROM and the function
// control keep a stable address while the host bus moves on.  Loads on the
// clock edge where le is high, holds otherwise; clears to zero on reset.
// The latch over A1-A8 follows the control block diagram; latching the
// read/write line with it is this design's choice.
module hmp_addr_latch (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       le,
  input  logic [7:0] a_in,
  input  logic       rw_in,
  output logic [7:0] a_q,
  output logic       rw_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      rw_q <= 1'b1;
    end else if (le) begin
      a_q  <= a_in;
      rw_q <= rw_in;
    end
  end
endmodule
