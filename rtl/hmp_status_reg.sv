// hmp_status_reg: status register.
//
// Two sticky error flags: bit 0 overflow of an accumulation, bit 1
// addressing error (an access the address map does not allow).  Each is set
// by a one-cycle pulse and stays set until a read-and-clear of the status
// register (clr); a set in the same cycle as the clear wins.  Reads return
// {14'b0, status}.  Errors feeding a status register that a read of FE00
// clears follow the original design; the bit positions are this design's choice.
module hmp_status_reg (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       set_ovf,
  input  logic       set_adr,
  input  logic       clr,
  output logic [1:0] status
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) status <= '0;
    else begin
      if (clr) status <= '0;
      if (set_ovf) status[0] <= 1'b1;
      if (set_adr) status[1] <= 1'b1;
    end
  end
endmodule
