// hmp_m_regs: operand registers M4, M3, M2 and M1.
//
// Four 16-bit registers loaded from the data bus and read back over it.
// M4:M3 hold the multiplier and M2:M1 the multiplicand; a single precision
// multiply uses M4 and M2, a double precision one M4:M3 and M2:M1.  Each
// word is written on the clock edge where its enable is high; all clear on
// reset.  Output m is M4:M3:M2:M1, M4 in the top 16 bits.  The four
// registers and their multiplier/multiplicand roles follow the block
// diagram; using the high words M4 and M2 for single precision is this
// design's choice.
module hmp_m_regs (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  we,      // bit 3 = M4 ... bit 0 = M1
  input  logic [15:0] wdata,
  output logic [63:0] m
);
  logic [15:0] r [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) r[i] <= '0;
    end else begin
      for (int i = 0; i < 4; i++) if (we[i]) r[i] <= wdata;
    end
  end

  assign m = {r[3], r[2], r[1], r[0]};
endmodule
