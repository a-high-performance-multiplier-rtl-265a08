// hmp_p_regs: product / accumulator registers P4, P3, P2 and P1.
//
// Four 16-bit registers, P4:P3:P2:P1 forming one 64-bit accumulator with P1
// at the bottom.  The host reads and writes each word over the data bus.
// For serial arithmetic a window of them shifts right by one bit per serial
// clock: P2:P1 (wide=0, 32 bits) or P4..P1 (wide=1, 64 bits).  The bit
// leaving P1 bit 0 is the accumulator out; the serial result sin enters at
// the top of the window (P2 bit 15 or P4 bit 15), so after as many clocks
// as the window is wide the window holds the new result.  clr_low zeroes
// the clr_n lowest bits (the bits a left scale must fill with zeros).
// win_msb is the window's sign bit.  The shift paths into P4 and P2 follow
// the block diagram; the bus write has priority over a shift, and the
// low-bit clear is this design's own.
module hmp_p_regs (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  we,       // bit 3 = P4 ... bit 0 = P1
  input  logic [15:0] wdata,
  input  logic        shift,
  input  logic        wide,
  input  logic        sin,
  input  logic        clr_low,
  input  logic [4:0]  clr_n,
  output logic [63:0] p,
  output logic        acc_out,
  output logic        win_msb
);
  logic [63:0] nxt;
  logic [63:0] mask;

  always_comb begin
    nxt  = p;
    mask = ~((64'd1 << clr_n) - 64'd1);
    if (shift) begin
      if (wide) nxt = {sin, p[63:1]};
      else      nxt = {p[63:32], sin, p[31:1]};
    end
    if (clr_low) nxt = nxt & mask;
    for (int i = 0; i < 4; i++) if (we[i]) nxt[16*i +: 16] = wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else        p <= nxt;
  end

  assign acc_out = p[0];
  assign win_msb = wide ? p[63] : p[31];
endmodule
