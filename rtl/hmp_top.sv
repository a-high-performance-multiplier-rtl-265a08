// hmp_top: Hardware Multiplier Processor (HMP).
//
// A memory-mapped arithmetic unit that gives a 16-bit microprocessor fast
// 16x16 and 32x32 bit two's complement multiply-accumulate, and scaling by
// 2^N with rounding of the accumulated result.  The host drives everything
// with ordinary moves: the address of each access names both the register
// and the function (see hmp_xlate_prom), so a single write of the last
// operand word both delivers the data and starts the multiply, and a single
// read of a scale address returns the scaled, rounded result.
//
// Datapath (bit-serial, one bit per 16 MHz clock, LSB first):
//   M4:M3 multiplier, M2:M1 multiplicand -> serial/parallel multipliers
//   (SPROD 16x16 from M4,M2; DPROD 32x32 from M4:M3,M2:M1) -> serial mux
//   -> serial add/subtract with the accumulator out bit of P1 -> serial
//   result back into the top of P2 (32-bit accumulator P2:P1) or of P4
//   (64-bit accumulator P4..P1).  Overflow of the accumulation is caught at
//   the sign bit.  A scale by 2^N rotates the accumulator (width - N) clocks:
//   for N<0 a round pulse is added at bit -N-1 on the first pass and the
//   sign is held for the extra -N clocks (arithmetic shift right); for N>0
//   the N low bits are cleared at the end.  The result is the low 16 bits
//   (P1) of the scaled 32-bit accumulator or the low 32 bits (P2:P1) of the
//   scaled 64-bit one.
// Control: address comparator (A23..A9) -> board select; address latch
// (A8..A1); register select (A3..A1); translation PROM (A8..A1) -> function
// word and serial clock count; serial clock counter; data transfer logic.
//
// Bus (synchronous to clk, simplified 68000-style handshake): the host
// holds bus_as, bus_rw, bus_addr (A23..A1) and bus_wdata until it sees the
// one-cycle bus_dtack, which comes with bus_rdata; it then drops bus_as.
// Register transfers and multiply-starting writes are acknowledged
// (bus_dtack high) after the second rising clock edge that sees bus_as,
// and the multiply runs on while the host goes on.  While busy, M register
// transfers still pass at once; an access to P or status, or one that
// starts a function, is held off until the function ends.  Busy time: count+6 clocks for a multiply (38 single, 70 double precision),
// count+7 for a scale (count = 32-N or 64-N).
// The structure and the timing follow the original design; the bus handshake,
// the result word positions and the choice of M4/M2 for single precision
// are this design's own.
module hmp_top
  import hmp_pkg::*;
#(
  parameter logic [14:0] BOARD_BASE = 15'h7FFF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_as,
  input  logic        bus_rw,
  input  logic [23:1] bus_addr,
  input  logic [15:0] bus_wdata,
  output logic [15:0] bus_rdata,
  output logic        bus_dtack,
  output logic        board_sel,
  output logic        busy,
  output logic        holdoff,
  output logic [1:0]  status
);
  // ---------------- control section ----------------
  logic [7:0] a_q;
  logic       rw_q;
  fn_t        fn;
  reg_sel_t   sel;
  logic       latch_en, reg_en, start, adr_err, dtack;
  res_e       rd_res;
  logic       load, shift, finish, done;
  logic [6:0] bit_idx;

  hmp_addr_compare #(.BOARD_BASE(BOARD_BASE)) u_cmp (
    .a_hi(bus_addr[23:9]), .as_i(bus_as), .board_sel(board_sel));

  hmp_addr_latch u_latch (
    .clk, .rst_n, .le(latch_en), .a_in(bus_addr[8:1]), .rw_in(bus_rw),
    .a_q, .rw_q);

  hmp_xlate_prom u_prom (.a(a_q), .fn);

  hmp_reg_select u_rsel (.a_reg(a_q[2:0]), .rw(rw_q), .sel);

  hmp_transfer_logic u_xfer (
    .clk, .rst_n, .access(board_sel), .busy, .done, .rw(rw_q), .fn,
    .a_word(a_q), .latch_en, .reg_en, .start, .rd_res, .adr_err, .holdoff,
    .dtack);

  // Function being run, captured when it starts.
  fn_t run;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     run <= '0;
    else if (start) run <= fn;
  end

  hmp_clock_counter u_clk (
    .clk, .rst_n, .start, .is_scale(fn.op == OP_SCALE), .count(fn.count),
    .busy, .load, .shift, .bit_idx, .finish, .done);

  // ---------------- datapath ----------------
  logic [63:0] m, p;
  logic        acc_out, win_msb, sprod, dprod, a_bit, b_bit, s, a_eff, ovf;
  logic        is_mul, is_scale, hold_sign, round_pulse;
  logic [6:0]  width;
  src_e        src;

  always_comb begin
    is_mul      = (run.op == OP_MUL);
    is_scale    = (run.op == OP_SCALE);
    width       = run.wide ? 7'(QP_W) : 7'(SP_W);
    hold_sign   = is_scale && (bit_idx >= width);
    round_pulse = is_scale && run.n < 0 && (bit_idx == 7'(-run.n - 6'sd1));
    src         = is_mul ? (run.wide ? SRC_DPROD : SRC_SPROD) : SRC_ROUND;
  end

  hmp_m_regs u_m (
    .clk, .rst_n, .we(sel.m_we & {4{reg_en}}), .wdata(bus_wdata), .m);

  hmp_serial_mult #(.N(16)) u_smul (
    .clk, .rst_n, .load, .shift, .mcand(m[31:16]), .mplr(m[63:48]),
    .prod_bit(sprod));

  hmp_serial_mult #(.N(32)) u_dmul (
    .clk, .rst_n, .load, .shift, .mcand(m[31:0]), .mplr(m[63:32]),
    .prod_bit(dprod));

  hmp_serial_mux u_mux (
    .src, .acc_zero(is_mul && run.clr), .sprod, .dprod, .acc_out,
    .round_pulse, .a_bit, .b_bit);

  hmp_serial_addsub u_add (
    .clk, .rst_n, .init(load), .en(shift), .sub(is_mul && run.sub),
    .a(a_bit), .b(b_bit), .s, .a_eff);

  hmp_overflow_detect u_ovf (
    .msb(shift && bit_idx == width - 7'd1), .a(a_eff), .b(b_bit), .s, .ovf);

  hmp_p_regs u_p (
    .clk, .rst_n, .we(sel.p_we & {4{reg_en}}), .wdata(bus_wdata), .shift,
    .wide(run.wide), .sin(hold_sign ? win_msb : s),
    .clr_low(finish && is_scale && run.n > 0), .clr_n(5'(run.n)),
    .p, .acc_out, .win_msb);

  hmp_status_reg u_stat (
    .clk, .rst_n, .set_ovf(ovf), .set_adr(adr_err),
    .clr(sel.stat_clr && reg_en), .status);

  // ---------------- read data ----------------
  logic [15:0] rmux;
  always_comb begin
    rmux = '0;
    unique case (rd_res)
      RES_P1:  rmux = p[15:0];
      RES_P2:  rmux = p[31:16];
      RES_REG: begin
        if (sel.stat_rd) rmux = {14'b0, status};
        for (int i = 0; i < 4; i++) begin
          if (sel.p_rd[i]) rmux = p[16*i +: 16];
          if (sel.m_rd[i]) rmux = m[16*i +: 16];
        end
      end
      default: rmux = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_dtack <= 1'b0;
      bus_rdata <= '0;
    end else begin
      bus_dtack <= dtack;
      if (dtack) bus_rdata <= rmux;
    end
  end
endmodule
