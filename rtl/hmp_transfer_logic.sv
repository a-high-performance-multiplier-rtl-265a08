// hmp_transfer_logic: data transfer logic, the processor's bus sequencer.
//
// Serves one host access at a time and answers it with a one-cycle dtack.
//   * Every access first loads the address latch (latch_en); in the next
//     cycle the latched address and the PROM's function word decide.
//   * While a function is running (busy), an access that would disturb it
//     is held off (holdoff high, no dtack) until busy falls: one that
//     starts a function, or reads or writes P or the status register.
//     Transfers of the M registers go through at once, since the running
//     multiply works on its own copies of the operands; so the host keeps
//     loading the next operands in parallel with the processor.
//   * Then:
//       - illegal direction for that address: adr_err pulse, dtack, read
//         data zero, nothing written;
//       - register transfer, possibly with a multiply: reg_en and dtack at
//         once (no wait state), start of the multiply in the same cycle;
//       - scale-and-round read: start, then wait for done and give dtack
//         with the result word (P1 for a 16-bit result, P2 for the high word
//         of a 32-bit result);
//       - the read of the next word address right after a 32-bit result
//         returns its low word P1 without starting anything, so that a
//         host long-word read fetches the whole double precision result.
//   * served stays set from dtack until the host drops its strobe.
// Hold-off, no-wait-state transfers and addressing error detection follow
// the original design.  Letting M transfers pass a busy processor, and the
// second word of a 32-bit result, are this design's reading of its
// no-wait-state operand writes and of its benchmark's long-word read.
module hmp_transfer_logic
  import hmp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       access,    // strobe of an access to this board
  input  logic       busy,
  input  logic       done,
  input  logic       rw,        // latched
  input  fn_t        fn,        // for the latched address
  input  logic [7:0] a_word,    // latched A8..A1
  output logic       latch_en,
  output logic       reg_en,
  output logic       start,
  output res_e       rd_res,
  output logic       adr_err,
  output logic       holdoff,
  output logic       dtack
);
  typedef enum logic [1:0] {T_IDLE, T_DECODE, T_HOLD, T_WAIT} tstate_e;
  tstate_e    st;
  logic       served;
  logic       lowpend;     // low word of a 32-bit result still to be read
  logic [7:0] prev_a;
  logic       legal, second, m_xfer, conflict;

  always_comb begin
    legal    = rw ? fn.rd_ok : fn.wr_ok;
    second   = rw && lowpend && (a_word == prev_a + 8'd1);
    // plain transfer of an M register: reads of M4/M3 (codes 5, 6), writes
    // of M1/M4/M3/M2 (codes 0, 5, 6, 7)
    m_xfer   = legal && (fn.op == OP_NONE) &&
               (rw ? (a_word[2:0] == 3'd5 || a_word[2:0] == 3'd6)
                   : (a_word[2:0] == 3'd0 || a_word[2:0] >= 3'd5));
    conflict = busy && !m_xfer;
    latch_en = 1'b0;
    reg_en   = 1'b0;
    start    = 1'b0;
    rd_res   = RES_REG;
    adr_err  = 1'b0;
    dtack    = 1'b0;
    holdoff  = (st == T_HOLD) || (st == T_DECODE && conflict);
    unique case (st)
      T_IDLE:   latch_en = access && !served;
      T_DECODE: begin
        if (conflict) begin
          // wait in T_HOLD
        end else if (second) begin
          rd_res = RES_P1;
          dtack  = 1'b1;
        end else if (!legal) begin
          adr_err = 1'b1;
          rd_res  = RES_ERR;
          dtack   = 1'b1;
        end else if (fn.op == OP_SCALE) begin
          start = 1'b1;
        end else begin
          reg_en = 1'b1;
          dtack  = 1'b1;
          start  = (fn.op == OP_MUL);
        end
      end
      T_WAIT: if (done) begin
        dtack  = 1'b1;
        rd_res = fn.wide ? RES_P2 : RES_P1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= T_IDLE;
      served  <= 1'b0;
      lowpend <= 1'b0;
      prev_a  <= '0;
    end else begin
      if (!access) served <= 1'b0;
      if (dtack)   served <= 1'b1;
      unique case (st)
        T_IDLE:   if (latch_en) st <= T_DECODE;
        T_DECODE: begin
          if (conflict)             st <= T_HOLD;
          else if (start && !dtack) st <= T_WAIT;
          else begin
            st      <= T_IDLE;
            lowpend <= 1'b0;
          end
        end
        T_HOLD: if (!busy) st <= T_DECODE;
        T_WAIT: if (done) begin
          st      <= T_IDLE;
          lowpend <= fn.wide;
          prev_a  <= a_word;
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  // A function is only started, and P or status only touched, while the
  // processor is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> !busy);
  a_reg_idle:   assert property (@(posedge clk) disable iff (!rst_n)
                                 (reg_en && busy) |-> m_xfer);
endmodule
