// hmp_pkg: types and constants shared by the Hardware Multiplier Processor.
//
// The processor is controlled by the nine low host address bits: A1-A3 pick a
// register and A4-A8 pick a function, so every access both moves a data word
// and tells the processor what to do with it.  The register codes and the
// function word below follow the example address map of the processor
// (FE00-FE0E registers, FE1E-FE7E single precision multiply functions,
// FE90 double precision multiply, FF00-FF38 and FF80-FFF8 scale and round).
// The encoding of the function word itself is this design's own.
package hmp_pkg;

  // Register select code, latched address bits A3..A1.
  typedef enum logic [2:0] {
    REG_STAT_M1 = 3'd0,   // read: status then clear; write: M1
    REG_P4      = 3'd1,
    REG_P3      = 3'd2,
    REG_P2      = 3'd3,
    REG_P1      = 3'd4,
    REG_M4      = 3'd5,
    REG_M3      = 3'd6,
    REG_M2_STAT = 3'd7    // read: status (no clear); write: M2
  } reg_code_e;

  // Kind of function started by an access.
  typedef enum logic [1:0] {
    OP_NONE  = 2'd0,      // plain register transfer
    OP_MUL   = 2'd1,      // multiply, add or subtract to accumulator
    OP_SCALE = 2'd2       // scale by 2^N and round
  } op_e;

  // Function word delivered by the translation PROM for one address.
  typedef struct packed {
    logic              rd_ok;   // a read of this address is legal
    logic              wr_ok;   // a write of this address is legal
    op_e               op;
    logic              wide;    // MUL: double precision; SCALE: quad precision P
    logic              clr;     // MUL: clear accumulator first
    logic              sub;     // MUL: subtract product
    logic signed [5:0] n;       // SCALE: exponent N of 2^N
    logic        [6:0] count;   // serial clocks of the function
  } fn_t;

  // Register enables and read selection from the register select logic.
  typedef struct packed {
    logic [3:0] m_we;     // write M4..M1 (bit 3 = M4)
    logic [3:0] p_we;     // write P4..P1 (bit 3 = P4)
    logic [3:0] m_rd;     // read M4..M1
    logic [3:0] p_rd;     // read P4..P1
    logic       stat_rd;  // read status
    logic       stat_clr; // the status read also clears it
  } reg_sel_t;

  // Serial mux operand source.
  typedef enum logic [1:0] {
    SRC_ZERO  = 2'd0,
    SRC_SPROD = 2'd1,
    SRC_DPROD = 2'd2,
    SRC_ROUND = 2'd3
  } src_e;

  // Word returned by a scale function or by the read that follows it.
  typedef enum logic [1:0] {
    RES_REG = 2'd0,       // ordinary register read
    RES_P1  = 2'd1,       // single precision result / low word of double
    RES_P2  = 2'd2,       // high word of double precision result
    RES_ERR = 2'd3        // illegal read: returns zero
  } res_e;

  localparam int SP_W = 32;   // accumulator width of single precision (P2:P1)
  localparam int QP_W = 64;   // accumulator width of double precision (P4..P1)

endpackage
