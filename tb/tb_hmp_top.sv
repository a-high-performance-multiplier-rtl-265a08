// tb_hmp_top: end-to-end test of the Hardware Multiplier Processor.
//
// Acts as the host: drives the bus handshake with whole word accesses to
// the short addresses FE00-FFFE (host addresses FFFE00-FFFFFF) and checks
// every result against a model of the accumulator kept in this testbench.
// It runs directed cases for each function of the address map, the
// benchmark A11 = B11*C11 + B12*C21 + B13*C31 + K with the host's move
// sequence, then random mixes of all functions.  Per function it checks
// the busy time (count+6 clocks for a multiply, count+7 for a scale), and
// it counts how often each mechanism happened: single/double precision
// multiply with add, subtract and clear, scale with right shift and round,
// by 2^0 and with left shift, both widths, accumulation overflow,
// addressing error, hold-off of the host while busy, the host running in
// parallel with a multiply, the second word of a 32-bit result and the
// read-and-clear of the status register.  A mechanism that never happened
// counts as a failure.  Runs the top at its default parameters.
module tb_hmp_top;
  import hmp_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        bus_as = 0, bus_rw = 1;
  logic [23:1] bus_addr = '0;
  logic [15:0] bus_wdata = '0;
  logic [15:0] bus_rdata;
  logic        bus_dtack, board_sel, busy, holdoff;
  logic [1:0]  status;

  hmp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // mechanism counters
  typedef enum int {
    MC_SP_ADD, MC_SP_SUB, MC_SP_CLR, MC_DP_ADD, MC_DP_SUB, MC_DP_CLR,
    MC_SC_RIGHT, MC_SC_ZERO, MC_SC_LEFT, MC_SC_DP, MC_SC_QP, MC_OVF,
    MC_ADRERR, MC_HOLDOFF, MC_PARALLEL, MC_SECOND, MC_STATCLR, MC_NUM
  } mech_e;
  int mech [MC_NUM];
  string mech_name [MC_NUM] = '{"sp_add", "sp_sub", "sp_clear", "dp_add",
    "dp_sub", "dp_clear", "scale_right_round", "scale_zero", "scale_left",
    "scale_32", "scale_64", "overflow", "address_error", "holdoff",
    "parallel", "second_word", "status_clear"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // busy length monitor
  int busy_len = 0, last_busy_len = 0;
  always @(posedge clk) begin
    if (busy) busy_len <= busy_len + 1;
    else if (busy_len != 0) begin
      last_busy_len <= busy_len;
      busy_len      <= 0;
    end
    if (holdoff && rst_n) mech[MC_HOLDOFF]++;
  end

  // ---- model ----
  logic [63:0] mp;            // P4..P1
  logic [63:0] mm;            // M4..M1
  logic [1:0]  mstat;
  logic [15:0] rd;
  int          cyc;

  task automatic access(input bit rw, input logic [15:0] a,
                        input logic [15:0] wd, output logic [15:0] r,
                        output int n);
    logic [23:0] full;
    full = {8'hFF, a};
    @(negedge clk);
    bus_as = 1; bus_rw = rw; bus_addr = full[23:1]; bus_wdata = wd;
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!bus_dtack);
    r = bus_rdata;
    bus_as = 0; bus_rw = 1;
  endtask

  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    logic [15:0] r;
    access(0, a, d, r, cyc);
  endtask

  task automatic rdw(input logic [15:0] a, output logic [15:0] d);
    access(1, a, 16'h0, d, cyc);
  endtask

  task automatic wait_idle();
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  // model of a multiply; the write of M2/M1 is done by the caller
  task automatic model_mul(input bit dp, input bit clr, input bit sub);
    logic signed [65:0] acc, prd, res;
    if (!dp) begin
      acc = clr ? '0 : 66'(signed'(mp[31:0]));
      prd = 66'(signed'(mm[63:48]) * signed'(mm[31:16]));
      res = sub ? acc - prd : acc + prd;
      if (res > 66'sh7FFFFFFF || res < -66'sh80000000) begin
        mstat[0] = 1;
        mech[MC_OVF]++;
      end
      mp[31:0] = res[31:0];
    end else begin
      acc = clr ? '0 : 66'(signed'(mp));
      prd = 66'(signed'(mm[63:32]) * signed'(mm[31:0]));
      res = sub ? acc - prd : acc + prd;
      if (res > 66'sh7FFFFFFFFFFFFFFF || res < -66'sh8000000000000000) begin
        mstat[0] = 1;
        mech[MC_OVF]++;
      end
      mp = res[63:0];
    end
    if (clr) mech[dp ? MC_DP_CLR : MC_SP_CLR]++;
    else if (sub) mech[dp ? MC_DP_SUB : MC_SP_SUB]++;
    else mech[dp ? MC_DP_ADD : MC_SP_ADD]++;
  endtask

  // full multiply: operands, function write, busy time check
  task automatic do_mul(input bit dp, input bit clr, input bit sub,
                        input logic [31:0] a, input logic [31:0] b);
    logic [15:0] fa;
    fa = 16'h0000 | (16'(clr) << 5) | (16'(sub) << 6);
    if (!dp) begin
      wr(16'hFE0A, a[15:0]);                 // M4
      wr(16'hFE1E | fa, b[15:0]);            // M2 + function
      mm[63:48] = a[15:0]; mm[31:16] = b[15:0];
    end else begin
      wr(16'hFE0A, a[31:16]);                // M4
      wr(16'hFE0C, a[15:0]);                 // M3
      wr(16'hFE8E, b[31:16]);                // M2
      wr(16'hFE90 | fa, b[15:0]);            // M1 + function
      mm = {a, b};
    end
    if (busy) mech[MC_PARALLEL]++;
    model_mul(dp, clr, sub);
    wait_idle();
    check(last_busy_len == (dp ? 70 : 38),
          $sformatf("multiply busy %0d clocks", last_busy_len));
  endtask

  // scale and round, check result word(s), P and busy time
  task automatic do_scale(input bit qp, input int n);
    logic [15:0] a, r1, r2;
    int          w, k;
    logic signed [63:0] v, t;
    w = qp ? 64 : 32;
    a = qp ? 16'(16'hFF80 + 2 * (n + 30)) : 16'(16'hFF00 + 2 * (n + 14));
    v = qp ? signed'(mp) : 64'(signed'(mp[31:0]));
    if (n < 0) begin
      k = -n;
      t = v + (64'sd1 <<< (k - 1));
      if (!qp) t = 64'(signed'(t[31:0]));          // wraps in 32 bits
      if (v >= 0 && t < 0) begin mstat[0] = 1; mech[MC_OVF]++; end  // round overflow
      t = t >>> k;
      mech[MC_SC_RIGHT]++;
    end else begin
      t = v <<< n;
      mech[n == 0 ? MC_SC_ZERO : MC_SC_LEFT]++;
    end
    mech[qp ? MC_SC_QP : MC_SC_DP]++;
    if (qp) mp = t;
    else    mp[31:0] = t[31:0];
    rdw(a, r1);
    @(negedge clk);
    check(last_busy_len == w - n + 7,
          $sformatf("scale busy %0d clocks, want %0d", last_busy_len, w - n + 7));
    if (qp) begin
      check(r1 == mp[31:16], $sformatf("Q.P. x2^%0d high %h want %h", n, r1, mp[31:16]));
      rdw(a + 16'd2, r2);
      mech[MC_SECOND]++;
      check(r2 == mp[15:0], $sformatf("Q.P. x2^%0d low %h want %h", n, r2, mp[15:0]));
    end else begin
      check(r1 == mp[15:0], $sformatf("D.P. x2^%0d result %h want %h", n, r1, mp[15:0]));
    end
  endtask

  task automatic load_p(input logic [63:0] v);
    wr(16'hFE02, v[63:48]); wr(16'hFE04, v[47:32]);
    wr(16'hFE06, v[31:16]); wr(16'hFE08, v[15:0]);
    mp = v;
  endtask

  task automatic check_p(input string tag);
    logic [15:0] r4, r3, r2, r1;
    rdw(16'hFE02, r4); rdw(16'hFE04, r3); rdw(16'hFE06, r2); rdw(16'hFE08, r1);
    check({r4, r3, r2, r1} == mp,
          $sformatf("%s: P=%h want %h", tag, {r4, r3, r2, r1}, mp));
  endtask

  task automatic check_status_clear();
    logic [15:0] s;
    rdw(16'hFE0E, s);
    check(s == {14'b0, mstat}, $sformatf("status %h want %h", s, mstat));
    rdw(16'hFE00, s);
    check(s == {14'b0, mstat}, $sformatf("status (clear) %h want %h", s, mstat));
    mech[MC_STATCLR]++;
    mstat = 0;
    rdw(16'hFE0E, s);
    check(s == 16'h0, "status cleared");
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r;
    int t0, hcyc;
    logic signed [63:0] b11, c11, b12, c21, b13, c31, kk, a11;
    foreach (mech[i]) mech[i] = 0;
    mp = 0; mm = 0; mstat = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // register write / read-back
    wr(16'hFE0A, 16'h1234); wr(16'hFE0C, 16'h5678);
    rdw(16'hFE0A, r); check(r == 16'h1234, "M4 read back");
    rdw(16'hFE0C, r); check(r == 16'h5678, "M3 read back");
    mm[63:32] = 32'h12345678;
    load_p(64'h0123_4567_89AB_CDEF);
    check_p("P load");
    @(negedge clk);
    check(!board_sel, "board select idle");

    // single precision
    load_p(64'h0);
    do_mul(0, 1, 0, 32'h0123, 32'h0456);        // clear & add
    do_mul(0, 0, 0, 32'hFF00, 32'h0300);        // add
    do_mul(0, 0, 1, 32'h7FFF, 32'h8000);        // subtract
    check_p("S.P. multiply");
    do_scale(0, -14); check_p("D.P. x2^-14");
    // double precision
    do_mul(1, 1, 0, 32'h1234_5678, 32'hFEDC_BA98);
    do_mul(1, 0, 1, 32'h8000_0000, 32'h0000_0003);
    do_mul(1, 0, 0, 32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check_p("D.P. multiply");
    do_scale(1, -30); check_p("Q.P. x2^-30");
    load_p(64'h0000_0000_0001_2345);
    do_scale(1, 5); check_p("Q.P. x2^5");
    do_scale(0, 0); check_p("D.P. x2^0");
    do_scale(0, 14); check_p("D.P. x2^14");

    // overflow: largest positive plus a positive product
    load_p(64'h0000_0000_7FFF_FFFF);
    do_mul(0, 0, 0, 32'h0002, 32'h0003);
    check(status[0], "overflow flag");
    check_status_clear();

    // addressing errors: write to a scale address, read of a multiply
    // address, a multiply on the wrong register, scale code out of range
    wr(16'hFF00, 16'h1111); mstat[1] = 1; mech[MC_ADRERR]++;
    rdw(16'hFE1E, r); check(r == 0, "illegal read returns 0"); mech[MC_ADRERR]++;
    wr(16'hFE10, 16'h2222); mech[MC_ADRERR]++;
    rdw(16'hFF3A, r); mech[MC_ADRERR]++;
    check(status[1], "address error flag");
    check_p("no change on illegal access");
    check(!busy, "illegal access starts nothing");
    check_status_clear();

    // hold-off: a write during a double precision multiply waits for it
    wr(16'hFE0A, 16'h0001); wr(16'hFE0C, 16'h0000);
    wr(16'hFE8E, 16'h0000); wr(16'hFE90, 16'h0002);
    mm = 64'h0001_0000_0000_0002;
    model_mul(1, 0, 0);
    t0 = mech[MC_HOLDOFF];
    access(0, 16'hFE0A, 16'h0005, r, hcyc);          // M4 write passes
    mm[63:48] = 16'h0005;
    check(hcyc == 2 && busy, $sformatf("M write while busy took %0d clocks", hcyc));
    check(mech[MC_HOLDOFF] == t0, "no hold-off for an M write");
    access(1, 16'hFE08, 16'h0, r, hcyc);             // P1 read waits
    check(hcyc > 55, $sformatf("held-off P read took %0d clocks", hcyc));
    check(r == mp[15:0], "held-off P read returns the new accumulator");
    check(mech[MC_HOLDOFF] > t0, "hold-off seen");
    access(0, 16'hFE0A, 16'h0005, r, hcyc);
    check(hcyc == 2, $sformatf("free write took %0d clocks", hcyc));
    check_p("after hold-off");

    // benchmark A11 = B11*C11 + B12*C21 + B13*C31 + K, 32-bit integers
    b11 = 1234567; c11 = -89; b12 = -40000; c21 = 30001; b13 = 77; c31 = 999999;
    kk = 123456789;
    a11 = b11 * c11 + b12 * c21 + b13 * c31 + kk;
    wr(16'hFE02, 16'h0); wr(16'hFE04, 16'h0);                 // LQPP #0,K
    wr(16'hFE06, kk[31:16]); wr(16'hFE08, kk[15:0]);
    mp = {32'h0, kk[31:0]};
    t0 = $time;
    do_mul(1, 0, 0, b11[31:0], c11[31:0]);
    do_mul(1, 0, 0, b12[31:0], c21[31:0]);
    do_mul(1, 0, 0, b13[31:0], c31[31:0]);
    begin
      logic [15:0] hi, lo;
      rdw(16'hFFBC, hi); rdw(16'hFFBE, lo);                    // DPSRM 0,A11
      check({hi, lo} == a11[31:0],
            $sformatf("benchmark A11 %h want %h", {hi, lo}, a11[31:0]));
    end

    // random mixes of every function
    for (int i = 0; i < 300; i++) begin
      int kind;
      kind = $urandom_range(0, 5);
      case (kind)
        0, 1: do_mul(0, $urandom_range(0, 3) == 0, $urandom_range(0, 1), $urandom, $urandom);
        2, 3: do_mul(1, $urandom_range(0, 3) == 0, $urandom_range(0, 1), $urandom, $urandom);
        4:    do_scale(0, int'($urandom_range(0, 28)) - 14);
        5:    do_scale(1, int'($urandom_range(0, 60)) - 30);
        default: ;
      endcase
      if (i % 25 == 0) begin
        check_p($sformatf("random %0d", i));
        check_status_clear();
      end
      if (i % 40 == 7) load_p({$urandom, $urandom});
    end
    check_p("random end");
    check_status_clear();

    foreach (mech[i]) begin
      $display("mechanism %-18s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
