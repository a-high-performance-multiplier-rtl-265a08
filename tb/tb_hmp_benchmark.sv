// tb_hmp_benchmark: runs the benchmark equation
//     A11 = B11*C11 + B12*C21 + B13*C31 + K      (all terms 32-bit)
// through the processor as a host would, for many random operand sets, and
// reports how long each equation takes.
//
// The host is modelled at bus-cycle level as an 8 MHz MC68000: every bus
// cycle to its own memory takes 4 CPU clocks (8 processor clocks), and an
// access to the processor lasts until its acknowledge, but at least as
// long, with the strobe low for at least one clock.  Instruction fetch cycles come from the usual 68000 bus-cycle
// counts of the moves used:
//     MOVE.L #imm,abs.W      3 fetches + 2 writes + next opcode fetch
//     MOVE.L abs.W,abs.W     1 fetch + 2 reads + 1 fetch + 2 writes + next opcode fetch
// (the source variables are taken to be in host memory at short
// addresses).  Sequence per equation:
//     MOVE.L #0,FE02 ; MOVE.L K,FE06 ;
//     3 x (MOVE.L Bij,FE0A ; MOVE.L Cjk,FE8E) ; MOVE.L FFBC,A11
// Checks: each A11 equals the exact integer sum modulo 2^32; writes of the
// M registers never wait; the time per equation equals the bus time plus
// the waits for the running multiply and the scale, and is at least five
// times faster than the 235 us of the host alone.
module tb_hmp_benchmark;
  logic        clk = 0, rst_n = 0;
  logic        bus_as = 0, bus_rw = 1;
  logic [23:1] bus_addr = '0;
  logic [15:0] bus_wdata = '0;
  logic [15:0] bus_rdata;
  logic        bus_dtack, board_sel, busy, holdoff;
  logic [1:0]  status;

  hmp_top dut (.*);

  always #5 clk = ~clk;     // one processor clock, 62.5 ns

  int checks = 0, failures = 0;
  localparam int BUS = 8;   // processor clocks per host bus cycle

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // host memory bus cycle (instruction fetch, variable read or write)
  task automatic mem_cycle(input int n);
    repeat (n * BUS) @(negedge clk);
  endtask

  // host bus cycle to the processor; returns the data and its length
  task automatic hmp_cycle(input bit rw, input logic [15:0] a, input logic [15:0] wd,
                           output logic [15:0] r, output int n);
    logic [23:0] full;
    full = {8'hFF, a};
    bus_as = 1; bus_rw = rw; bus_addr = full[23:1]; bus_wdata = wd;
    n = 0;
    do begin @(negedge clk); n++; end while (!bus_dtack);
    r = bus_rdata;
    bus_as = 0; bus_rw = 1;
    do begin @(negedge clk); n++; end while (n < BUS);   // strobe low at least one clock
  endtask

  // MOVE.L abs.W,abs.W from host memory into the processor
  task automatic move_in(input logic [15:0] a, input logic [31:0] v, output int waits);
    logic [15:0] r; int n1, n2;
    mem_cycle(3);                          // source extension, two reads
    mem_cycle(1);                          // destination extension
    hmp_cycle(0, a, v[31:16], r, n1);
    hmp_cycle(0, a + 16'd2, v[15:0], r, n2);
    mem_cycle(1);                          // next opcode
    waits = n1 + n2 - 2 * BUS;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [63:0] b [3], c [3], k, a11;
    logic [15:0] r, hi, lo;
    int n, w, t0, t1, mwait, fnwait, worst, best;
    worst = 0; best = 1 << 30;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int e = 0; e < 40; e++) begin
      for (int i = 0; i < 3; i++) begin
        b[i] = 64'(signed'($urandom));
        c[i] = 64'(signed'($urandom));
        if (e == 0) begin b[i] = 64'(-(64'sd1 <<< 31)); c[i] = b[i]; end
      end
      k   = 64'(signed'($urandom));
      a11 = b[0] * c[0] + b[1] * c[1] + b[2] * c[2] + k;
      t0 = $time;
      mwait = 0; fnwait = 0;
      // LQPP #0,K : MOVE.L #0,FE02 ; MOVE.L K,FE06
      mem_cycle(3);
      hmp_cycle(0, 16'hFE02, 16'h0, r, n); mwait += n - BUS;
      hmp_cycle(0, 16'hFE04, 16'h0, r, n); mwait += n - BUS;
      mem_cycle(1);
      move_in(16'hFE06, k[31:0], w);       mwait += w;
      // DPMA Bij,Cjk : MOVE.L Bij,FE0A ; MOVE.L Cjk,FE8E
      for (int i = 0; i < 3; i++) begin
        mem_cycle(3); mem_cycle(1);
        hmp_cycle(0, 16'hFE0A, b[i][31:16], r, n); mwait += n - BUS;
        hmp_cycle(0, 16'hFE0C, b[i][15:0], r, n);  mwait += n - BUS;
        mem_cycle(1);
        mem_cycle(3); mem_cycle(1);
        hmp_cycle(0, 16'hFE8E, c[i][31:16], r, n); mwait += n - BUS;
        hmp_cycle(0, 16'hFE90, c[i][15:0], r, n);  fnwait += n - BUS;
        mem_cycle(1);
      end
      // DPSRM 0,A11 : MOVE.L FFBC,A11
      mem_cycle(1);
      hmp_cycle(1, 16'hFFBC, 16'h0, hi, n); fnwait += n - BUS;
      hmp_cycle(1, 16'hFFBE, 16'h0, lo, n); fnwait += n - BUS;
      mem_cycle(1); mem_cycle(2); mem_cycle(1);
      t1 = $time;
      n = (t1 - t0) / 10;                  // processor clocks
      check({hi, lo} == a11[31:0],
            $sformatf("equation %0d: A11 %h want %h", e, {hi, lo}, a11[31:0]));
      check(mwait == 0, $sformatf("equation %0d: operand writes waited %0d clocks", e, mwait));
      check(n == 62 * BUS + fnwait,
            $sformatf("equation %0d: %0d clocks, bus %0d + waits %0d", e, n, 62 * BUS, fnwait));
      check(n * 625 / 10 * 5 <= 235000, $sformatf("equation %0d: %0d ns", e, n * 625 / 10));
      if (n > worst) worst = n;
      if (n < best) best = n;
    end
    $display("benchmark: %0d..%0d clocks per equation = %0d..%0d ns (bus cycles alone %0d ns)",
             best, worst, best * 625 / 10, worst * 625 / 10, 62 * BUS * 625 / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
