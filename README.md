# Hardware Multiplier Processor (HMP)

A memory-mapped, bit-serial multiply-accumulate coprocessor for a 16-bit
microprocessor bus (the MC68000 at 8 MHz is the intended host). The host has
no fast multiply. The HMP gives it 16x16 and 32x32 bit two's complement
multiplication, accumulation (add or subtract) into a 32- or 64-bit
accumulator, and scaling of the accumulator by 2^N with rounding, where
-30 <= N <= 30.

The main idea is that **the address is the instruction**. The nine low
address bits of every access choose a register (A3..A1) and a function
(A8..A4). So a single host move delivers a data word and issues a command
together. For example, writing the last operand word to `FE1E` stores
multiplicand M2 and starts a 16-bit multiply-and-add. Reading `FFBC`
returns the 64-bit accumulator scaled by 2^0 and rounded to 32 bits. No
command register has to be written, and the host never polls.

The arithmetic is bit-serial at 16 MHz: one bit per clock, least
significant bit first. This keeps the circuit small, and the function times
are still shorter than most host memory accesses.

## Programmer's model

Addresses below are the host's 16-bit short addresses. With the default
`BOARD_BASE` they are the 24-bit addresses `FFFE00`-`FFFFFF`. All accesses
are 16-bit words.

| address | read | write |
|---|---|---|
| FE00 | status, then clear it | M1 |
| FE02 / FE04 / FE06 / FE08 | P4 / P3 / P2 / P1 | P4 / P3 / P2 / P1 |
| FE0A / FE0C | M4 / M3 | M4 / M3 |
| FE0E | status (not cleared) | M2 |
| FE1E | – | M2, then S.P. multiply and add |
| FE3E / FE5E / FE7E | – | M2, then S.P. multiply: clear and add / subtract / clear and subtract |
| FE8E | – | M2 (no function) |
| FE90 / FEB0 / FED0 / FEF0 | – | M1, then D.P. multiply: add / clear and add / subtract / clear and subtract |
| FF00 + 2k, k = 0..28 | P2:P1 x 2^(k-14), rounded; the 16-bit result | – |
| FF80 + 2k, k = 0..60 | P4..P1 x 2^(k-30), rounded; the high word of the 32-bit result | – |
| next word after an FF80-FFF8 read | the low word of that 32-bit result | – |

The function bits are:

* **A4**: multiply.
* **A5**: clear the accumulator first.
* **A6**: subtract.
* **A7**: double precision for a multiply, or a 64-bit source for a scale.
* **A8**: scale and round.

The operand registers are used as follows:

* A single precision (S.P.) multiply computes M4 x M2. It accumulates into
  the 32-bit P2:P1 and leaves P4:P3 alone.
* A double precision (D.P.) multiply computes M4:M3 x M2:M1. It accumulates
  into the 64-bit P4:P3:P2:P1.

Status bits:

* Bit 0: accumulation overflow.
* Bit 1: addressing error.

Both bits are sticky, and a read of FE00 clears them.

Any other address inside the window is illegal. Illegal accesses include:

* a write to a scale address;
* a read of a multiply address;
* a multiply triggered through any register other than M2 (S.P.) or M1 (D.P.);
* a scale code beyond 2^14 or 2^30.

An illegal access is still acknowledged. It changes nothing, reads as zero
and sets the addressing error flag.

Example: the host computes A11 = B11·C11 + B12·C21 + B13·C31 + K, with
32-bit integers, using these moves:

    MOVE.L #0,FE02 ; MOVE.L K,FE06           load the 64-bit accumulator with K
    MOVE.L B11,FE0A ; MOVE.L C11,FE8E         M4:M3 = B11, M2 = C11 high, M1 = C11 low + D.P. multiply-add
    ... same for B12,C21 and B13,C31
    MOVE.L FFBC,A11                           scale by 2^0, round to 32 bits, read both words

## How a function runs

### Control path

The control path has six parts:

1. The **address comparator** (`hmp_addr_compare`) matches A23..A9 against
   `BOARD_BASE`.
2. The **data transfer logic** (`hmp_transfer_logic`) serves one access at a
   time:
   * It latches A8..A1 and R/W (`hmp_addr_latch`).
   * One clock later it acts on the translation PROM's word for that address.
   * Register transfers, including a write that starts a multiply, are
     acknowledged at once. The host then carries on in parallel with the
     multiply.
   * A scale read is acknowledged only when the result is ready.
   * While a function is running, some accesses are held off and get no
     acknowledge until the function ends: any access that starts a function,
     and any access to P or to the status register.
   * M register transfers still go through at once, because the multipliers
     keep their own copies of the operands. So the host can load the next
     operands with no wait states while a multiply runs.
3. The **register select logic** (`hmp_reg_select`) decodes A3..A1.
4. The **translation PROM** (`hmp_xlate_prom`) maps A8..A1 to a function
   word (`hmp_pkg::fn_t`). The word gives the operation, the precision, the
   clear and subtract options, the exponent N, the legal access directions
   and the **serial clock count**. The count is 32 or 64 for a multiply, and
   32-N or 64-N for a scale. The PROM is written as the rule that fills it.
5. The **serial clock counter** (`hmp_clock_counter`) runs each function in
   three phases:
   * 2 set-up clocks. The first loads the multipliers and presets the adder
     carry.
   * The serial clocks.
   * 4 finishing clocks after a multiply, or 5 after a scale.

   So a function is busy for count+6 or count+7 clocks.
6. The **status register** (`hmp_status_reg`) holds the two sticky error
   flags.

### Datapath

The datapath has five parts:

1. The **M registers** (`hmp_m_regs`) hold the operands.
2. The **serial/parallel multipliers** (`hmp_serial_mult`, one with N=16
   for SPROD and one with N=32 for DPROD) work like this:
   * They keep the multiplicand in parallel.
   * They take the multiplier one bit per clock, LSB first.
   * They put out the 2N-bit product one bit per clock, LSB first.
   * The multiplier's sign bit subtracts the multiplicand instead of adding
     it. This makes the product correct for two's complement operands.
3. The **serial mux** (`hmp_serial_mux`) chooses operand *a* of the adder:
   SPROD, DPROD or the round pulse. Operand *b* is the accumulator out bit
   (P1 bit 0), or zero when the function clears the accumulator.
4. The **serial add-subtract** (`hmp_serial_addsub`) computes b + a or
   b - a with one carry flip-flop. The **overflow detector**
   (`hmp_overflow_detect`) applies the sign rule at the top bit of the
   window.
5. The **P registers** (`hmp_p_regs`) shift right one place per serial
   clock:
   * The window is P2:P1 (32 bits) or P4..P1 (64 bits).
   * The serial result enters at the top of the window, at P2 bit 15 or
     P4 bit 15.
   * After a full word of clocks, the window holds the new accumulator.

### Scale and round

This is the least obvious part. A scale of a W-bit window by 2^N takes
W - N serial clocks:

* **N < 0** (k = -N):
  1. During the first W clocks the accumulator circulates through the adder.
     The round pulse adds 1 at bit k-1.
  2. For the next k clocks the window's sign bit is shifted in again.
  3. The result is an arithmetic right shift by k of P + 2^(k-1), which is
     round half up.
* **N = 0**: W clocks, a pure rotation, so P is unchanged.
* **N > 0**:
  1. W-N clocks rotate the window left by N.
  2. The first finishing clock clears the N low bits.
  3. The bits shifted out at the top are lost without a flag.

The scaled value stays in P. The value returned to the host is:

* **From a 32-bit scale:** the low 16 bits, P1.
* **From a 64-bit scale:** the low 32 bits, as two reads. The first read
  returns P2 (the high word). The read of the next word address, made right
  after it, returns P1 and starts nothing. This lets one host long-word move
  fetch the whole result.

### Timing

Timing at the 16 MHz clock:

| function | clocks | time |
|---|---|---|
| S.P. multiply and accumulate | 38 | 2.38 µs |
| D.P. multiply and accumulate | 70 | 4.38 µs |
| 32-bit scale 2^-14 / 2^0 / 2^14, 16-bit round | 53 / 39 / 25 | 3.31 / 2.44 / 1.56 µs |
| 64-bit scale 2^-30 / 2^0 / 2^30, 32-bit round | 101 / 71 / 41 | 6.31 / 4.44 / 2.56 µs |

A register write is acknowledged on the second clock edge after the strobe.

### The benchmark in time

`tb_hmp_benchmark` models the host as an 8 MHz 68000 at the level of bus
cycles: 4 CPU clocks per memory cycle, with the usual bus-cycle counts of
the moves used. Under that model, one evaluation of the A11 example takes:

* 62 host bus cycles (31.0 µs);
* plus 7.1 µs spent waiting for the last multiply and the final scale;
* a total of 38.1 µs.

The first two multiplies finish behind the host's next operand moves; the
last one does not, which is most of that 7.1 µs. Computing the same
equation in software on the host alone takes about 235 µs, so the HMP is
about 6x faster. That figure is quoted for the original design, not
measured here.

## Bus interface of `hmp_top`

All bus signals are synchronous to `clk`:

* The host raises `bus_as`, with `bus_rw` (1 = read), `bus_addr[23:1]` and
  `bus_wdata`, and holds them.
* The HMP answers with a one-cycle `bus_dtack` pulse. For a read,
  `bus_rdata` is valid with the pulse.
* The host then drops `bus_as`.

Other outputs:

* `busy`: a function is running.
* `holdoff`: an access is being held off.
* `board_sel`: the comparator output.
* `status[1:0]`: the status flags.

Reset is `rst_n`, asynchronous and active low. It clears every register.

This is a simplified synchronous stand-in for the 68000's asynchronous
AS/DTACK cycle. UDS/LDS byte strobes are not modelled.

## Where this RTL goes beyond what the design fixes

These choices are this implementation's own. Each module's header comment
says the same.

* **Clock and overhead.** The 16 MHz clock and the 6/7 overhead clocks are
  inferred from the execution times, which they reproduce exactly. How the
  overhead splits into set-up and finishing clocks is arbitrary.
* **Multiplier.** The serial/parallel multiplier is a behavioural equivalent
  of cascaded multiplier ICs, not a gate-level copy. For the same reason the
  M registers hold their values instead of shifting along an M4→M3→M2→M1
  chain.
* **S.P. operands.** A single precision multiply uses M4 as its multiplier.
* **Scale details.** The scale uses round half up, the low-word result
  position, a scale that writes back into P, and left scales that lose bits
  without a flag.
* **Errors and status.** The set of illegal addresses, the handling of an
  illegal access and the status bit positions are this implementation's own.
* **Second word.** A 32-bit result is read back as a second word.
* **Hold-off.** Some accesses made while busy are held off: those that
  start a function, and those to P or status. M transfers are not held off.
  The original design promises both automatic hold-off and operand writes
  with no wait states, and this rule is one way to meet both.

Not included:

* the host CPU;
* the rest of the microcomputer (EPROM, RAM, serial I/O, interrupt
  controller, timers, power monitor, intermodule bus).

## Files and simulation

`rtl/` holds one module per file:

* `hmp_pkg.sv`: types and constants.
* `hmp_top.sv`: the top level.
* One file per block named above.

`tb/` holds a self-checking testbench `tb_<module>.sv` for each module. Each
one prints `TB_RESULT checks=N failures=M`. `tb_hmp_top` runs the whole
processor at its default parameters:

* directed cases for every function;
* the A11 example;
* 300 random functions checked against a model of the accumulator;
* busy-time checks;
* a count of each mechanism: add, subtract, clear, right, left and zero
  scales, overflow, addressing error, hold-off, parallel running, the
  second word and the status clear.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl rtl/hmp_pkg.sv tb/tb_hmp_top.sv --top-module tb_hmp_top
    ./obj_dir/Vtb_hmp_top

Substitute `tb_hmp_benchmark.sv` for the timed benchmark, or any other
`tb_*.sv` for the block-level tests. Verilator's
`-Wall` lint gives only warnings: unused signals and parameters, and the
reset used in an assertion's `disable iff`. Each full
simulation takes well under a second.
