# Input vector monitoring concurrent BIST with SRAM cells

A circuit that is tested only when it is taken off line cannot report a fault
that appears while it is working. Concurrent (on-line) built-in self-test
instead watches the input vectors that reach the circuit under test (CUT)
during normal operation and counts each useful one as a test vector, so the
test advances while the system runs. The difficulty is knowing which of the
2^n possible vectors have already been seen without storing 2^n bits.

The scheme implemented here cuts the input space into **windows** of 2^w
consecutive vectors and monitors only one window at a time, the *active
window*. A column of 2^w one-bit **SRAM cells** records which vectors of the
active window have already reached the CUT, and a **w-stage counter** counts
them. When all 2^w have been seen the window is closed, the cells are emptied
and the next window becomes active. After all 2^(n-w) windows, every input
vector has been applied exactly once, and an order-independent signature of the
responses says whether the CUT is good. If normal traffic is too slow to finish
a window, the unit can be switched to **test mode** and apply the missing
vectors of that window itself.

The CUT in this design is a ROM, 64K words of 16 bits by default, whose word at
address `a` is `~a`. A second, fault-free copy of the ROM (the stored result)
gives an ideal output for each address, and a per-vector good/bad flag compares
the two.

## Windows and the monitoring path

An n-bit input vector is split into k = n - w high-order bits and w low-order
bits. The **test generator** (`test_generator`, a k-bit counter) holds the
active window:

* the **comparator** (`window_comparator`) raises `cmp` when the k high-order
  bits equal the generator state;
* the **decoder** (`window_decoder`, enabled by `cmp`) turns the w low-order
  bits into one select line of the cell column;
* the selected **cell** (`sram_cell_array`) is read in the same cycle.

| cell read | meaning | action |
|---|---|---|
| not selected (`cmp` = 0) | vector outside the active window | nothing |
| 1 (full) | vector already seen in this window | nothing |
| 0 (empty) | new vector of the window | `rve` = 1: write 1 into the cell, step the w-stage counter, enable the response verifier for this vector |

So `rve` is simply `cmp && !cell`. The counter therefore always equals the
number of full cells. When the 2^w-th new vector arrives the counter is all
ones and the step makes it wrap; the carry out (`ovf`) is registered once, and
in the **next** cycle `tge` is high for one cycle. During that cycle the decoder
drives all select lines, every cell is written with 0, and the test generator
moves to the next window. No vector is monitored in the `tge` cycle. The
counter has already wrapped to 0, so the next window starts clean.

In the original circuit the cell is read in the first half of the clock and
written in the second half. Here the same behaviour is written as a
combinational read and an edge-triggered write of a register array, which gives
the same result cycle by cycle.

## Test mode

`mode_select` = 1 puts the unit (`sram_cbu`) in test mode. On entry the w-stage
counter is cleared. From then on the CUT receives `in_test = {window, counter}`
instead of `in_normal`, and the counter steps every cycle. The monitoring path
is the same one, fed from the CUT input after the multiplexer. In test mode the
high-order bits are the generator state, so `cmp` always holds, and the counter
value addresses the cell:

* cell empty: the vector is new, so `rve` is raised and the cell is filled;
* cell full: normal traffic already applied this vector, so it is not counted again.

After 2^w cycles the counter wraps and `tge` closes the window as in normal
mode. A window in test mode therefore takes exactly 2^w + 1 cycles, and a whole
session in test mode takes 2^(n-w) x (2^w + 1) cycles. That is 69,632 cycles for
the default 64K ROM.

Leaving test mode (`mode_select` back to 0) takes effect only at the `tge` that
ends the window being swept, so a started sweep always finishes. This is a
choice of this implementation. It keeps the counter and the cells consistent
without a second counter.

## Response verification

The vectors of a window can reach the CUT in any order, and some are applied
by normal traffic and some by the test sweep. So the compactor must not depend
on order. `accumulator_rv` adds each response whose vector raised `rve` into a
16-bit accumulator, modulo 2^16.

* The ROM output is registered, so a response appears one cycle after its
  address. `cycle_delay` delays `rve`, and the end-of-session strobe, by that
  one cycle.
* The session ends at the `tge` of the last window (`window` all ones). One
  cycle later the accumulator holds the complete sum. It is then compared with
  the golden value, `session_done` pulses and `session_pass` is updated. The
  accumulator restarts for the next session in that same cycle.
* The golden signature is computed at elaboration by
  `cbist_pkg::golden_signature` in closed form. The sum of `~a` over all 2^n
  addresses is 2^(n-1) x (2^d - 1) with d = min(16, n), plus a term for word
  bits above the address width. For n = 16 it is `16'h8000`.

Independently of the signature, `g_b` = (`cut_out == ideal_result`) flags each
faulty response as it happens, using the stored-result ROM.

## Interface and timing (`sram_cbist_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock (one vector per cycle); synchronous active-high reset |
| `mode_select` | in | 1 | 0 normal mode, 1 test mode |
| `in_normal` | in | N | normal-mode ROM address |
| `in_test` | out | N | test vector `{window, counter}` |
| `cut_in` | out | N | address applied to the CUT (combinational mux) |
| `cut_out`, `ideal_result` | out | 16 | CUT word and stored word, one cycle after `cut_in` |
| `g_b` | out | 1 | 1 when `cut_out == ideal_result` |
| `test_mode`, `cmp`, `rve`, `tge` | out | 1 | unit state, same cycle as the vector (`tge` registered) |
| `window` | out | N-W | active window (test generator) |
| `cells` | out | 2^W | cell contents |
| `signature` | out | 16 | accumulator |
| `session_done`, `session_pass` | out | 1 | verdict pulse two cycles after the last `tge`; pass flag held until the next verdict |

Parameters: `N` = 16 (CUT inputs), `W` = 4 (16 cells per window), `DATA_W` =
16, `ACC_W` = 16. `FAULT_EN`, `FAULT_ADDR` and `FAULT_MASK` flip bits of one
word in the CUT copy only (not in the stored-result copy). They exist to show
detection and are off by default.

Reset (synchronous) empties the cells the way `tge` does: the decoder selects
every cell and the clear input writes zero into all of them. The counter, the
generator, the mode register and the accumulator are reset directly.

## Files

| file | contents |
|---|---|
| `rtl/cbist_pkg.sv` | default sizes, mode enum, ROM content and golden-signature functions |
| `rtl/sram_cbist_top.sv` | top: BIST unit, CUT ROM, stored-result ROM, `g_b`, delay, verifier |
| `rtl/sram_cbu.sv` | concurrent BIST unit: multiplexer, mode control, `tge` flip-flop, wiring of the parts below |
| `rtl/window_comparator.sv`, `rtl/window_decoder.sv` | window membership and cell selection |
| `rtl/sram_cell_array.sv` | the 2^w cells |
| `rtl/wstage_counter.sv`, `rtl/test_generator.sv` | w-stage counter with carry out; k-bit window generator |
| `rtl/cycle_delay.sv`, `rtl/accumulator_rv.sv` | response alignment and accumulator verifier |
| `rtl/cut_rom.sv` | the ROM, used for both the CUT and the stored result |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the three system-level ones below |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
With Verilator 5:

    verilator --binary --timing --assert --top-module tb_sram_cbist_full \
      -y rtl -y tb +libext+.sv rtl/cbist_pkg.sv tb/tb_sram_cbist_full.sv
    ./obj_dir/Vtb_sram_cbist_full

* `tb_sram_cbist_full`: the default design through one full session. The first
  30,000 cycles are normal traffic, in which several hundred windows close. Test mode then
  finishes the session: 65,536 vectors, each applied exactly once, a passing
  signature of `16'h8000`, and a return to normal mode afterwards. It runs in
  under a second.
* `tb_sram_cbist_top`: n = 8, w = 3, with a good and a faulty copy side by
  side, over three sessions of mixed random traffic. Every mechanism is counted
  and must occur: new hit, repeated hit, miss, a window closed in normal and in
  test mode, test fill and skip, mode entry and exit, a signature pass, and
  detection by both the signature and `g_b`.
* `tb_sram_cbist_sizes`: 16K, 128K and 256K-word ROMs (N = 14, 17, 18) in pure
  test mode. Each checks the exact session length of 2^(n-w) x 17 cycles.
* `tb_sram_cbu`: the unit at n = 8, compared cycle by cycle with a reference
  model.
* The module-level testbenches check each part exhaustively or against a model.

All of them pass. Each has also been run against a deliberately broken copy of
its module, and each one failed there.

## How far to trust it, and where it departs from the original scheme

* **Cell circuit.** The transistor-level cell is not modelled: the two-sided
  cell, the write buffers, and the inverted-clock flip-flop that times the
  write. It is replaced by a register array with the same cycle behaviour.
* **Sizes.** w = 4 and the 16-bit ROM words are taken from the memory-bit
  counts of the reference FPGA builds: 16 cell bits on top of a 16K x 16 or
  64K x 16 ROM. The default n = 16 is the 64K configuration. The 16K
  configuration is `N = 14`.
* **ROM content.** `~address` is a reading of example waveforms of the
  reference design, not a stated specification. Any content works, as long as
  the golden signature is changed to match.
* **Own choices.** These are design decisions where the scheme says nothing:
  * the test generator is a binary counter (an LFSR that also visits the
    all-zero state would do as well);
  * the accumulator is a plain 16-bit adder;
  * `in_test` is generated internally rather than taken from a pin;
  * leaving test mode waits for the end of the window;
  * no vector is monitored in the `tge` cycle;
  * reset is synchronous, and clears the registers outside the cell column
    directly.
* **Not covered.** The scheme is set against an earlier *window monitoring*
  BIST, which keeps one logic cell per window vector instead of an SRAM cell.
  That baseline is not included. No FPGA timing or area figures are reproduced.
