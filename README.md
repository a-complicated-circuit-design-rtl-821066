# Restartable logic BIST with fault injection

Chips age: wires and transistors that worked when the part was new can start
to fail. A simple way to catch this in the field is a *built-in self-test*
(BIST). The chip takes itself offline, drives its own logic with pseudo-random
patterns, and compresses the responses into a short *signature*. If the
signature differs from the one a fault-free circuit produces, the circuit is
faulty.

This RTL implements such a BIST for a small circuit under test (CUT). It adds
two features to the textbook scheme:

* **Restartable runs.** A test run can be suspended at any pattern with
  `hold`, or at a pattern chosen in advance through a short scan chain. While it is held, the CUT goes back to normal operation on its
  external inputs, and the signature so far can be read out. When `hold` falls
  the run resumes from the next pattern, as if it had never stopped.
* **A built-in fault laboratory.** The CUT exists three times. Replica 0 is
  fault-free. Replica 1 can have any of its wires stuck at 0 or 1. Replica 2
  can have any of its wires inverted (a bit flip). A two-bit selector chooses
  which replica is tested, so the BIST's ability to detect each kind of fault
  can be shown directly.

The structure follows a published description of a restartable logic BIST
controller that was intended for FPGA configurable logic blocks. That
description gives the block list, the controller's six states and the roles
of the TM, HOLD and ENABLE signals. It does not give the CUT, any widths,
polynomials or the run length. Those choices are this design's own, and they
are listed under [Design choices](#design-choices-and-departures).

## Block diagram

```
            ext_in ─────────────┐
                                ▼
  ┌──────┐ pattern  ┌───────────────┐ cut_in ┌────────────┐ cut0_out ─────────────┐
  │ lfsr │────────► │  input_mux    │──┬───► │ cut_adder 0│──────┬──────────┐     │
  └──────┘          │ (test/normal) │  │     └────────────┘      │          ▼     ▼
     ▲              └───────────────┘  ├───► cut_adder 1 (stuck-at) ──► ┌──────────────┐
     │                      ▲          └───► cut_adder 2 (bit flip) ──► │ cut_selector │── cut_out
     │                      │ test_mode                                 └──────────────┘
     │              ┌───────────────┐                                          │
     └── enable ────│bist_controller│──── enable ──► misr (test)  ◄────────────┘
         tpg_clear  │   6-state FSM │──── enable ──► misr (ref)   ◄── cut0_out
                    └───────────────┘                 │      │
                      ▲ tm  ▲ hold       evaluate ──► fault_detector ──► pass / fail / done
```

| File | Role |
|---|---|
| `rtl/bist_pkg.sv` | State and fault-mode enums, CUT widths, table of maximal-length polynomials |
| `rtl/lfsr.sv` | Test pattern generator: 8-bit Galois LFSR, seed 1 |
| `rtl/input_mux.sv` | Drives the CUTs with LFSR patterns in test mode and `ext_in` in normal mode |
| `rtl/cut_adder.sv` | The CUT: 4-bit ripple-carry adder with a fault-injection point on each of its 16 wires |
| `rtl/cut_selector.sv` | 3-way multiplexer with a 2-bit select |
| `rtl/misr.sv` | Multiple-input signature register (16 bits by default) |
| `rtl/fault_detector.sv` | Compares the test and reference signatures and latches PASS/FAIL/DONE |
| `rtl/bist_controller.sv` | The six-state FSM and the pattern counter |
| `rtl/hold_logic.sv` | Scan-loadable hold point that stops a run at a chosen pattern |
| `rtl/bist_top.sv` | Top level: wires everything together |

## The controller and a test run

The FSM has six states: `START`, `RESETTPG`, `RESETMISR`, `TEST`, `HOLD`
and `BISTDONE`.

1. **START.** The system is idle and in normal mode: the CUTs compute on
   `ext_in`, and `cut_out` shows the selected replica's result. Raising
   `tm` (Test Mode) starts a run.
2. **RESETTPG** loads the LFSR seed and clears the previous PASS/FAIL/DONE.
   **RESETMISR** clears both signature registers.
3. **TEST.** `enable` is high. Each clock the LFSR advances and both MISRs
   capture one response:
   * the *test* MISR takes the selected replica's output;
   * the *reference* MISR takes the fault-free replica's output.
4. After `NUM_PATTERNS` captures (255 by default, which is every non-zero
   8-bit input) the FSM enters **BISTDONE**. There the fault detector compares
   the two signatures and raises `done`, plus `pass` or `fail`.
5. BISTDONE lasts as long as `tm` stays high, so the final signatures can be
   read. When `tm` falls, the FSM returns to START. On that edge the LFSR, the
   MISRs and the pattern counter are reset. `pass`/`fail`/`done` stay latched
   until the next run starts.

If `tm` falls in any state other than BISTDONE, the run is abandoned.

### Cycle timing

Count the clock edge that samples `tm` high in START as edge 1. Then:

| Edge | Event |
|---|---|
| 2 | Seed loaded |
| 3 | MISRs cleared |
| 4 | First response captured |
| `NUM_PATTERNS + 3` | Last response captured; FSM enters BISTDONE |
| `NUM_PATTERNS + 4` | `done` rises (259 edges at the defaults) |

A HOLD adds one edge for each cycle in which `hold` is high, plus one edge to
get from HOLD back to TEST.

## HOLD: suspending and restarting a run

HOLD is the subtle part of the design. The rules are:

* **`enable` is gated by `hold` combinationally.** In the cycle where `hold`
  rises, no pattern is captured, even though the FSM only reaches the HOLD
  state at the next edge. The CUT inputs switch back to `ext_in` in that same
  cycle, because `test_mode` is also gated by `hold`.
* **Nothing is reset in HOLD.** The LFSR keeps the next pattern, both MISRs
  keep their partial signatures, and the pattern counter keeps the count. The
  `signature` output therefore shows the intermediate signature after
  `pattern_count` patterns. A run can be inspected incrementally this way.
* **Resuming.** When `hold` falls, the FSM returns to TEST at the next edge and
  captures from the following edge on. The final signature is bit-identical to
  an uninterrupted run's. The end-to-end testbench checks this.

### Hold points loaded by scan

`hold_logic` makes the suspension programmable. A 9-bit scan chain holds an
arm bit and an 8-bit pattern index `hold_at`:

* **Loading.** While `scan_en` is high, the chain shifts one bit per clock.
  Feed `hold_at` LSB first, then the arm bit.
* **Stopping.** While the chain is armed, the run is held (`auto_hold`) as soon
  as `pattern_count` equals `hold_at`. At that point exactly `hold_at`
  patterns have been compressed.
* **Advancing.** Scan in a larger index and the run continues to that pattern.
  Scan in a cleared arm bit and it runs to the end.
* **Freezing during scan.** The run is also frozen while `scan_en` is high.
  This way the intermediate contents of the chain can never let it slip
  forward.

`auto_hold` and the external `hold` are ORed, so a run resumes only when both
are low. A run can therefore be taken through its pattern range in steps, with
an intermediate signature read at each step. The final signature is the same as
that of an uninterrupted run. The hold point does not make the LFSR jump: every
run starts from the seed.

While held, the chip behaves like the normal design. The fault-injection
settings stay in force, so a faulty replica also computes wrongly in normal
mode.

## Signatures, and why the MISR is 16 bits

Both MISRs are internal-XOR (Galois) shift registers. Each cycle:

1. shift the register right;
2. if the bit shifted out was 1, XOR the polynomial mask into it;
3. XOR the 5-bit CUT response into the low bits.

The LFSR uses x^8+x^6+x^5+x^4+1. The 16-bit MISR uses x^16+x^14+x^13+x^11+1.
`bist_pkg::galois_mask` holds maximal-length masks for widths 3 to 16.

The MISR is deliberately wider than the LFSR. A maximal-length n-bit MISR
returns to its starting state after exactly 2^n−1 steps. Suppose an 8-bit MISR
were run for all 255 patterns. An error that is the same in every cycle (for
example a bit flip on a CUT output, which inverts that output bit for every
pattern) then adds (M^255 − I)(M − I)^-1·e = 0 to the signature. Every such
fault would alias, and PASS would be reported. With 16 bits the run is far
shorter than the MISR's period, and all 48 single faults of the CUT are
detected. In general, keep `NUM_PATTERNS` below 2^`MISR_WIDTH`−1.

The reference signature is not a stored constant. It is computed live by a
second MISR from the fault-free replica, so changing the CUT, the seed or the
run length needs no new golden value.

## The circuit under test and fault injection

`cut_adder` computes `out_bits = in_bits[3:0] + in_bits[7:4]` as a 5-bit sum
with carry out. Each of its wires passes through an injection point. The
injection is controlled by `fault_mode`, which is one of:

* `FAULT_NONE`: no fault;
* `FAULT_SA0`: the wire is stuck at 0;
* `FAULT_SA1`: the wire is stuck at 1;
* `FAULT_FLIP`: the wire is inverted.

`fault_site` picks the wire:

| Site | Wire |
|---|---|
| 0–3 | operand a[0..3] |
| 4–7 | operand b[0..3] |
| 8–10 | carries out of bits 0..2 (internal) |
| 11–14 | sum bits 0..3 |
| 15 | carry out |

In the top level:

* replica 0 is tied to `FAULT_NONE`;
* replica 1 takes stuck-at faults from `sa_en`, `sa_value` and `sa_site`;
* replica 2 takes bit flips from `flip_en` and `flip_site`.

`cut_sel` chooses the replica: 0 is fault-free, 1 is stuck-at and 2 is
bit-flip. Code 3 also selects the fault-free replica.

To test a different circuit, replace `cut_adder` and keep its port shape. The
widths in `bist_pkg` (`CUT_IN_W`, `CUT_OUT_W`, `SITE_W`) set the LFSR and MISR
input widths.

## Top-level interface (`bist_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock; asynchronous active-low reset of all registers |
| `tm` | in | 1 | Test Mode: rising starts a run; falling ends or abandons it |
| `hold` | in | 1 | Suspend the run; the CUTs return to `ext_in` |
| `cut_sel` | in | 2 | Replica tested: 0 fault-free, 1 stuck-at, 2 bit-flip (3 = fault-free) |
| `ext_in` | in | 8 | Normal-mode operands {b, a} |
| `sa_en`, `sa_value`, `sa_site` | in | 1, 1, 4 | Stuck-at fault on replica 1 |
| `flip_en`, `flip_site` | in | 1, 4 | Bit-flip fault on replica 2 |
| `scan_en`, `scan_in` | in | 1 | Load the hold point {arm, hold_at[7:0]}, LSB first |
| `scan_out` | out | 1 | End of the hold-point chain |
| `auto_hold` | out | 1 | The hold point is holding the run (also high while scanning during a run) |
| `cut_out` | out | 5 | Output of the selected replica |
| `pattern` | out | 8 | Current LFSR pattern |
| `signature`, `ref_signature` | out | 16 | Test and reference MISRs |
| `pattern_count` | out | 8 | Patterns captured in this run |
| `state` | out | 3 | `bist_pkg::bist_state_e` |
| `test_mode` | out | 1 | CUTs are driven by the LFSR |
| `pass`, `fail`, `done` | out | 1 | Latched result of the last completed run |

Parameters:

* `MISR_WIDTH`: default 16;
* `NUM_PATTERNS`: default 255.

Assertions in `bist_controller` and `fault_detector` check three rules:

* `enable` is never high outside TEST or while `hold` is high;
* the pattern counter never exceeds `NUM_PATTERNS`;
* `pass` and `fail` are never high together.

## Simulating

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/bist_pkg.sv tb/bist_ref_pkg.sv rtl/*.sv tb/tb_bist_top.sv \
    --top-module tb_bist_top
./obj_dir/Vtb_bist_top
```

Replace `tb_bist_top` with another testbench to run a single block:

| Testbench | Block | What it checks |
|---|---|---|
| `tb_lfsr` | `lfsr` | Full 255-state period, no repeats, steps against a reference, hold, clear |
| `tb_misr` | `misr` | 200 random words against a reference, hold, clear, single-bit error sensitivity |
| `tb_input_mux` | `input_mux` | Both modes with random data |
| `tb_cut_adder` | `cut_adder` | All 256 inputs × (no fault + 16 sites × 3 fault modes), against an arithmetic fault model |
| `tb_cut_selector` | `cut_selector` | Every select code |
| `tb_fault_detector` | `fault_detector` | Pass, fail, hold of the result, clear |
| `tb_hold_logic` | `hold_logic` | Scan loading and unloading, the hold rule for every count, freezing while scanning |
| `tb_bist_controller` | `bist_controller` | State sequence, exactly 255 enables, edge counts, HOLD twice, wait for TM, abandon, register reset |
| `tb_bist_top` | `bist_top` | The whole design at its default parameters (see below) |

`tb_bist_top` runs the full design at its defaults. It covers:

* a fault-free run;
* all 32 stuck-at faults and all 16 bit-flip faults;
* select code 3;
* a run held twice, with intermediate signatures and normal-mode results
  checked during HOLD;
* a run stopped by scan-loaded hold points at patterns 100 and then 200,
  then released to the end;
* an abandoned run.

Expected signatures come from `tb/bist_ref_pkg.sv`. That package is an
independent model of the LFSR, the MISR and the faulty adder, written
arithmetically rather than gate by gate. The testbench also counts how often
each mechanism occurred: pass, stuck-at detection, bit-flip detection, hold,
resume, normal mode, abandon, scan-loaded hold point and advance to a later
point. A mechanism that never occurs counts as a
failure. The whole test runs in well under a second.

## Design choices and departures

These points are not fixed by the original description and were chosen here:

* **CUT:** a 4-bit adder with 16 fault sites. The source uses three copies of
  an unnamed circuit, with injected faults "for any wire".
* **Widths and polynomials:**
  * an 8-bit LFSR with seed 1;
  * a 16-bit MISR (see above for why it is not 8);
  * 255 patterns per run;
  * polynomials from the standard maximal-length table.
* **Reference signature:** computed by a parallel reference MISR on the
  fault-free replica. The source only says that the signatures of the replicas
  are compared against a reference.
* **End of a run:**
  * BISTDONE waits for `tm` to fall before returning to START;
  * the LFSR, MISRs and counter are reset on that transition;
  * the result stays latched until the next run starts.
* **Abandoning a run:** `tm` falling during a run abandons it. The source does
  not say what happens.
* **Unused select code:** `cut_sel` = 3 selects the fault-free replica.
* **Restart:** implemented as HOLD and resume with all state kept, plus a
  scan-loaded hold point. The chain layout, the bit order and the freeze
  during scanning are this design's own choices. Restarting from a selected
  pattern means stopping there and resuming. Nothing loads an arbitrary LFSR
  or MISR state.
* **Hardware debug:** the FPGA board, vendor tools and on-chip logic analyser
  used to observe the original in hardware are not part of this RTL.

## Tool notes

Verilator reports `SYNCASYNCNET` on `rst_n`. The cause is that the
concurrent assertions use `rst_n` in `disable iff` while the flip-flops use it
as an asynchronous reset. This is expected. It also reports `UNUSEDPARAM` on
package constants that a given module does not use.
