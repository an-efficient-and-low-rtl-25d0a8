# SMERTMR: scan-chain based multiple error recovery for TMR

Triple modular redundancy (TMR) masks an error in one of three copies of a
module by voting on their outputs, but it cannot tell which copy went wrong.
It cannot repair that copy either. A fault can also stay latent inside a copy,
in flip-flops that do not reach the outputs yet. If a second copy is then hit,
the voter sides with the wrong majority.

SMERTMR fixes this with hardware the chip already has: the scan chains built in
for production test. When the voter sees a disagreement, or a periodic
checkpoint asks for it, a controller shifts the full internal state of all three
copies out through their scan chains. It counts the bit mismatches between each
pair of copies and works out from the three counts which copies are faulty.
This works for one faulty copy, and for two faulty copies whose errors are in
different flip-flops. The controller then shifts the state of a fault-free copy
into the faulty ones. The system moves on from the corrected state. Nothing is
recomputed, so this is roll-forward recovery. A copy that keeps failing is
treated as permanently damaged. The voter then drops it, and the remaining two
copies run as master and checker.

This repository holds synthesizable SystemVerilog for the whole system. It
also holds a self-checking testbench for every block, one for the system end to
end, and a fault-injection campaign.

## Structure

```
                 d, c_in (shared inputs)
                   |          |          |
             +-----v----+ +---v------+ +-v--------+
             | module I | | module II| | module III|   scan_module x3
             +--+---+---+ +--+---+---+ +--+---+---+
          q[0]  |   ^ sco/sci/sce|  ^        |   ^
                v   |            v  |        v   |
            +----------------+  +----------------------------+
            |   tmr_voter    |  |     smertmr_controller     |
            | majority or    |  |  mode FSM                  |
            | master/checker |  |  3 x mismatch_counter      |
            +--+---------+---+  |  fault_locator (FLU)       |
   tmr_out <---+   error +----->|  fmr_reg (FMR)             |
                      ^         |  src_priority_encoder      |
                      +---------+  3 x sci_mux               |
        permanent error line    |  perm_fault_monitor        |
                                +----------------------------+
                                   mc_mode, unrecoverable
```

| Block | File | Role |
|---|---|---|
| `smertmr_top` | `rtl/smertmr_top.sv` | The three modules, the voter and the controller wired together |
| `scan_module` | `rtl/scan_module.sv` | One redundant copy: a 4-bit accumulator whose 5 flip-flops form a scan chain |
| `tmr_voter` | `rtl/tmr_voter.sv` | Bitwise majority with an error flag; master/checker after a permanent fault |
| `smertmr_controller` | `rtl/smertmr_controller.sv` | Mode sequencing and all recovery hardware below |
| `mismatch_counter` | `rtl/mismatch_counter.sv` | Counter12, Counter13, Counter23: up in comparison, down in recovery |
| `fault_locator` | `rtl/fault_locator.sv` | Fault locator unit: faulty set from the three counts |
| `fmr_reg` | `rtl/fmr_reg.sv` | Faulty modules register, F(1..3), also as two module numbers |
| `src_priority_encoder` | `rtl/src_priority_encoder.sv` | Picks the fault-free copy that feeds the faulty ones |
| `sci_mux` | `rtl/sci_mux.sv` | Per-copy scan input: own SCO, source SCO, or external test input |
| `perm_fault_monitor` | `rtl/perm_fault_monitor.sv` | MRFM and NCF registers; declares a permanent fault |
| `smertmr_pkg` | `rtl/smertmr_pkg.sv` | Module-number and module-set types, the mode enum, small helpers |

Copies are numbered 1 to 3 (I, II, III), and 0 means "none". A set of copies is
a 3-bit vector, with bit i-1 standing for copy i.

## A recovery round, cycle by cycle

L_SC is the scan chain length: WIDTH+1 = 5 at the defaults.

| Mode | Cycles | SCE | What happens |
|---|---|---|---|
| NORMAL | - | 0 | The copies compute, and the counters are held at zero. A voter error or `checkpoint` ends this mode. |
| COMPARE | L_SC | 1 | Every chain feeds its SCO back into its own SCI, so each chain rotates. Each cycle, each pair of SCO bits is compared, and every mismatch counts up in that pair's counter. After L_SC shifts every copy holds its old state again. |
| LOCATE | 1 | 0 | The fault locator reads the counts. If no copy is faulty, the system goes back to NORMAL. If one or two copies are faulty, the FMR is loaded and the system goes to RECOVER. Anything else goes to UNREC. |
| RECOVER | L_SC | 1 | Fault-free copies keep rotating. Each copy flagged in the FMR takes its SCI from the SCO of the source copy. The source is the lowest-numbered fault-free copy. The SCO streams are compared again, and every mismatch counts down. |
| CHECK | 1 | 0 | If all counts are zero and no counter went below zero, the recovery is good: the permanent-fault monitor records it and NORMAL resumes. Otherwise a new COMPARE starts. |
| UNREC | - | 0 | The unrecoverable condition. It is held until reset. |
| OFFLINE | while `offline_test` | 1 | SCI comes from `test_si`, and the SCOs go out on `test_so`. |

A round that recovers takes 2·L_SC+2 = 12 cycles. A round that finds nothing
takes L_SC+1 = 6. The copies hold their state in every cycle outside NORMAL,
and `tmr_valid` is low. The inputs `d` and `c_in` are only taken while
`tmr_valid` is high. The system around the design must hold its work back
while `tmr_valid` is low.

**Why the down count works.** During recovery the bits that leave each chain
are still the copy's old contents. The new contents enter at the other end. So
a recovery pass shows exactly the mismatches the comparison pass counted, and
each counter returns to zero. A fault that strikes a chain during recovery
shows up as a difference: a count is left over, or a counter tries to go below
zero. The counter then holds at zero and sets a sticky `underflow` flag. In
either case CHECK starts the round again.

## Locating faulty copies from three counts

Let c_ij be the number of flip-flops that differ between copies i and j. Let
A and B be the sets of wrong flip-flops in two faulty copies.

| Counts | Verdict |
|---|---|
| c12 = c13 = c23 = 0 | All copies fault-free |
| c_ij = c_ik > 0 and c_jk = 0 | Copy i alone is faulty |
| c_ij = c_ik + c_jk, with c_ik > 0 and c_jk > 0 | Copies i and j are faulty with disjoint errors, and copy k is the reference |
| anything else | Unrecoverable |

When two faulty copies share a wrong flip-flop, the triangle equality fails
and the round is declared unrecoverable. That case is only a partial guarantee:
some patterns cannot be told apart by any rule working from counts alone, or
even from the full states.

- If A = B, the two faulty copies agree with each other. They look exactly
  like one faulty copy, namely the good one.
- If A is a proper subset of B, the states are exactly those of two disjoint
  faults seen from the copy holding A.

In both cases the locator picks a wrong reference, and the three copies end up
agreeing on a wrong state. `tb_fault_campaign` shows this at the default
size. Every single-copy fault is recovered. Of the two-copy faults, those with
disjoint errors are recovered. Overlapping ones where neither set contains the
other are flagged unrecoverable. The contained or identical ones go
undetected. With a 4-bit sum register, overlap is common: about half of the
random two-copy faults are recovered. The chance of overlap falls as the chain
grows, so for a module with hundreds of flip-flops and a few upsets per copy,
nearly every two-copy fault has disjoint errors.

In master/checker mode only the pair that is still in use is compared. Any
mismatch there is unrecoverable, because two copies cannot outvote each other.

## Permanent faults and master/checker

At the end of every successful round, `perm_fault_monitor` updates two
registers: MRFM, the most recent faulty module, and NCF, the number of
consecutive faults.

- A round with exactly one faulty copy, the same as MRFM, increments NCF.
- A round with exactly one faulty copy that differs from MRFM loads MRFM with
  that copy and restarts NCF at 1.
- A clean round or a two-copy round clears NCF.

When NCF reaches `NCF_LIMIT` (3), the copy in MRFM is declared permanently
faulty, and the declaration is held until reset. `perm_valid`/`perm_mod` go to
the voter on the permanent-error line. The voter then takes its output from
the lower-numbered remaining copy (the master) and flags an error when the
other copy (the checker) disagrees. `mc_mode` reports this state.

A stuck-at flip-flop inside a scan chain also corrupts the bits that shift
through it. The comparison and recovery passes can then disagree, and CHECK
retries the round. The copy is still found faulty in each round, NCF still
climbs, and the system degrades as intended. The end-to-end testbench does this
with a stuck-at-1 fault.

## Top-level interface (`smertmr_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock, asynchronous active-low reset |
| `d`, `c_in` | in | WIDTH, 1 | Shared inputs of the three copies (operand and carry-in) |
| `checkpoint` | in | 1 | Request a state comparison; one cycle is enough |
| `offline_test` | in | 1 | Production-test scan access. Its effect on SCE starts and ends one cycle after the pin changes. |
| `test_si` / `test_so` | in / out | 3 | Scan-in and scan-out of each copy |
| `fi_flip` | in | 3·(WIDTH+1) | Fault injection: invert a flip-flop at the next edge (copy I in the low bits) |
| `fi_sa1` | in | 3·(WIDTH+1) | Fault injection: hold a flip-flop output at 1 |
| `tmr_out` | out | WIDTH+1 | Voted output `{carry, sum}`, valid while `tmr_valid` is high |
| `tmr_valid` | out | 1 | Normal operation |
| `comparison`, `recovery` | out | 1 | Current mode |
| `mc_mode` | out | 1 | Degraded to master/checker |
| `unrecoverable` | out | 1 | Unrecoverable condition (sticky) |
| `fmr1`, `fmr2` | out | 2 | Faulty copies of the current round (0 = none) |
| `mrfm`, `ncf` | out | 2, 2 | Permanent-fault registers |

Tie `fi_flip` and `fi_sa1` to zero in normal use.

Parameters: `WIDTH` = 4 (sum width; the chain length is WIDTH+1) and
`NCF_LIMIT` = 3. The controller sizes its counters at $clog2(L_SC+1) bits,
which is 3 at the defaults. The controller itself works for any chain length,
because its only dependence on the chain is `L_SC`.

## What is fixed by the technique and what is chosen here

The following follow the technique as described:

- three copies, a voter that reports errors, and a controller that owns SCI and
  SCE of every chain;
- comparison on a voter error or a checkpoint;
- three pair counters that count up while comparing and down while recovering;
- the fault locator rules for zero, one, and two disjoint faulty copies;
- the FMR steering a multiplexer per copy, gated by recovery AND F(i);
- a priority-encoded choice of the source copy;
- SCE = recovery OR comparison OR off-line testing;
- the L_SC-cycle copy;
- the MRFM/NCF registers and the fall-back to master/checker.

These are this design's own choices:

- **The module under protection.** The scheme works for any scan-equipped
  sequential module. A 4-bit accumulator with carry-in was chosen because it is
  small and has every flip-flop in the chain.
- **Scan order and the hold input.** SCI enters the carry flip-flop, then
  the bits move down the sum from its top bit, and SCO is sum bit 0. While the
  controller is not in NORMAL the copies are frozen through a `hold` input, so
  that LOCATE and CHECK do not advance them.
- **Unclear counts.** Every count pattern outside the table above is
  unrecoverable. That includes overlapping two-copy faults.
- **Retry.** A failed CHECK retries with a new comparison.
- **Stuck states.** UNREC and the permanent-fault declaration both last until
  reset.
- **NCF_LIMIT = 3.** The value is chosen here. Clean and two-copy rounds reset
  NCF.
- **Master and checker.** The master is the lower-numbered remaining copy.
- **Encodings.** The FMR number encoding (0 = none) and the mode encoding are
  chosen here.
- **External test input.** The off-line test path adds an external scan input
  to each per-copy multiplexer.
- **Fault injection.** The fault-injection ports exist for experiments.

## Simulating

Every testbench is self-checking. It ends with
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/smertmr_pkg.sv rtl/*.sv \
          tb/tb_smertmr_top.sv --top-module tb_smertmr_top -Mdir obj_top
./obj_top/Vtb_smertmr_top
```

Replace `tb_smertmr_top` with any other testbench name.

| Testbench | What it shows |
|---|---|
| `tb_smertmr_top` | End to end at the default parameters. A golden accumulator model checks every valid output. It drives voter masking, error- and checkpoint-triggered rounds, one- and two-copy recovery, a fault during recovery (retry), a stuck-at fault leading to master/checker, both unrecoverable cases, and off-line scan. Round lengths are checked (12 or 6 cycles), and each mechanism must occur at least once. |
| `tb_fault_campaign` | 1500 random single- and multi-bit upsets in one or two copies. The outcome of each is checked against its ground truth, and the coverage is printed. |
| `tb_smertmr_controller` | The controller against behavioural shift-register chains. It covers all modes and cycle counts. |
| `tb_fault_locator` | Random error masks with known ground truth. |
| the rest | One per leaf block: exhaustive or randomized against a reference written in the testbench. |

Campaign result at the defaults:

| Faulty copies | Outcome |
|---|---|
| one | 100 % recovered |
| two | about 49 % recovered, 14 % flagged unrecoverable, 37 % undetectable (one error set contains the other) |

## Not included

The published description of SMERTMR names no function, size or benchmark
circuits for the protected module. The area and timing overheads it reports
for larger circuits therefore cannot be reproduced here. Only the recovery
mechanism is reproduced, and it is tested on the small accumulator described
above.
