# Dynamically reconfigurable bit-parallel NFA pattern matcher

This hardware matches a stream of bytes against many patterns at once and
reports every place where a pattern ends. The patterns are exact strings, or
"extended patterns": letter classes with `?`, `*`, `+` and bounded repeats
`{x,y}`. A pattern is not compiled into logic. Each pattern lives in a small,
fixed circuit (a *pattern matching module*, PMM) as a handful of 32-bit
bit-masks, kept in registers and block RAMs. That circuit simulates the
pattern's non-deterministic finite automaton (NFA) with shifts, ANDs, ORs and
one subtraction. It takes one letter per clock whatever the text is. To change
a pattern, the host rewrites its masks: about 500 packets per PMM, instead of
a new synthesis and place-and-route run.

The default build holds two matchers side by side:

| matcher | PMM type  | PMMs | L (bits) | pattern letters | mask RAM lines per PMM |
|---------|-----------|------|----------|-----------------|------------------------|
| EXT     | `pmm_ext` | 128  | 32       | 4,096           | 512 (MOVE + REPPOS)    |
| STR     | `pmm_str` | 256  | 32       | 8,192           | 256 (MOVE)             |

## How one PMM simulates an NFA

### Expanded form and bit-positions

An extended pattern is a sequence of components. Each component is a letter
class `α`: a single letter, `.` (any letter) or a set `[..]`. A component is
either plain (`α`) or carries an operator: `α?`, `α*`, `α+`. A bounded repeat
`α{x,y}` is first rewritten as `(α?)^(y-x) α^x`. After that, component *i*
(1-based) is NFA state *i*, and state 0 is the start. Component *i* uses
**bit i-1** of every L-bit mask, so bit-position 1 is the LSB. An expanded
pattern may have at most L = 32 components.

Example: `[AB]+ B .{1,3} [BC]? .* C` expands to
`[AB]+ B .? .? . [BC]? .* C`, which is 8 components.

### The masks

| mask        | storage    | bit i-1 is set when ...                                   |
|-------------|------------|-----------------------------------------------------------|
| `INIT`      | register   | i = 1                                                     |
| `ACCEPT`    | register   | i = m (last component)                                    |
| `MOVE[a]`   | block RAM  | letter a is in the class of component i                   |
| `REPPOS[a]` | block RAM  | component i is `α*` or `α+` and a is in α (self-loop)     |
| `EpsBEG`    | register   | i is the lowest state of an ε-block                       |
| `EpsEND`    | register   | i is the highest state of an ε-block                      |
| `EpsBLK`    | register   | i belongs to an ε-block                                   |

An **ε-block** is a maximal run of `?`/`*` components j..k together with the
state j-1 just before the run. An active state in the block makes every
later state of the block active with no letter consumed. The two RAMs have
256 lines, one per byte value. The current input letter is their read
address, so `MOVE[t]` and `REPPOS[t]` arrive together.

### The update, one letter per clock

```
S'   = (((S << 1) | INIT) & MOVE[t]) | (S & REPPOS[t])   // letter transitions
HIGH = S' | EpsEND
LOW  = HIGH - EpsBEG
S    = S' | (EpsBLK & (~LOW ^ HIGH))                      // ε-closure
match = (S & ACCEPT) != 0
```

The first line moves every active state along its letter edge and keeps
self-loops alive. OR-ing `INIT` in on every letter lets a match start at any
text position.

The last three lines compute the ε-closure of all blocks with one carry
chain. In each block, `HIGH` forces the top bit to 1. Subtracting the block's
lowest bit then borrows upward, up to the lowest active state of the block.
That inverts every bit from the block's bottom up to, but not including, that
state. `~LOW ^ HIGH` is 1 exactly at the positions above the lowest active
state. After masking with `EpsBLK`, these are the states reached through
ε-edges. The forced top bit stops the borrow at the block boundary, so
neighbouring blocks do not affect each other.

STATE trace of the example pattern on the text `ABCBBC` (bit-position 1 first):

| letter | STATE (positions 1..8) | match |
|--------|------------------------|-------|
| A      | 1 0 0 0 0 0 0 0        | 0     |
| B      | 1 1 1 1 0 0 0 0        | 0     |
| C      | 0 0 1 1 1 1 1 0        | 0     |
| B      | 1 0 0 1 1 1 1 0        | 0     |
| B      | 1 1 1 1 1 1 1 0        | 0     |
| C      | 0 0 1 1 1 1 1 1        | 1     |

The string PMM (`pmm_str`) keeps only `INIT`, `ACCEPT` and `MOVE`, and runs
`S = ((S << 1) | INIT) & MOVE[t]` (SHIFT-AND).

**Encoding limits the host must respect.** A leading `α?` or `α*` cannot be
encoded, because its ε-block would need state 0, which has no bit. Dropping
it does not change where matches end. Bounded repeats must be expanded before
loading. The masks are built by host software. The testbench package
`tb/tb_bpnfa_pkg.sv` has a compact reference version (`ext_pattern::compile`).

### PMM timing

The mask RAMs have a registered read. A letter offered in cycle c therefore
addresses the RAMs in c, and the masks reach the update logic in c+1. STATE
changes at the end of c+1, and `state`/`match` show the result from c+2 on.
Letters can follow each other on every clock. The global enable `adv` freezes
the RAM output register and STATE together, which stalls the whole PMM
without losing anything.

## Packets and modes

A matcher has one 64-bit valid/ready input stream and one 64-bit output stream
(field layout in `rtl/bpnfa_pkg.sv`):

```
input   [63:60] opcode  [59:44] PMM index  [43:40] register  [39:32] letter  [31:0] mask word
output  [63:60] OP_MATCH  [59:44] PMM index  [43:32] 0  [31:0] end position
```

| opcode          | mode            | effect                                                   |
|-----------------|-----------------|----------------------------------------------------------|
| `OP_CFG_REG`    | pre-processing  | write INIT / ACCEPT / EpsBEG / EpsEND / EpsBLK of one PMM |
| `OP_CFG_MOVE`   | pre-processing  | write line `letter` of MOVE of one PMM                   |
| `OP_CFG_REPPOS` | pre-processing  | write line `letter` of REPPOS of one PMM (EXT only)      |
| `OP_RUN`        | any             | enter run-time mode, clear every STATE, positions restart at 1 |
| `OP_TEXT`       | run-time        | one input letter for all PMMs                            |
| `OP_PRE`        | any             | back to pre-processing mode                              |
| `OP_NOP`        | any             | ignored                                                  |

The matcher takes one packet per clock. Loading a PMM therefore costs
5 + 512 = 517 clocks (EXT) or 2 + 256 = 258 clocks (STR). A PMM whose
registers were never written stays silent, because reset zeroes all mask
registers. RAM lines have no reset, so load all 256 lines of every PMM you
enable. A packet that does not fit the current mode is taken, dropped and
flagged on `err` for one cycle: for example, a mask write at run time or a
letter at pre-processing time. `OP_RUN` and `OP_PRE` wait until no letter or
match is still in flight.

## The matcher and its one stall

`bpnfa_matcher` broadcasts the decoded mask writes and letters to N PMMs.
Each mask write goes through one register stage, which keeps the fan-out
easy. `output_encoder` collects the N match flags after every STATE update.
It copies them into a pending register and sends one `OP_MATCH` packet per
set bit, lowest index first, one per clock.

Because of this, one stall is possible. If a position matches in k > 1
PMMs, or the host holds `out_ready` low, the encoder cannot take the next
match vector in time. It then raises `hold`, which drops `adv` for the whole
letter pipeline and drops `in_ready` for letters. No match is ever lost, and
the NFA update itself never waits. With `out_ready` high, a text of n letters
costs exactly

    sum over positions of max(1, matches at that position)  clocks

and a letter's first match packet leaves 3 cycles after the letter is taken.
Two assertions in `output_encoder` guard the scheme. A packet that is offered
stays stable until it is taken. STATE never advances over a match vector
that has not been copied.

## Where this RTL departs from, or adds to, the original design

* **Line 7 of the update** (`S = S' | ...`): the ε-closure result is OR-ed
  into the letter-transition result, as in the Extended SHIFT-AND method.
  This reproduces the published trace above. It also agrees with an explicit
  state-by-state NFA simulation on thousands of random patterns.
* **Packet layout, opcodes, error flag and drain-before-mode-switch** are
  this design's own. The original fixes only the 64-bit packet length and
  the two modes.
* **Output encoder**: the original only says that match information is sent
  to the host. Serialising to one (index, position) packet per clock, and
  stalling on multiple matches, are choices made here. Indices are 0-based.
  Positions are 1-based, count from `OP_RUN`, and wrap at 2^32.
* **Pipelining**: the two-stage PMM pipeline and the stall enable follow from
  the registered block-RAM read. The original gives no pipeline details.
* **STATE is not loadable.** The original's register count for EXT (6) is
  taken to include STATE. Here STATE is cleared by `OP_RUN`, so loading
  takes one packet less per PMM than the original's load-time formula.
* **Both matchers in one top**: the original built them as two separate
  FPGA designs. Here they share clock and reset only.
* **Not built**: the PMM for network and extended network expressions
  (alternation over strings). Only its operation names are known, so it is
  not part of this RTL. The host computer and the PCI Express link are
  outside the design. Their place is taken by the two packet streams.
* FPGA results (clock rate, slices, block-RAM use) cannot be reproduced by
  RTL simulation. The top synthesises to 4 Mbit of memory: 128 × 2 + 256 RAMs
  of 256 × 32 bits.

## Files

| file | contents |
|------|----------|
| `rtl/bpnfa_pkg.sv` | packet layout, opcodes, register selects, write-bus struct |
| `rtl/mask_ram.sv` | 256 × L block RAM, synchronous read with enable |
| `rtl/pmm_ext.sv` | extended-pattern PMM (Extended SHIFT-AND) |
| `rtl/pmm_str.sv` | string PMM (SHIFT-AND) |
| `rtl/input_decoder.sv` | packet decoding, modes, write bus, letters |
| `rtl/output_encoder.sv` | match vector → (index, position) packets, stall |
| `rtl/bpnfa_matcher.sv` | decoder + N PMMs + encoder |
| `rtl/bpnfa_top.sv` | EXT matcher (128 PMMs) and STR matcher (256 PMMs) |
| `tb/tb_bpnfa_pkg.sv` | pattern model: mask compiler, NFA reference, random patterns and matching words |
| `tb/tb_matcher_host.sv` | host model: loads, streams, checks packets, counts mechanisms |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_pmm_ext`: the published mask table and STATE trace, then 60 random
  patterns with random bubbles and stalls. STATE is compared every cycle
  with the NFA reference.
* `tb_pmm_str`: matches of `ABABC`, then 80 random strings against the
  reference.
* `tb_mask_ram`, `tb_input_decoder`, `tb_output_encoder`: the block rules,
  directed and random. The encoder test also checks the cycle cost of dense
  matches.
* `tb_bpnfa_matcher`: both classes with 8 PMMs each, end to end.
* `tb_bpnfa_top`: the full default configuration. All 128 EXT and 256 STR
  PMMs are loaded with 32-component patterns, texts with planted matches are
  streamed, and some PMMs are then reconfigured under host backpressure.
  Load cycles and text cycles are checked exactly. The test fails unless
  stalls, multi-match positions, backpressure, mode switches, dropped
  packets and reconfiguration all happened on both matchers. It runs in
  seconds after a build of under a minute.

## Simulating

Each testbench needs the package files first, then the RTL it uses:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_bpnfa_top \
  rtl/bpnfa_pkg.sv tb/tb_bpnfa_pkg.sv rtl/mask_ram.sv rtl/pmm_ext.sv \
  rtl/pmm_str.sv rtl/input_decoder.sv rtl/output_encoder.sv \
  rtl/bpnfa_matcher.sv rtl/bpnfa_top.sv tb/tb_matcher_host.sv \
  tb/tb_bpnfa_top.sv -o sim
./obj_dir/sim
```

Change the number of PMMs with `N_EXT`/`N_STR` on `bpnfa_top`, or with `N` on
`bpnfa_matcher`. `L` may be at most 32, the mask field of a packet.
