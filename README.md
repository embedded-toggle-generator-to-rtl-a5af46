# Programmable toggle generator for modular scan test

When a system chip (or a stack of dies) is tested one module at a time, the
module under test (MUT) receives carefully constrained test patterns, but its
neighbours usually see the MUT's scan data streaming past them. Treated as
data by the neighbours, those patterns are random, so the neighbours switch
far more than they ever do in normal operation. That raises IR drop and
temperature around the MUT and can make a good part fail. Silencing the
neighbours completely errs the other way: the MUT is then tested under
conditions that are milder than in the field.

This design gives every core a small **programmable toggle generator (PTG)**.
While a core is a neighbour, its scan chains are shifted with a regular
pattern from its own PTG instead of the passing data. The pattern is runs of
0s and 1s of a programmed length, so the neighbour's switching activity can
be set to match its functional level. The generator is programmed through
the normal serial test port, in the same way as the wrapper instructions.

The RTL contains both generator variants, the core wrapper that hosts a
generator, and a three-core SoC that puts it all together:

| module | what it is |
|---|---|
| `ptg_single` | single-pattern generator (TG1): one run length |
| `ptg_combined` | combined generator (TG2): two run lengths, each with a repeat count |
| `rl_register`, `run_counter`, `eq_comparator`, `toggle_ff` | the parts both generators are built from |
| `scan_in_select` | TGON multiplexer: normal scan input or toggle pattern, with per-chain silencing |
| `scan_chains` | the core's internal scan chains (NUM_SC × LEN flip-flops) |
| `wir`, `wby` | wrapper instruction register and bypass register |
| `core_wrapper` | one core with its wrapper and PTG |
| `soc_top` | cores A, B and C daisy-chained between WSI and WSO |
| `tg_pkg` | widths, the instruction enum and its decoder |

## Toggle patterns and what "run length" means

A toggle pattern is `0…0 1…1 0…0 1…1 …`, where every run is RL bits long.
When the pattern is shifted into a scan chain, each flip-flop toggles once
for every run boundary that passes it, so the chains switch at a rate of
1/RL per shift. A pattern with runs of 1 toggles every flip-flop on every
shift (100 %), runs of 2 give 50 %, and so on.

**The value stored in a generator field is the length of one run.** A
pattern *period* (one run of 0s plus one run of 1s) is twice that. Published
pattern lists for this kind of generator give periods from 2 to 250 (2, 4, 8,
16, 32, 64, 126, 188, 250), which become stored runs of 1 … 125. All of these
fit the 7-bit field. An odd period such as 255 cannot be split into two equal
runs. The nearest value is 127, which gives a period of 254.

A stored 0 means 2^7 = 128 (the counter wraps around before it matches).

## The single-pattern generator (`ptg_single`)

The generator has four parts:

* a 7-bit serial-in, parallel-out **RL register**;
* a 7-bit **counter** with two resets, an external one and an internal one;
* an **equality comparator** between the counter and the register;
* a **JK flip-flop with J = K = 1**, which inverts on every comparator hit.

The counter restarts at 1. When it equals the stored run length, the
comparator fires: the flip-flop inverts the output and the counter is reset
through its internal reset. Each run therefore lasts exactly RL enabled
clocks.

Operation has two phases:

1. **Store phase** (`load_en` = 1): the run length is shifted in on `si`,
   most-significant bit first. Meanwhile the counter and the flip-flop are
   held in reset.
2. **Toggle phase**: each clock with `en` = 1 puts one pattern bit on `tp`
   and advances the generator. The first RL bits are 0s. `en` is the
   neighbour's scan-shift strobe, so the chains receive consecutive pattern
   bits.

`rst` (TGReset) restarts the pattern and clears the register. The comparator
in the original schematic clocks the JK flip-flop directly. Here it is a
clock enable on the single test clock, so the whole design has one clock
domain. The separate load clock of the RL register is likewise a clock
enable (`load_en`).

## The combined generator (`ptg_combined`)

One run length can only reach rates of 1/RL. To hit a target between two
such rates, the combined generator alternates between two patterns. Pattern
0 (run RL0) is repeated REP0 times, then pattern 1 (run RL1) is repeated
REP1 times, and the cycle repeats endlessly. One repetition is one run of 0s
followed by one run of 1s. The resulting rate is

    (2·REP0 + 2·REP1) / (2·RL0·REP0 + 2·RL1·REP1)   toggles per flip-flop per shift

For example, periods 8 ×7 and 16 ×1 (RL0=4, REP0=7, RL1=8, REP1=1) give
22.2 %, between the 25 % of period 8 and the 12.5 % of period 16.

**Programming vector.** The register is 22 bits, N = 2n + 2m with n = 7 and
m = 4. It is shifted in most-significant bit first:

    bit 21      18 17      14 13          7 6           0
        [  REP1   ][  REP0   ][    RL1     ][    RL0     ]

The vector `0011 0010 0010100 0001110` therefore means: run 14 repeated
twice, then run 20 repeated three times.

**Inside.** Two multiplexers, steered by a second JK flip-flop ("select
toggle pattern", output `sel`), present the run length and repeat count of
the active pattern. The n-bit counter, comparator and flip-flop make the runs
exactly as in `ptg_single`. A 4-bit counter counts completed repetitions of
the active pattern; it advances when a run of 1s ends. On the last
repetition, the repeat comparator matches. At the end of that repetition the
select flip-flop inverts and the repeat counter restarts. Switching always
happens on a period boundary, so each pattern starts with a run of 0s.

A repeat field of 0 means 16 repetitions. To use only one pattern (a mix
"P ×1 with Q ×0"), load P into both slots.

## The wrapped core (`core_wrapper`)

Each core has an IEEE 1500 style serial wrapper. Its parts are:

* the WIR (instruction register);
* the WBY (one-bit bypass);
* a Bypass multiplexer and a Select-WIR multiplexer in front of WSO;
* in front of the internal scan chains, the TGON multiplexer. It chooses
  between the serial data (input 0) and the PTG output (input 1).

With TGON set, the single PTG output is fanned out to all chains at once.

All wrapper signals run on one test clock, which is also the generator clock:

| signal | function |
|---|---|
| `select_wir` | the WIR is the serial register between WSI and WSO |
| `shift_wr` | shift the selected register (and the chains, when the instruction enables them) |
| `update_wr` | with `select_wir`: make the shifted word the current instruction |
| `capture_wr` | chains of an INTEST or NEIGHBOR core load `func_d` (the core logic's next state) |
| `rst` | wrapper and generator reset; instruction becomes BYPASS |

The WIR word is `{silent[NUM_SC-1:0], opcode[1:0]}`, shifted in
least-significant bit first. The opcodes are:

| opcode | instruction | WSI → WSO path | scan chains | PTG |
|---|---|---|---|---|
| 0 | `WI_BYPASS` | WBY | hold | idle |
| 1 | `WI_INTEST` (MUT) | chain 0 → … → chain NUM_SC-1 | shift serial data, capture | idle |
| 2 | `WI_NEIGHBOR` | WBY | shift the toggle pattern, capture | one bit per shift |
| 3 | `WI_TG_LOAD` | WBY | hold | store phase: WSI also shifts into the RL register |

In `WI_NEIGHBOR`, a chain whose `silent` bit is set receives a constant 0
instead of the pattern. This silent-chain option lowers and evens out the
activity when the chains are short compared with the pattern. Which chains
to silence is chosen offline, by simulating the core.

Latency: a bit on a core's WSI reaches its WSO after 1 shift through WBY, or
after NUM_SC·LEN shifts through the chains. In the INTEST path the chain's
last flip-flop drives WSO directly.

## The SoC (`soc_top`) and how to program it

Cores A, B and C sit in series, `WSI → A → B → C → WSO`, and share the
wrapper controls. Core A has the single generator; B and C have the combined
one (parameter `COMBINED`, bit 0 = core A). Each core defaults to 3 chains of
343 flip-flops. The core logic is not part of this design. Its capture inputs
(`func_d`) and the flip-flop contents it would see (`state`) are ports, and so
are the generator outputs (`tgso`).

A typical modular test with B as MUT and A, C as neighbours:

1. **Instruction scan.** The three WIRs form one chain. Shift 3 × 5 bits with
   `select_wir` = 1: core C's word first, then B's, then A's, each LSB first.
   Then pulse `update_wr`.
2. **Program the generators.** Put the target core in `WI_TG_LOAD` and the
   others in `WI_BYPASS`, then shift its vector. Every bypassed core in front
   of it delays the data by one shift, and bits shifted after the vector move
   it on. So for core C behind A and B, shift the 22-bit vector followed by 2
   padding bits. Program the cores one at a time: the vectors differ in
   length, and a shared stream would overlap them.
3. **Set the roles.** A = `WI_NEIGHBOR`, B = `WI_INTEST`,
   C = `WI_NEIGHBOR` (optionally with silent chains).
4. **Scan test of B.** Each shift moves B's chains by one. A and C shift
   their toggle patterns at the same time. A capture pulse captures in all
   three cores, so the neighbours also switch during capture. The path
   WSI → B → WSO is NUM_SC·LEN + 2 flip-flops long: a bit appears on WSO
   NUM_SC·LEN + 1 shifts after it was applied.

Storing a new vector, or a reset, restarts that core's pattern from its
first run of 0s.

## Sizes and parameters

| parameter | default | where from |
|---|---|---|
| run-length field `RL_W` / `N_RL` | 7 | bus width of the single generator's schematic; 7-bit fields of the programming example |
| repeat field `REP_W` / `M_REP` | 4 | 4-bit fields of the programming example; repeat counts up to 15 in published mixes |
| `NUM_SC` × `LEN` | 3 × 343 | the industrial design D2 of the evaluated set |
| `NUM_CORES` | 3 | cores A, B, C |

Other evaluated circuits differ only in chain count and length: s5378
2 × 89, s9234 2 × 105, s15850 3 × 178, s38417 3 × 545 and s38584 3 × 475.
Set `NUM_SC` and `LEN` to match. The generators do not depend on the chain
size.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/tg_pkg.sv tb/tb_soc_top.sv --top-module tb_soc_top -o sim
    ./obj_dir/sim

What the testbenches cover:

* **The generators.** `tb_ptg_single` checks every listed run length bit by
  bit against `(k / RL) mod 2`. It also checks that the first run of 0s is
  exactly RL enabled clocks long. `tb_ptg_combined` checks the programming
  example, several published mixes, the zero-means-16 case and random
  configurations against a reference sequence.
* **The wrapper and the SoC.** `tb_core_wrapper` and `tb_soc_top` compare
  every core, every clock, with a cycle model of the wrapper
  (`tb/wrap_model_pkg.sv`). `tb_soc_top` runs at full size. It checks the MUT
  latency and counts each mechanism: instruction update, bypass, store phase
  of both generator kinds, MUT shift, neighbour shift, pattern switch,
  silent chain and capture.
* **The workloads.** `tb_workload_patterns` loads every listed period and
  all 35 representable published mixes into full-size cores. It counts the
  flip-flop toggles over whole pattern cycles and checks them exactly
  against the rate formula. It prints each rate (e.g. 100 %, 50 %, … 0.8 %, and 22.2 % for 8 ×7 + 16 ×1).

## Where this design makes its own choices

The generators follow their schematics: register, counter, comparator, JK
flip-flop, and for TG2 the multiplexers and the repetition counter. The
following were filled in:

* **Run-length convention.** The stored value is one run, and a listed
  pattern length is a period. The field widths and the listed values only fit
  this way round. The repeat counter counts completed periods, not clock
  cycles.
* **Counter reset value.** The counters restart at 1, so that the stored
  value equals the run length.
* **One clock domain.** Comparator-clocked flip-flops and the separate load
  clock became clock enables.
* **Wrapper details.** The WIR encoding, its width, the instruction set, the
  shift/update protocol, the silence bits in the WIR, and the shared wrapper
  controls are all this design's own.
* **Chain hardware.** How chains are silenced (forced to 0) and the capture
  interface of the scan chains are this design's own.
* **Generator mix.** Which core carries which generator is a free choice.

Concurrent assertions state three rules: a pattern bit changes only on a
comparator hit, the combined generator switches patterns only at the end of
a repetition, and the wrapper never shifts while it captures or updates.

The switching activity of a whole circuit, counted over all nets, depends on
the core logic. This RTL does not contain that logic. The toggle rates the
testbenches report are for the scan flip-flops only.
