# Staggered-voting TMR shift-register chains for poly-Si TFT-LCD drivers

A display driver built on the glass of a poly-Si TFT-LCD has long
shift-register (S/R) chains. An XGA panel has 768 stages in the gate driver,
one per gate line, and 1024 stages in the data driver, one per column latch.
A start pulse enters the top of a chain and moves down one stage per clock.
One defective stage stops the pulse, and the whole panel is lost. So the
yield of these chains matters, and triple modular redundancy (TMR) is the
obvious fix.

Classic single-voter TMR has a weak point here. It uses three S/Rs and one
2-of-3 majority voter per stage, and the voter output feeds all three S/Rs
of the next stage. On glass, a static voter (about 18 transistors) is as
large as the static S/R it protects (about 16 transistors), so it is about
as likely to be defective. A dead voter then kills all three copies at
once. Three voters per stage avoid this, but cost six times the plain
chain.

**Staggered voting** uses the same hardware as single-voter TMR: three S/Rs
and one voter per stage. It changes only where the voter output goes:

* the voter of stage *s* drives **only one** S/R of stage *s+1*, the one on
  its own chain;
* the voter sits on a **different chain in each stage**: chain 0, 1, 2, 0,
  1, 2, ... (chain = *s* mod 3).

The other two S/Rs of each stage are fed straight from the S/R above them on
their own chain.

```
 stage   chain 0      chain 1      chain 2
   s    [SR s,0]     [SR s,1]     [SR s,2]       voter V_s on chain 0
           |  \________ | ________/  |           (votes all three)
          V_s           |            |
           |            |            |
  s+1   [SR s+1,0]   [SR s+1,1]   [SR s+1,2]     voter on chain 1
           \___________ V_s+1 _______/
           |            |            |
  s+2   [SR s+2,0]   [SR s+2,1]   [SR s+2,2]     voter on chain 2
           \________________________ V_s+2
           |            |            |
  s+3      ...  voter back on chain 0
```

## How defects are masked, and how far they spread

The hard part of this design is what a single defect does to the three
copies. Each stage's voter outvotes one wrong copy. A wrong copy is only
*corrected* when a voter sits on that copy's chain, which happens once every
three stages. So a defect leaves a short stretch of one chain wrong, and the
design works as long as no two such stretches overlap in the same stage.

| Defect | Chain(s) carrying a wrong value | Voted outputs |
|---|---|---|
| S/R at stage *s* on chain *c* | chain *c* from stage *s* down to the first stage *s′ ≥ s* whose voter is on chain *c*. That is 1 to 3 stages; if *s* mod 3 = *c*, only stage *s* itself | all correct |
| voter of stage *s* (on chain *p = s* mod 3) | chain *p* in stages *s+1*, *s+2* and *s+3*. The voter of stage *s+3* is on chain *p* again and restores it | all correct except the defective voter's own output, `stage_out[s]` |
| voter of stage *s* **and** the S/R of stage *s* on the voter's chain | as for the voter alone: the bad S/R only feeds the voter that is already dead | as for the voter alone |
| two S/Rs of one stage | — | that stage's voter follows the two bad copies: **not masked** |

Which elements must all be good for a given defect to be masked follows from
this table. Summing the probabilities of the maskable cases gives the
chance that one stage's defects are tolerated, if every S/R and voter fails
independently with probability *A*:

    P = (1-A)^4 + A(1-A)^6 + A(1-A)^10 + A(1-A)^14 + A(1-A)^15 + A^2(1-A)^14

This P counts only the cases listed above, so it is a conservative figure.
The chance that a stage is *not* tolerated is then about 38·A². That is
3.8e-7 at A = 1e-4 and 3.8e-11 at A = 1e-6. Three voters per stage give about
6·A² at one and a half times the hardware. A single voter per stage gives about A, no better
than no redundancy.

**Output taps.** Each stage's output (`gate_line`, `latch_en`) comes from
that stage's voter. A defective voter therefore corrupts its own line, even
though the chain beyond it keeps running. Tapping the output elsewhere
would need extra hardware, which this design does not add.

## Timing

Every S/R is a rising-edge flip-flop. `sp_in` is sampled at one clock edge.
Stage *s*'s voted output then shows it for one cycle, *s*+1 edges later. So
a one-cycle start pulse gives a one-cycle pulse that walks through the
stages one per clock. The voters are combinational, so a stage's output is
valid as soon as its S/Rs have settled. Any bit pattern on `sp_in` shifts
through the chain unchanged (the testbenches use random patterns). Reset is
asynchronous and active low, and clears every S/R.

## Modules

| File | What it is |
|---|---|
| `rtl/svtmr_pkg.sv` | shared package: `NMR` = 3, the `defect_t` stuck-at struct, `NO_DEFECT`, `voter_chain(s)` = *s* mod 3, `apply_defect()` |
| `rtl/sr_cell.sv` | one S/R stage: D flip-flop with asynchronous reset and a stuck-at override on its output |
| `rtl/majority_voter.sv` | 2-of-3 voter: the OR of the three pairwise ANDs, with a stuck-at override |
| `rtl/staggered_tmr_chain.sv` | `STAGES` × 3 `sr_cell` plus `STAGES` voters, wired as above |
| `rtl/tft_sr_chains.sv` | top: gate-driver chain (`GATE_STAGES` = 768, output `gate_line`) and data-driver chain (`DATA_STAGES` = 1024, output `latch_en`) |

`staggered_tmr_chain` ports: `clk`, `rst_n`, `sp_in`,
`sr_defect[STAGES][3]`, `voter_defect[STAGES]`, `stage_out[STAGES]`,
`sr_q[STAGES][3]`. The top has one such set per chain, prefixed `gate_` or
`data_`, and a shared `rst_n`. The two chains have their own clocks,
`gate_clk` and `data_clk`.

### Defect inputs

Each S/R cell and each voter has a `defect_t` input `{stuck, value}`. When
`stuck` is set, the element's output is forced to `value`. This models a
manufacturing defect as a stuck-at output, so the masking can be shown in
simulation. In a real panel, tie all defect inputs to zero. Synthesis then
removes the override multiplexers. `sr_q` brings out the raw copies so
that a test can see how far a defect spreads.

### Synthesis note

The three S/Rs of stage 0 have the same input and clock. A synthesis tool
that merges equivalent registers folds them into one. Yosys does this and
reports 3·STAGES − 2 flip-flops per chain. Later stages stay separate
because their inputs differ. A real TMR netlist needs the tool's
keep/preserve attributes on the S/R cells. They are left out here because
they depend on the tool.

## Design choices beyond the basic scheme

* The S/R cell is a plain D flip-flop. A real static S/R on glass is a
  transistor-level circuit clocked by the panel's clock phases; only its
  function (one stage per clock) is modelled.
* The voter placement uses the canonical rotation *s* mod 3. Other
  rotations are possible and would change the spread table above.
* Stage 0's three S/Rs all take the external start pulse.
* Stage outputs are taken from the voters (see *Output taps*).
* Defects are modelled as stuck-at-0 or stuck-at-1 outputs.
* Both the gate and the data chain use staggered voting. They run on
  separate clocks.
* The asynchronous reset is an addition for simulation and start-up.

Not included: the data latches that `latch_en` would clock, the level
shifters after `gate_line`, the D/A converters and buffers, the pixel array,
and the external timing controller. These are analog or off-panel parts,
or are not specified far enough to build. Also not included: plain,
single-voter and three-voter chains, which serve only as comparisons, and
a generalisation to *n*-modular redundancy.

## Simulation

Every testbench checks itself. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks | Run time |
|---|---|---|
| `tb/tb_sr_cell.sv` | one-cycle delay on a random stream, pulse width, asynchronous reset, both stuck-at defects | < 1 s |
| `tb/tb_majority_voter.sv` | all 8 inputs against a population count, both stuck-at defects | < 1 s |
| `tb/tb_staggered_tmr_chain.sv` | a 24-stage chain against an ideal delay line: defect-free traffic, latency = `STAGES` cycles, **every** single S/R and voter defect (stuck at 0 and at 1), voter plus own-chain S/R double defects, 60 random sets of defects spaced 6 stages apart, one unmaskable double S/R defect; the raw copies are checked against the spread table; each effect is counted and must occur | < 1 s |
| `tb/tb_table1_cases.sv` | a 768-stage chain, one defective stage in the middle: the six cases (none, voter, S/R on each of the three chains, voter plus own-chain S/R), stuck at 0 and 1; checks that each spoilt stretch ends exactly where the spread table says | < 1 s |
| `tb/tb_tft_sr_chains.sv` | top at its default size (768 / 1024): one full frame, with the gate pulse over all 768 lines and a data scan over all 1024 columns in each line; four defect sites per chain (S/R stuck high, voter stuck, voter plus own-chain S/R, S/R stuck low); voted outputs checked every cycle, raw copies sampled | about 2.5 min |

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_staggered_tmr_chain \
    -y rtl -y tb +libext+.sv rtl/svtmr_pkg.sv tb/tb_staggered_tmr_chain.sv
./obj_dir/Vtb_staggered_tmr_chain
```

The same pattern works for the other testbenches: name the testbench as the
top module and give its file. Lint the design with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/svtmr_pkg.sv rtl/tft_sr_chains.sv`.
The only warning is that the package constant `NO_DEFECT` is unused inside
the RTL; the testbenches use it.

To change the chain lengths, override `GATE_STAGES` and `DATA_STAGES` on
the top, or `STAGES` on `staggered_tmr_chain`. Any length of one or more
works.
