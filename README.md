# Low-power LFSR test pattern generator for BIST

Pseudo-random built-in self-test (BIST) feeds a circuit under test (CUT) from
a linear feedback shift register (LFSR). Consecutive LFSR states are nearly
uncorrelated, so about half of the CUT inputs toggle on every test clock, and
the CUT burns far more dynamic power during test than in normal operation.

Dynamic power goes as P = ½ · VDD² · E(sw) · C_L · f_clk, where E(sw) is the
average number of output transitions per clock. Lowering E(sw) at the CUT
inputs cuts test power without touching supply voltage or test clock.

This design lowers that switching without changing the test set. Between two
successive LFSR states T1 and T2 it inserts three intermediate vectors Ta, Tb
and Tc, each of which moves only part of the bits from their T1 value to their
T2 value. Every bit changes at most once on the way T1 → Ta → Tb → Tc → T2, so
the five vectors together have exactly as many transitions as T1 → T2 alone,
now spread over four clocks. The pattern output switches a quarter as much per
clock, and never more than half the bits in one clock.

The generator sits in a complete BIST wrapper: a controller, a multiplexer that
shares the CUT inputs between functional and test use, a multiple-input
signature register (MISR) and a response analyzer that gives a go / no-go
verdict.

## The low-power LFSR (`lp_lfsr`, `rinj`, `lp_lfsr_ctrl`)

### Stages and halves

The LFSR has 8 stages in Fibonacci form: stage 1 takes the XOR of stages
8, 6, 5 and 4 (polynomial x^8 + x^6 + x^5 + x^4 + 1, maximal length, period
255), and every other stage takes the stage before it. In the vectors, bit
*i* is stage *i*+1. The seed is `8'h01`.

The stages are split into a first half (stages 1–4) and a second half
(stages 5–8), each with its own load enable, `en1` and `en2`. Each stage also
has:

* an **injector** (`rinj`). It forms the AND and the OR of the stage's present
  state `q` and next state `d`, and a 2:1 multiplexer picks one under the
  select `R` (0 = AND, 1 = OR). If `q == d` the output is that value. If they
  differ the output is `R`. Either way it equals `q` or `d`, so it never adds a
  transition.
* an **output multiplexer**: select 0 passes the flip-flop, select 1 passes
  the injector. `sle1` drives the muxes of the first half, `sle2` those of the
  second half.

### The four phases of one LFSR step

`lp_lfsr_ctrl` is a 2-bit phase counter that turns the four phases into the
control lines:

| phase | output `tp` (stages 8..5 / 4..1) | controls | at the clock edge |
|-------|-----------------------------------|----------|-------------------|
| T1 | T1.hi / T1.lo | — | — |
| Ta | T1.hi / inj(T1.lo, T2.lo) | `sle1`, `en1` | first half loads T2.lo |
| Tb | T1.hi / T2.lo | — | — |
| Tc | inj(T1.hi, T2.hi) / T2.lo | `sle2`, `en2`, `step` | second half loads T2.hi |

The next clock shows T2, which is the T1 of the next step. `inj(a,b)` is
`a & b` for `R = 0` and `a | b` for `R = 1`.

Assertions in `lp_lfsr_ctrl` check that the two halves never load in the same
clock and that a half loads only while its injectors are on the output. An
assertion in `lp_bist_top` checks that, while the generator runs, no clock
changes more than half of the pattern bits.

### The boundary flip-flop

Because the halves load at different times, stage 5 would see the *new*
stage-4 value by the time the second half loads. A ninth flip-flop,
`hold_q`, saves the old stage-4 value when the first half loads, and the
second half shifts that in. The feedback into stage 1 is taken while the
second half still holds T1, so it is correct as it stands. With this, the
states seen at phase T1 are exactly the states of a conventional 8-stage LFSR
with the same polynomial and seed. The test set and its fault coverage are
unchanged. If `en1` and `en2` are raised in the same clock the register makes
an ordinary LFSR step.

### Injector select R

`inj_r` is a top-level input. With R = 1, the bits that are about to change
show 1 in the intermediate vector; with R = 0 they show 0. Either choice gives
the same transition count, but the intermediate vectors, and so the signature,
differ. The expected signature must be computed for the R that is used.

## BIST wrapper (`lp_bist_top`)

```
 func_in ──►┌──────────┐ cut_pi            cut_po ┌──────┐ signature ┌─────┐
            │ test_mux ├────────► (CUT) ─────────►│ misr ├──────────►│ tra ├─► go / nogo
   tp ─────►└────▲─────┘                          └──▲───┘ golden ──►└──▲──┘
   ▲             │test_sel                           │misr_en           │tra_check
 lp_lfsr ◄── lp_lfsr_ctrl ◄── lfsr_run ── bcu ───────┴──────────────────┘
                                          ▲ test_mode (Normal/Test)
```

The CUT is not part of the design. The top drives its inputs on `cut_pi` and
reads its outputs on `cut_po`. The CUT is assumed combinational: the MISR
takes the response in the same clock as the pattern that caused it. A
sequential CUT needs its latency added before `misr_en`.

**Controller (`bcu`).** The controller has five states:

* **NORMAL:** the CUT sees `func_in`.
* **INIT:** lasts one clock. It loads the seed and clears the MISR, the
  analyzer and the phase counter.
* **RUN:** lasts `4*NUM_PATTERNS` clocks. The generator steps and the MISR
  takes one response per clock.
* **CHECK:** lasts one clock. The analyzer compares the signature with the
  expected one.
* **DONE:** `done` is high, with `go` or `nogo` held, until `test_mode` falls.

Dropping `test_mode` in INIT or RUN aborts to NORMAL. The next run starts
again from the seed.

**MISR (`misr`).** It has 8 bits and uses the generator polynomial. It shifts
with feedback, then XORs in the response word, and starts from zero.

**Analyzer (`tra`).** It registers `sig == golden` on the check pulse. It
drives `go = done & match` and `nogo = done & ~match`.

### Timing

With the defaults (`NUM_PATTERNS = 255`), a test applies 1020 vectors (255
LFSR states plus 765 intermediate vectors). `done` rises on the 1023rd
rising clock edge that sees `test_mode` high.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `lp_bist_pkg` | `WIDTH` | 8 | generator width |
| | `TAPS` | `8'b1011_1000` | feedback stages 8, 6, 5, 4 |
| | `SEED` | `8'h01` | reset / start value |
| `lp_bist_top` | `W`, `POLY_TAPS`, `SEED_VAL` | from the package | as above |
| | `NUM_PATTERNS` | 255 | LFSR steps per test (one full period) |

`W` must be even and at least 4. If you change `POLY_TAPS`, the testbenches'
reference models, which hard-code the 8, 6, 5, 4 taps, must change with it.

## What follows the source, and what is this design's own

The following come from the published description of the low-power LFSR:

* the eight stages;
* the two halves with enables En1/En2;
* one injector per stage: AND gate, OR gate and 2:1 mux under R;
* one output mux per stage, driven by Sle1/Sle2;
* three intermediate vectors between successive states, with the transitions
  of the five vectors equal to those of the direct step;
* first half active while the second is idle, then the reverse.

The BIST roles come from the same source: a TPG feeding the CUT, a MISR, a
response analyzer, and a controller started by a Normal/Test signal that
reconfigures the input multiplexer and yields go / no-go.

The following are choices of this design:

* the polynomial, the seed and the test length;
* the exact makeup of Ta/Tb/Tc (which half is injected, and in which order);
* which mux input is the injector;
* the boundary flip-flop;
* one vector per clock;
* the MISR polynomial and start value;
* the expected signature as an input port;
* the controller's states and timing;
* active-low asynchronous reset on every register.

The source reports, from FPGA power analysis, 46% lower total power and 44.6%
lower output dynamic power than a conventional LFSR. This RTL has not been
power-analysed. What the testbenches measure is output switching:

* LP-LFSR: 1.004 transitions per clock, at most 2 bits in a clock.
* Conventional 8-stage LFSR on the same clock: 4.016 transitions per clock, up
  to 8 bits.

Not included:

* the CUT;
* a bit-swapping LFSR variant with scan-chain ordering, which is mentioned
  without detail;
* scan chains.

## Files

`rtl/`:

* `lp_bist_pkg.sv`: width, taps, seed, phase and controller enums.
* `rinj.sv`: the injector cell.
* `lp_lfsr.sv`: the low-power LFSR datapath.
* `lp_lfsr_ctrl.sv`: the phase sequencer.
* `misr.sv`, `tra.sv`, `test_mux.sv`, `bcu.sv`: the BIST parts.
* `lp_bist_top.sv`: the wrapper.

`tb/`:

* `tb_<module>.sv`: one self-checking testbench per module. Each ends with a
  `TB_RESULT checks=N failures=M` line.
* `tb_lp_bist_top.sv`: the end-to-end test at default size. It makes
  five runs: OR and AND injector, a wrong expected signature, a stuck-at fault
  in the CUT, and an aborted run. It checks every vector against an
  independent reference model, the signature, the verdict, the run length and
  the transition property. It also counts each mechanism.
* `tb_switching_activity.sv`: the switching comparison above.
* `cut_model.sv`: a small combinational CUT stand-in, with a stuck-at-0 fault
  that can be switched on.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/lp_bist_pkg.sv tb/tb_lp_bist_top.sv --top-module tb_lp_bist_top
./obj_dir/Vtb_lp_bist_top
```

Replace `tb_lp_bist_top` with any other testbench name. Every run takes well
under a second. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/lp_bist_pkg.sv rtl/<module>.sv`.
