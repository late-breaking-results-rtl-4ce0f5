# Configurable ring oscillators as a power-analysis countermeasure

A power-analysis attacker records thousands of power traces of a chip and
averages away the noise until the data-dependent part shows. One defence is to
add noise that is hard to average or filter out. Another is to detect the attack
in the first place. Ring oscillators (ROs) serve both purposes:

* **Detection.** An attacker's shunt resistor in the supply lowers the core
  voltage, and that shifts the frequency of on-chip ROs. A large array of ROs
  can be measured from time to time, and an attack detector judges the
  frequency deviations.
* **Countermeasure.** Once an attack is detected, part of the same array is
  rewired into longer rings. These are switched on and off for random numbers
  of clock cycles, and their lengths are changed at random. The result is supply
  noise with random timing, amplitude and frequency. It has no fixed tone that a
  simple frequency filter could remove.

The same configurable inverters serve both uses, so the countermeasure costs no
area beyond the detection array. In the reference FPGA prototype, detection uses
256 chains (16,640 inverters, one LUT each) and the countermeasure uses 32 of
them (2,080 inverters).

This repository holds synthesizable SystemVerilog for the RO array, its
control and its random number source, with self-checking testbenches.

## Block overview

```
                 attack_i, det_en_i   (from an external attack detector)
                        |
          +-------------v-------------+        +-------+
          |        cm_control         |<-rnd---| prng  |
          |  mode, R-cycle on/off,    |--next->|       |
          |  c_sel per chain          |        +-------+
          +--+--------+---------+-----+
        sel  |   en[c]|  c_sel[c]
             v        v         v
   +------------------------------------------+
   | rcro_chain 0 .. N_CHAINS-1               |  ro_o[c][0..64]  -> frequency monitor
   |  13 x ( cci + 4 x sci )  = 65 CIs        |  ring_o[c]
   +------------------------------------------+
```

| File | Contents |
|---|---|
| `rtl/ro_cm_pkg.sv` | chain geometry (13 groups x 5 CIs), `R_W`, mode and phase enums, `ring_length()` |
| `rtl/sci.sv` | simple configurable inverter |
| `rtl/cci.sv` | complex configurable inverter |
| `rtl/rcro_chain.sv` | one 65-stage runtime-configurable RO chain |
| `rtl/prng.sv` | pseudo random number generator (parallel xorshift32) |
| `rtl/cm_control.sv` | central control: mode switch, random on/off, random ring lengths |
| `rtl/ro_countermeasure_top.sv` | the whole array with control and generator |

## The configurable inverters

Each stage of a chain is a configurable inverter (CI): a multiplexer in front of
an inverter, with a shared enable. There are two kinds.

| Stage | `en` | `sel` | `c_sel` | inverter input |
|---|---|---|---|---|
| SCI, CCI | 0 | x | x | none; output held at `STOP_VAL` |
| SCI, CCI | 1 | 0 | x | its own output, giving a length-one RO |
| SCI, CCI | 1 | 1 | 0 | output of the stage just before it |
| CCI only | 1 | 1 | 1 | output of the previous CCI, bypassing four SCIs |

The SCI needs four LUT inputs (`en`, `sel`, `prev_i`, own output). The CCI needs
six, so each CI fits in one 6-input LUT.

Each CI output follows its inputs after `GATE_DELAY` (default 500 ps), which
stands for one LUT plus routing. Synthesis ignores the delay. Simulation needs
it, because a ring of zero-delay gates has no oscillation to show. The feedback
loops are the oscillators themselves: lint and synthesis tools report them as
combinational loops, and that is expected.

## The chain and its ring lengths

A chain is 13 groups, and each group is one CCI followed by four SCIs. Stage `j`
is CCI `j/5` when `j` is a multiple of 5, and an SCI otherwise. Every stage's
"previous" input is stage `j-1`. Stage 0 takes stage 64, which closes the
ring. CCI `k`'s "previous CCI" input is CCI `k-1`, and CCI 0 takes CCI 12.

* **Detection** (`sel = 0`): 65 independent length-one ROs. Each toggles once
  per gate delay, and `ro_o` brings all of them out for frequency counting.
* **Countermeasure** (`sel = 1`): one ring. Each set `c_sel[k]` drops the four
  SCIs in front of CCI `k` from the ring, so the ring holds

  `L = 65 - 4 * popcount(c_sel)` CIs, from 13 to 65 in steps of 4,

  and oscillates with period `2 * L * GATE_DELAY`. `L` is always odd, so the
  ring always oscillates. CCI 0 is in every ring and is brought out as
  `ring_o`. Bypassed SCIs are not disabled. They hang off the ring as an open
  branch and still toggle.

### Why the stopped chain holds an alternating pattern

A stopped CI drives a constant `STOP_VAL`. The chain gives stage `j` the value
`j mod 2`, so a stopped chain already holds the pattern of a ring at rest. Only
one place breaks it: stage 64 and stage 0 both hold 0. When `en` rises, only
stage 0 sees a changed input. A single edge then travels round the ring, which
is the fundamental mode. Bypassing four SCIs (an even number) keeps the pattern
alternating for any `c_sel`.

If every stage held the same value instead (for example `y = en & ~x`), all
stages would switch together when the ring starts. With exact gate delays that
lock-step mode never dies out, and the ring would run at the single-stage
frequency regardless of its length. The per-stage stop value is this design's
own choice. The reference design only says that all CIs are enabled and
disabled together.

## Control: detection, countermeasure and the random schedule

`cm_control` has three phases (`phase_e`):

* `PH_DETECT` (mode `MODE_DETECT`): `sel = 0`, `c_sel = 0`. Every chain's
  enable follows `det_en_i`, so the external detector decides when the ROs run.
* `PH_ON` / `PH_OFF` (mode `MODE_CM`), entered while `attack_i` is high. The
  control draws a random `R` (8 bits; `R = 0` counts as 1) and a random 13-bit
  `c_sel` for each of the `N_CM_CHAINS` countermeasure chains. It enables those
  chains for `R` cycles and disables them for `R` cycles, then draws again.
  Chains `N_CM_CHAINS .. N_CHAINS-1` stay stopped throughout.

```
clk edge    t        t+1 ...  t+R      ...  t+2R     ...
phase    ---| ON (R cycles) | OFF (R cycles) | ON (R') ...
en[0..31]   1 1 1 ... 1       0 0 ... 0        1 ...
c_sel       new draw ------------------------> new draw
rnd_next    1 (in the cycle before t)       1 (before t+2R)
```

`rnd_next_o` is high in the cycle whose clock edge takes the random word. The
generator steps on that edge. New `c_sel` values always take effect together
with the rising enable, so a ring never changes its length while it runs.
Dropping `attack_i` returns to detection on the next edge, even in the middle of
a phase. `attack_i` may rise while the detection ROs are running.
With equal gate delays the length-one rings toggle in step, so the array still
holds the alternating pattern or its complement. The new ring therefore starts
with a single edge, just as it does from a stopped chain. Reset (`rst_n`, active low, asynchronous) selects detection.

The word layout is `rnd_i[R_W-1:0] = R`. Chain `i`'s bits are
`rnd_i[R_W + 13*i +: 13]`. Two assertions guard the control: a countermeasure
phase never has a zero count, and no chain outside the subset is ever enabled in
countermeasure mode.

## Random number source

`prng` stands in for the random number generator. For a product, the reference
design recommends a true RNG, and one with the same `next_i`/`rnd_o` interface
can replace this block. The generator is `ceil(OUT_W/32)` parallel xorshift32
lanes (`x ^= x<<13; x ^= x>>17; x ^= x<<5`, period 2^32-1). Lane `i` is seeded
with `SEED ^ (i+1)*0x9E3779B9`, and a zero seed is replaced by 1. At the default
size (`OUT_W = 8 + 32*13 = 424`) that is 14 lanes.

## Top level

`ro_countermeasure_top` parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `N_CHAINS` | 256 | chains in the array (detection uses all) |
| `N_CM_CHAINS` | 32 | chains 0..31 used for the countermeasure |
| `GATE_DELAY` | 500 | CI delay in ps, simulation only |
| `SEED` | `32'h1D87_2B41` | generator seed |

Ports: `clk`, `rst_n`, `attack_i`, `det_en_i` in. Out: `ro_o[c][j]` (CI `j` of
chain `c`, to the frequency monitor), `ring_o[c]`, `mode_o` and `phase_o`.

Not included:

* The attack detector: the frequency counters and the classifier that judges
  the deviations. It connects through `ro_o`, `attack_i` and `det_en_i`.
* FPGA placement attributes. An implementation must keep each CI in its own
  LUT and stop the tools from optimising the loops away, for example with
  vendor keep/dont-touch attributes and by allowing combinational loops in the
  design rule checks.

## Choices made here

These points are not fixed by the reference design:

* The gate delay (500 ps) and the 100 MHz clock used in the testbenches.
* The stop pattern of disabled CIs, described above.
* The width of `R` (8 bits, so 1 to 255 cycles per phase) and reading `R = 0`
  as 1.
* A new `c_sel` per chain with every `R`, taking effect with the ON phase.
* Which chains form the countermeasure subset (the first 32) and that the others
  are stopped in countermeasure mode.
* One `sel` line per array, and a `det_en_i` input for detection runs.
* The xorshift generator, its seeds and its lane structure.
* Bypassed SCIs stay enabled as an open branch.
* Reset style (asynchronous, active low).

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Build them with Verilator 5
(`--timing` is needed for the gate delays):

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/ro_cm_pkg.sv tb/ro_countermeasure_top_tb.sv \
    --top-module ro_countermeasure_top_tb -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `sci_tb`, `cci_tb` | the truth table for every input combination, the one-delay output timing, the length-one ring rate, the stop value |
| `rcro_chain_tb` | detection: all 65 CIs toggle once per gate delay. Countermeasure: the ring period is `2*L*D` for `c_sel` = 0, all ones, single bits and random words, and every in-ring CI toggles. The stop pattern. |
| `prng_tb` | cycle-by-cycle comparison with an independent xorshift model; hold when `next_i` is low; the lanes differ |
| `cm_control_tb` | a reference model of the on/off schedule over hundreds of random draws, including `R = 0` and mode exits in mid-phase; `c_sel` routing; the subset rule; detection pass-through |
| `ro_countermeasure_top_tb` | end to end with 4 chains (2 for the countermeasure). Detection on every CI. Then 16 countermeasure runs in two stretches, one entered from stopped ROs and one entered while the detection ROs run. Each run checks the ON/OFF lengths, each chain's ring rate against its `c_sel`, and that the other chains stay quiet. Then back to detection. It counts each mechanism and fails if one never happens. |
| `ro_countermeasure_cm32_tb` | the same scenario with 32 chains, all of them countermeasure chains: the full 2,080-inverter noise source, 8 random runs |

With 4 chains the end-to-end run builds in about 10 s and runs in under a
second. The 32-chain run takes about 45 s to build and 7 s to run. That is the
largest size simulated.

The default 256-chain top has 16,640 delayed gates. Verilator turns each one
into its own timed process, and the generated C++ for the whole array is close
to 500 MB. It does not build in reasonable time on a workstation, so no
testbench runs the top at its default parameters. Every chain is the same
`rcro_chain`, and each chain's control bits come from the same loop in
`cm_control`. The detection-only chains 32..255 differ from the tested ones only
in their index: they get `en = det_en_i` in detection and `en = 0` otherwise.
