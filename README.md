# Tri-loop controller for an analog-assisted digital LDO

A digital low-dropout regulator (DLDO) turns PMOS power switches on or off
to hold its output V_OUT at a reference V_REF. In the classic form, one long
shift register moves one switch per clock. That makes the regulator slow,
power-hungry, and dependent on a large output capacitor to ride out fast
load steps. This design attacks that problem with three loops working on
different time scales:

1. **Analog assist (AA).** The ground rails (V_SSB) of the inverters that
   drive the switch gates are AC-coupled to V_OUT through C_C, and biased to
   ground through R_C. When V_OUT droops, the gate drive of every switch that
   is already on rises at once, so those switches deliver several times their
   nominal current within nanoseconds. No clock edge is needed. This is
   analog circuitry and is not part of the RTL.
2. **Coarse tuning.** A dead-zone (window) comparator raises `Coarse_en`
   whenever V_OUT is outside V_REF ± the dead zone. The switch code then moves
   by L unit counts per clock, in the direction of the comparator's `Up`
   output.
3. **Fine tuning.** When V_OUT re-enters the dead zone, a pulse generator
   raises `Fine_en` for T1 cycles. During that window a 1-bit comparator moves
   the code by one count per clock. After T1, every shift register stops.
   This *freeze* mode removes the limit cycle that a 1-bit loop always has,
   and saves the switching power of the registers.

The RTL in `rtl/` is the digital part: comparator models, pulse generator
and the three shift registers. `tb/` holds self-checking testbenches and a
behavioural model of the analog power stage, so the loop can be closed in
simulation.

## The three-section switch array

The 9-bit array (512 levels) is split into three thermometer-coded sections:

| section | shift register | bits | switch weight | word |
|---|---|---|---|---|
| low (fine) | Low SR | L = 8 | 1 unit | `l_word`, l(t) |
| medium (coarse) | Medium SR | M = 4 | L units | `m_word`, m(t) |
| high | High SR | H = 16 | L·M units | `h_word`, h(t) |

The total switch strength is `code = l + L·m + L·M·h`. Here l, m and h are
the numbers of ones in each word. L·M·H = 512 gives 9-bit resolution with only
L+M+H = 28 register bits, where a single shift register would need 512.
Bit 0 of each word is the first switch to turn on, and a 1 means the switch
is on.

The sections pass carries up the chain:

- **Low SR → Medium SR (Carry1/In1).** While `Fine_en` is high, the Low SR
  follows the 1-bit comparator. If it is full and must go up, it asks the
  Medium SR for one step and reloads itself to one switch on. If it is empty
  and must go down, it borrows one step and reloads to L−1 switches on. In
  both cases the total moves by exactly one count.
- **Medium SR → High SR (Carry2/In2).** The Medium SR steps on every clock
  while `Coarse_en` is high, or on a Carry1. When it is full and steps up, the
  High SR gains a switch. When it is empty and steps down, the High SR loses
  one. The reload values are the subject of the next section.
- **Saturation.** When every section above is full (or empty), a request that
  cannot be carried is dropped and the section holds its value.

## Glitch reduction at the Medium/High carry

The Medium and High words reach their switches through drivers of very
different size (L× against L·M×), so they do not switch at the same instant.
Take the plain carry with M = 8 and H = 8. On a carry-in, m goes 8 → 1 while h
goes up by one. If m settles first, the coarse value h·M + m briefly passes
through 8 → 1 → 9: a dip of 7 Medium steps (7·L counts) in the middle of a
recovery that should be rising. Choosing M = 4 and H = 16 (still 64 coarse
levels) shrinks the dip to 4 → 1 → 5, that is 3·L.

This design goes further. On a carry-in the Medium SR reloads to **3** ones
(M−1) instead of 1, and on a carry-out to **1** instead of M−1 = 3. A carry-in
then looks like 4 → 3 → 7: the dip is one Medium step (1·L), and the settled
value moves by three steps instead of one. During a long coarse ramp the
coarse word runs 1, 2, 3, 4, 7, 8, 11, 12, … and reaches full scale in 36
cycles instead of 68, which shortens recovery. Carry-outs mirror this.
Because each carry now skips two coarse levels, the reachable coarse values
are not all 64 distinct ones in one ramp. The fine loop fills the gaps.

`medium_sr` has the parameters `CARRY_IN_M` (default M−1) and `CARRY_OUT_M`
(default 1), which are also on the top. Setting them to 1 and M−1 gives the
plain carry for comparison. The same reload also applies when a Low SR carry
ripples through a full or empty Medium SR during fine tuning. Such a cycle
moves the total by ±17 counts (with the default sizes) instead of ±1.

## Mode sequence and timing

```
 V_OUT leaves dead zone        V_OUT back inside        T1 cycles later
          |                           |                        |
 Coarse_en ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|________________________|__________
 Fine_en   ___________________________|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|__________
 code      moves ±L (±3L on a carry)   moves ±1 per cycle         frozen
```

- There is one clock, `clk`: the sampling clock, 10 MHz in the reference
  design. Both comparators register their decisions on the rising edge. The
  shift registers act on those decisions at the next rising edge, so the
  words react two edges after V_OUT crosses a threshold.
- `Fine_en` goes high in the cycle after the edge at which `Coarse_en` is
  first seen low. It stays high for exactly T1 cycles, then drops. A new
  `Coarse_en` cuts the window short at once, so the two modes never overlap.
- In the silicon, each register's clock passes through a gate (a multiplexer
  between CLK and ground). Here every gate is a clock enable of the single
  clock: the Low SR is enabled by `Fine_en`, the Medium SR by `Coarse_en` or
  Carry1, and the High SR by Carry2. In freeze mode no register is enabled.
- Reset (`rst_n`, asynchronous, active low) turns every switch off and starts
  in freeze. The dead-zone comparator then sees V_OUT far below V_REF and
  coarse tuning starts up the regulator.

## Modules

| file | role |
|---|---|
| `rtl/dldo_pkg.sv` | default sizes, the voltage type `volt_t`, the carry bundle `carry_t`, thermometer helper |
| `rtl/aa_dldo.sv` | top: wires the comparators, pulse generator and the three registers; outputs the switch words |
| `rtl/low_sr.sv` | fine register, L bits, Carry1 generation |
| `rtl/medium_sr.sv` | coarse register, M bits, glitch-reducing Carry2 |
| `rtl/high_sr.sv` | high register, H bits, stepped only by Carry2 |
| `rtl/pulse_gen.sv` | T1 fine window after the fall of `Coarse_en` |
| `rtl/dz_comparator.sv` | behavioural model of the clocked dead-zone comparator |
| `rtl/quant_cmp.sv` | behavioural model of the clocked 1-bit comparator |

Top-level ports of `aa_dldo`: `clk` and `rst_n`; `vout` and `vref` (16-bit
unsigned, 100 µV per LSB); `l_word[L]`, `m_word[M]` and `h_word[H]`;
`coarse_en`, `fine_en` and `freeze`; and `code`, the total strength, which is
for observation only.

Top-level parameters: `L`=8, `M`=4, `H`=16, `T1`=32 cycles, `DZ_HALF`=200
LSB (±20 mV), and `CARRY_IN_M`/`CARRY_OUT_M` as described above.

## What is the reference design and what is chosen here

These parts follow the reference design:

- the split into L = 8, M = 4 and H = 16 thermometer sections;
- coarse tuning at L counts per cycle, and fine tuning at one count per cycle;
- Coarse_en from a dead-zone comparator, and the fine window T1 followed by
  freeze;
- the Carry1/Carry2 chain;
- the glitch-reduction reloads 4 → 3 and 0 → 1;
- the 10 MHz sampling clock.

These are choices of this implementation:

- **T1 = 32 cycles and a ±20 mV dead zone.** Neither value is specified; both
  are parameters.
- **Low SR reload values.** The carry keeps the total exact (full → 1 one,
  empty → L−1 ones).
- **Saturation handling.** When the sections above are full or empty, the
  register holds.
- **Comparator latency.** One register stage.
- **Clock enables in place of gated clocks.**
- **Reset behaviour.**
- **Applying glitch reduction to fine-mode ripples as well.**
- **Numeric voltage inputs.** The comparators are analog parts. In the RTL
  they are models that compare two numbers, and they are synthesizable only as
  stand-ins.

These parts are not in the RTL at all: the PMOS switch array and its drivers,
the R_C/C_C network of the AA loop, the reference voltage and the test load.
They are analog. `tb/ldo_plant.sv` models them roughly, for closed-loop
simulation only:

- each unit switch is a conductance of 30 µA at 100 mV dropout;
- the V_SSB rail is high-pass filtered from V_OUT (τ = 500 ns), and scales the
  switch current by 1 − 40·V_SSB;
- the output node is 2 nF of effective capacitance;
- the load is an ideal current sink.

These numbers are illustrative, not the silicon's.

## Verification

Each block has a self-checking testbench that ends with a
`TB_RESULT checks=N failures=M` line:

- `tb_low_sr`, `tb_medium_sr`, `tb_high_sr`: random stimulus against a
  count-based reference model. Every carry direction and saturation is
  covered. `tb_medium_sr` also checks the coarse sequence 1, 2, 3, 4, 7, 8,
  11, 12, … one step per clock.
- `tb_pulse_gen`: the window length is exactly T1, and is cut short by a new
  `Coarse_en`.
- `tb_dz_comparator`, `tb_quant_cmp`: decisions at and around the
  boundaries.
- `tb_aa_dldo`: the closed loop at default parameters. It starts up from zero,
  applies 2 → 12 → 2 mA steps twice, then 24 random loads. Every cycle it
  checks the code step allowed by the active mode (±L or ±3L in coarse, ±1 or
  ±17 in fine, 0 and no register enabled in freeze). It checks the T1 window
  length, and that each step ends frozen inside the dead zone. It counts
  coarse entries, fine windows, freezes, Carry1/Carry2 in both directions,
  fine-loop reversals and large transients, and fails if any of them never
  occurs. With the plant model, a 2 → 12 mA step dips V_OUT by about 80 mV.
  The AA coupling (500 ns time constant) makes V_OUT lag the code, so the
  loop usually passes through a few coarse/fine rounds. It is frozen for good
  about 12 µs after the step.
- `tb_glitch_reduction`: three controllers in open loop, with the High word
  arriving 20 ns late at the switches:
  - M/H = 8/8 with the plain carry gives a glitch of 7·L;
  - M/H = 4/16 with the plain carry gives 3·L;
  - M/H = 4/16 with glitch reduction gives 1·L.

  It also checks the ramp length: 68 cycles against 36.

The comparators are ideal (no noise, offset 0 unless `OFFSET` is set). Power,
the AA loop's analog behaviour and the measured transient amplitudes cannot
be checked by this RTL.

## Simulating

Verilator 5 with timing support. For example, the closed-loop test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dldo_pkg.sv tb/tb_aa_dldo.sv --top-module tb_aa_dldo
./obj_dir/Vtb_aa_dldo
```

Any other testbench is built the same way. `rtl/dldo_pkg.sv` must come
first, because every module imports it. The testbenches draw random values
with `$urandom`; pass `+verilator+seed+N` to vary them.
