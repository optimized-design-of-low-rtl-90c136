# Low-power 3-bit dimming PWM with clock cut-off

A lamp built from LEDs or OLEDs is dimmed by switching its driver on and
off with a pulse-width-modulated (PWM) signal. This design produces that
signal from a 3-bit duty code with as little switching as possible. It has
two ideas:

1. **A PWM that is just a rotating shift register.** Three flip-flops are
   loaded in parallel with the code and then shifted in a ring. The output,
   taken from the last flip-flop, is high in as many of every three clock
   cycles as the code has ones. Only three selector cells and three
   flip-flops are needed, with no counter and no comparator.
2. **Stopping the clock when the output is constant.** At 0 % and 100 %
   dimming every stage holds the same bit, so shifting achieves nothing but
   still burns power. A small control block recognises those two codes,
   cuts the clock to the ring and drives the output from a latched constant
   instead.

The architecture comes from a published low-power design built in
adiabatic dynamic CMOS logic (ADCL). In ADCL the gates are powered by an AC
supply so that load capacitors charge and discharge slowly. That circuit
technique has no counterpart in RTL: here every gate and flip-flop is
ordinary synchronous logic, and only the logic function and the
clock-gating structure are reproduced.

## Duty codes

The code arrives on three inputs LD0, LD1, LD2, carried here as
`ld[2:0]` with `ld[i]` = LDi. The design's own convention writes codes in
the order LD0 LD1 LD2, so be careful with bit order:

| code (LD0 LD1 LD2) | `ld` vector | dimming | output over 3 cycles | `sw` | ring clock |
|---|---|---|---|---|---|
| 000 | `3'b000` | 0 %    | 0 0 0 (constant) | 0 | stopped |
| 001 | `3'b100` | 33.3 % | 1 0 0            | 1 | running |
| 011 | `3'b110` | 66.6 % | 1 1 0            | 1 | running |
| 111 | `3'b111` | 100 %  | 1 1 1 (constant) | 0 | stopped |

Only these four codes are defined by the original design (a thermometer
code). The other four are not specified. Here they are treated as toggling
codes: the ring rotates them, so the duty is still ones/3, but the pulses
are not contiguous (`010` in LD0 LD1 LD2 order gives 0 1 0).

## The PWM ring (`pwm3`, `pwm_stage`, `load_mux`, `adcl_dff`)

Each stage is a 2:1 selector in front of a D flip-flop.

- While `load` is high, stage *i* selects `ld[i]`.
- While `load` is low, stage *i* selects the output of stage *i-1*, and
  stage 0 selects the ring output (stage 2).

The selector (`load_mux`) keeps the three-NAND form of the original:
`sel = ~(~(ld & load) & ~(load_n & prev))`. It needs both rails of `load`,
so `pwm3` builds `load_n` with an inverter.

Load is synchronous. The code is captured on the first rising clock edge
at which `load` is high. In cycle *j* after that edge (j = 0, 1, 2, ...)
the output is `ld[2 - (j mod 3)]`. A toggling code therefore starts with
its high part straight after the load edge, and the pattern repeats every
3 cycles. `load` doubles as the reset. There is no other reset, so the
output means nothing until the first load.

## The clock cut-off circuit (`clock_cutoff`, `cutoff_control`, `d_latch`)

`cutoff_control` holds one level-sensitive latch per code bit, all enabled
by `load`. It follows the code while `load` is high and holds it while
`load` is low. From the latched bits `q` it decodes two signals:

- `sw = |(q & ~rotate(q))`, i.e. the OR over *i* of `q[i] & ~q[i+1]`
  (indices wrap). This is 1 exactly when the bits are not all equal, so the
  output must toggle. For three bits it is three AND terms into one OR.
- `po = &q`. This is the constant output while the clock is cut off: 0 for
  000 and 1 for 111.

`clock_cutoff` then plays the part of the two analog switch pairs of the
original:

- `ring_clk = clk & sw`: while `sw` is 0 the ring's clock is held low.
- `pwm_out = sw ? ring_out : po`.

**Polarity of `sw`.** Here `sw = 1` means "clock running". The original
design's truth table and waveforms use this polarity. One prose
description states the opposite. Only the name of the level differs: in
both readings the clock stops and the output comes from `po` for 000 and
111.

**Timing of the gated clock.** `ring_clk` is a plain AND gate, as the
switches are in the original. `sw` can change only while `load` is high,
because the latches are transparent only then. Raise `load` while `clk` is
low and keep it high across one rising edge. Then `ring_clk` never
glitches:

- Waking from 000/111 into a toggling code: `sw` rises during the low
  phase. The first rising edge of `ring_clk` is the load edge, so the ring
  is loaded as it wakes.
- Going into 000/111: `sw` falls during the low phase. The ring freezes
  with whatever it held, and `po` takes over the output at once, even
  before the clock edge.

Raising `load` while `clk` is high can cut short or add a clock pulse.
This design does not guard against that. A latch-based clock gate would,
but the original does not have one.

The latch is meant to be a latch. Verilator may print `NOLATCH` for the
`always_latch` in `d_latch` once it has been inlined. The hold behaviour is
real and its testbench checks it.

## Top level (`adcl_pwm_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`     | in  | 1 | PWM clock (the original was simulated at 3 kHz) |
| `load`    | in  | 1 | capture a new code; also the reset |
| `ld`      | in  | `N_BITS` | duty code, `ld[i]` = LDi |
| `sw`      | out | 1 | 1 = ring clocked, 0 = cut off |
| `pwm_out` | out | 1 | dimming signal to the lamp driver |

`N_BITS` (default 3, from `adcl_pwm_pkg::PWM_BITS`) sets the ring length.
The `sw`/`po` decode generalises: the clock is cut for all-zero and all-one
codes. Only the 3-bit configuration belongs to the original design. Other
widths are an extension, and only the ring has been simulated at 4 bits.

## Where this departs from the original

- **Logic style.** The original is ADCL: CMOS gates plus diodes, powered by
  an AC supply (33 kHz in its simulations). Here it is static synchronous
  logic with no supply port. What the original saves in power cannot be
  reproduced or measured in RTL. The testbenches only show the activity
  behind it: no ring clock edges at 0 % and 100 %, one per cycle otherwise.
- **Flip-flops.** The original uses a six-NAND edge-triggered D flip-flop.
  Here it is an `always_ff` on the rising edge.
- **Latch enable.** The latches are transparent while `load` is high. This
  follows the truth table (load = 1: outputs from the inputs; load = 0:
  hold). One prose sentence reads the other way round.
- **Undefined codes.** 010, 100, 101 and 110 (LD0 LD1 LD2 order) behave as
  described above. This is this design's own choice.
- **Load timing.** How wide `load` must be, and when it must come relative
  to the clock, is not specified. The rule above (rise while `clk` is low,
  cover one rising edge) is this design's own choice.
- **Not modelled.** The system around the PWM: the AC/DC and DC/DC power
  stages, the microcontroller and sensor that choose the code, and the
  lamp driver and lamp.

## Files

```
rtl/adcl_pwm_pkg.sv     PWM_BITS, the default ring length
rtl/adcl_dff.sv         stage flip-flop
rtl/load_mux.sv         three-NAND selector
rtl/pwm_stage.sv        selector + flip-flop
rtl/pwm3.sv             N_BITS-stage ring PWM
rtl/d_latch.sv          up-level D latch
rtl/cutoff_control.sv   latches + sw/po decode
rtl/clock_cutoff.sv     control block + clock gate + output select
rtl/adcl_pwm_top.sv     top level
tb/tb_<module>.sv       one self-checking testbench per module
```

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A
watchdog ends a run that hangs. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/adcl_pwm_pkg.sv tb/tb_adcl_pwm_top.sv --top-module tb_adcl_pwm_top
./obj_dir/Vtb_adcl_pwm_top
```

Swap in the other testbench names the same way. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/adcl_pwm_pkg.sv rtl/<module>.sv`.

What the testbenches check:

- `tb_adcl_pwm_top` runs the full design at its defaults. It plays 000,
  001, 011, 111, then every ordered pair of those codes, then random codes.
  In every cycle it checks `pwm_out` and `sw` against the rotation rule
  above, and in every period the high count. It also counts rising edges of
  the internal ring clock (none are allowed for 000/111). It fails if any of
  these never happens: a load, a cut-off at 0 %, a cut-off at 100 %, a
  wake-up from cut-off, a 1/3 period, a 2/3 period.
- `tb_pwm3` checks all codes on a 3-stage ring and a 4-stage ring.
- `tb_cutoff_control` checks the four truth-table rows and the hold while
  `load` is low.
- `tb_clock_cutoff` checks the clock gate and the output selection.
- The remaining testbenches cover the leaf cells.
