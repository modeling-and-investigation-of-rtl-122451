# A successive approximation register built from a travelling one

A successive approximation ADC finds its output code one bit at a time, most
significant first: it sets the bit under test to one, lets a DAC turn the code
into a voltage, asks a comparator whether the input is still above that
voltage, and keeps or clears the bit accordingly. The successive approximation
register (SAR) is the digital part that runs this search.

This SAR is built in an unusual way. Instead of a state machine or a register
with feedback, it uses a **shift register that is loaded with a single logical
one** after reset. On every clock the one moves to the next stage. Each stage
is the *enable* of one output bit. The enabled bit is forced to one (the trial),
and its storage cell captures the comparator output. When the one moves on,
the cell keeps what the comparator said, and the next lower bit is tried. After
the one has passed the last bit, the code is complete and stays until the next
reset.

The register has 15 output bits (`OUT14` … `OUT0`). It comes in two versions
that differ only in the storage cell of a bit:

| version | module | cell | comparator sampled at |
|---|---|---|---|
| latch triggers | `sar_latch` | transparent D latch enabled by the bit's token | end of the bit's clock period (latch closes on the next rising edge) |
| flip-flop triggers | `sar_ff` | D flip-flop clocked by NAND(`s_in`, token) | falling `s_in` edge in the middle of the bit's period |

`sar_top` holds one of each, side by side, each with its own pins.

## Pins of the register

| pin | direction | meaning |
|---|---|---|
| `com` | in | comparator output: high when the measured voltage is above the DAC voltage |
| `reset_n` | in | active-low reset: clears every stage and cell and arms the start flip-flop |
| `s_in` | in | clock |
| `out[14:0]` | out | `OUT14`..`OUT0`, the code to the DAC |
| `s_out` | out | high for one clock just before the first trial; can start a sampling switch or prepare a capacitor DAC |

In `sar_top` the latch version's pins carry the prefix `l_` and the
flip-flop version's the prefix `f_`. The width is the parameter `N_BITS`
(default 15, from `sar_pkg::SAR_BITS`).

## The token chain (`sar_sequencer`)

The chain has `N_BITS + 1` = 16 stages, made of two 8-bit shift registers
(`shift_storage_reg`, modelled on the 74'594). Each of these has a shift
register and an output storage register; both are clocked by `s_in`, so the
visible outputs lag the shift stages by one clock. In front of the chain sits a
start flip-flop, preset to one by reset and with its D input tied to zero: on
the first clock it hands its one to the chain and clears itself, so exactly one
token ever enters.

Stage 0 of the storage outputs is `s_out`; stages 1..15 are the enables of
`OUT14`..`OUT0`. Counting rising `s_in` edges after `reset_n` has gone high:

| edge | what is high afterwards | what happens |
|---|---|---|
| 1 | nothing visible | token enters the first shift stage |
| 2 | `s_out` | start marker, code still all zero |
| 3 | enable of `OUT14` | trial of the MSB: code `100…0` |
| 3 + j | enable of `OUT(14-j)` | the bit above is decided; trial of the next bit |
| 17 | enable of `OUT0` | last trial |
| 18 | nothing | `OUT0` decided; the 15-bit code is final |

For a 14-bit converter using `OUT14`..`OUT1`, the code is final after edge 17.
Both cell versions need the same number of clocks.

An assertion in `sar_sequencer` checks that at most one of `s_out` and the
enables is high at any clock edge.

## The two bit cells

Every bit output is the OR of its enable and its stored value, so it reads one
during its own trial and the stored answer afterwards.

**Latch cell (`sar_latch_cell`).** The latch is transparent while the enable is
high and follows `com`. The enable falls at the rising `s_in` edge that moves
the token on, and the latch keeps the comparator's answer to the trial code.
At that same edge the code changes to the next trial, so the design relies on
the DAC and comparator being slower than the latch's closing: `com` must still
show the answer to the old code at the edge. Any real DAC plus comparator
gives this. In exchange, the analog part gets a whole clock period to settle.

**Flip-flop cell (`sar_ff_cell`).** The flip-flop's clock is
`~(s_in & enable)`, which rises when `s_in` falls during the bit's period. The
comparator is therefore sampled half a period after the code changed, and the
analog part must settle within the high phase of `s_in`. When the token leaves
the bit on the next rising edge, the gated clock can rise once more. This samples `com` again while the code is
still the trial code, so the stored value does not change.

Both cells are cleared asynchronously by `reset_n`. The latch and the gated
clock are the point of these two architectures and are intended.

## Using it in a 14-bit ADC

With an ordinary DAC, `OUT14`..`OUT3` drive a 12-bit DAC with reference
`Uref`, and `OUT2`, `OUT1` drive the two top inputs of an 8-bit DAC whose
reference is one quantum of the 12-bit DAC (`Uref/4096`) and whose other six
inputs are tied low. A summing stage adds the two outputs. The sum is a 14-bit
DAC with a step of `Uref/16384`. The comparator sees the measured voltage `Ux`
on its non-inverting input and the DAC voltage on its inverting input.

Worked example, `Uref` = 5.12 V, `Ux` = 2.7535 V: the trials produce
2.56, 3.84, 3.20, 2.88, 2.72, 2.80, 2.76, 2.74, 2.75, 2.755, 2.7525, 2.75375,
2.753125 and 2.7534375 V. The comparator answers 1 0 0 0 1 0 0 1 1 0 1 0 1 1,
and the final code is `10001001101011` (8811 = ⌊2.7535 / 0.0003125⌋).

With a capacitor (charge-redistribution) DAC, the DAC voltage does not step:
after every code change it settles through the switch on-resistance `R`.
Approximated by one exponential with the time constant of the largest
capacitor, `tau = R·C·2^(n-1)`, reaching a relative error of `2^-n` takes
`t = -ln(2^-n)·tau`. For n = 14, R = 1 Ω and C = 3 pF that is 238.5 ns. With the
latch version this is the minimum clock period; a circuit-level simulation of
the original design needed a period above 220 ns.

## Choices made in this RTL

These points are not fixed by the original circuit description and were chosen here:

- **Cascade of the two shift registers.** The second register's serial input
  is the first register's last shift stage (the 74'594's serial output). The
  token then moves one stage per clock with no gap between `OUT8` and `OUT7`.
- **Stage map.** `s_out` is storage output 0 of the first register, and the 15
  bits follow on the next 15 stages. This uses exactly the 16 stages of two
  8-bit parts and puts the MSB trial after the third clock edge.
- **Storage register timing.** It copies the shift stages as they were before
  the clock edge, as the 74'594 does. This is what puts `s_out` one clock after
  the token enters.
- **Reset.** All clears are asynchronous and active low. Give `reset_n` a
  falling edge, or keep it low across a clock edge, to bring every cell and
  stage to its reset value.
- **`OUT0` in a 14-bit ADC** is converted but not connected to the DAC.
- **Not included.** This RTL does not contain the SAR built around an ordinary
  8-bit register with feedback (74'273 style), the classic circuit the new
  architectures were compared against. The analog parts are not included
  either: DACs, summing stage, LM119 comparator, and the switched-capacitor
  network with its switch drivers. Their real-valued simulation models are in
  `tb/`.

## Files

| file | contents |
|---|---|
| `rtl/sar_pkg.sv` | width constants, clocks per conversion |
| `rtl/shift_storage_reg.sv` | 8-bit shift register with output storage register |
| `rtl/sar_sequencer.sv` | start flip-flop and token chain, one-hot assertion |
| `rtl/sar_latch_cell.sv`, `rtl/sar_ff_cell.sv` | the two bit cells |
| `rtl/sar_latch.sv`, `rtl/sar_ff.sv` | the two complete registers |
| `rtl/sar_top.sv` | both registers side by side |
| `tb/adc_analog_model.sv` | real-valued 12+8-bit DAC, summing stage and comparator with 20 ns delay |
| `tb/cap_dac_model.sv` | real-valued capacitor DAC with exponential settling and comparator |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_adc_cap_dac.sv` | latch SAR with the capacitor DAC: clock period against settling |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; each has a watchdog. Build and run one with, for example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/sar_pkg.sv \
    tb/tb_sar_top.sv --top-module tb_sar_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_sar_top` by any other testbench name. Lint the RTL with
`verilator --lint-only -Wall -y rtl rtl/sar_pkg.sv rtl/sar_top.sv`. Verilator
reports `UNUSEDSIGNAL` for the unused serial output of the last shift register
and `UNUSEDPARAM` for package constants that a leaf module does not use; both
are expected.

## What has been verified

- Each module has its own testbench with an independent reference. These
  cover the shift/storage register, the token schedule edge by edge, both cells
  (trial, capture, hold, clear) and both registers with an ideal digital
  comparator. The register tests check the exact trial code after every
  clock edge, and the final code after 18 edges, for corner values and 40
  random values.
- `tb_sar_top` runs both registers at their default size through the
  14-bit ADC with the ordinary-DAC model. It checks:
  - the worked example trial by trial;
  - 30 random inputs, with a different input on each register;
  - a reset part-way through a conversion;
  - the 17-edge conversion time of both versions.

  It also counts the start marker, kept bits, dropped bits and restarts, and
  fails if any of them never happened.
- `tb_adc_cap_dac` confirms the 238.5 ns estimate. With a 300 ns clock all
  conversions are right; with a 60 ns clock some are wrong. Over its 12 inputs
  the shortest clock period that converted all of them correctly was 160 ns.
  That is shorter than the estimate, because the estimate covers the worst
  case and these inputs were random.
- Each testbench has been shown to fail on a deliberately broken copy of its
  module.

The analog models are ideal apart from the comparator delay and the single-
exponential settling. Timing margins against a real DAC and comparator have
not been simulated here.
