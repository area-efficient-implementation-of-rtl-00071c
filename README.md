# One-flip-flop FM0 / Manchester codec for DSRC

Dedicated Short Range Communication (DSRC) links between vehicles and roadside
units send their baseband data in one of two self-clocking line codes: FM0
(bi-phase space) or Manchester. Both split every bit into two half-bits and
guarantee at least one level change per bit, so a long run of equal bits never
looks like an idle channel. A DSRC transceiver has to support both.

A straightforward dual-mode encoder keeps two separate coders and a
multiplexer: two flip-flops and a few gates for FM0, one XOR gate for
Manchester. This design merges them instead. It uses the observation that FM0
needs only one bit of state and that Manchester can be written as a
multiplexer on the clock, so that both codes become the **same circuit**:

* encoder: **one flip-flop, two 2:1 multiplexers, one XNOR, one inverter**;
* decoder: **two flip-flops (on opposite clock edges), one XNOR, one
  inverter, one 2:1 multiplexer**.

All three RTL modules are small. What takes care is the timing: the clock is
used as a data signal inside the encoder, and the decoder only works with the
right clock phase. Most of this document is about that.

## Line-code conventions

One bit lasts one clock cycle. The first half-bit is sent while the encoder
clock is high, the second while it is low; bit boundaries are rising clock
edges.

| code       | bit | first half | second half | rule                                   |
|------------|-----|------------|-------------|----------------------------------------|
| FM0        | 1   | `~L`       | `~L`        | change at the boundary only            |
| FM0        | 0   | `~L`       | `L`         | change at the boundary and in mid-bit  |
| Manchester | 1   | 0          | 1           | rising edge in mid-bit                 |
| Manchester | 0   | 1          | 0           | falling edge in mid-bit                |

`L` is the line level at the end of the previous bit. So FM0 always changes
level at a bit boundary, changes again in mid-bit for a 0 and does not for a 1.
Manchester always changes in mid-bit, and a 1 is low-to-high.

Example, bits `0 1 1 0 1`, starting from a cleared line (`L = 0`):

```
clk         ‾|_ ‾|_ ‾|_ ‾|_ ‾|_      (‾ = high half, _ = low half)
x            0   1   1   0   1
FM0          1 0 1 1 0 0 1 0 1 1
Manchester   1 0 0 1 0 1 1 0 0 1
```

## Encoder (`rtl/sols_encoder.sv`)

```
            mode                          clk
             |                             |
  B ──0┐   ┌─┴─┐                         ┌─┴─┐
  x ──1┴──►│M2 ├───────────────────────1─►│   │
           └───┘                         │M1 ├──► NOT ──► code
  x ──┐                                  │   │             │
      XNOR ─────────────────────────0──►│   │             │
  B ──┘                                  └───┘             │
                                                            ▼
  B ◄── DFF_B (rising clk, async clear clr_n) ◄──── value of code while clk is low
```

`B` is the state: the line level at the end of the previous bit.

* **First half (clk = 1).** `code = ~M2`. In FM0 (`mode = 0`) that is `~B`,
  the change at the boundary. In Manchester (`mode = 1`) it is `~x`.
* **Second half (clk = 0).** `code = ~(x XNOR B) = x XOR B`. In FM0 that is
  `~B` for a 1 (no mid-bit change) and `B` for a 0 (change). In Manchester,
  `B` is held at 0 by the clear, so the second half is `x`.
* **State update.** At the rising edge that ends the bit, DFF_B stores the
  second-half level. The drawn circuit feeds the flip-flop from the output
  node, which holds that value while the clock is low, in the setup window just
  before the edge. The RTL feeds it from the clock-low leg directly. The value
  is the same, and the simulation has no race between the edge and the
  clock-selected multiplexer.

The inverter sits after M1 and the mid-bit gate is an XNOR rather than an XOR.
This gives both multiplexer legs the same depth, so the two half-bits come out
with the same delay and the output does not glitch from unbalanced paths.

**Interface rules**

* `x` must be stable from just after one rising edge of `clk` up to and
  including the next one. Launch it from a flip-flop on the rising edge.
* `clr_n` (active low, asynchronous) is 1 in FM0 and 0 in Manchester. Driving
  it as `~mode` is enough. An assertion flags Manchester with `clr_n` high.
  Pulling it low in FM0 resets the line state to `B = 0`.
* Mode switches take effect at the next bit. Because the clear is
  asynchronous, FM0 → Manchester is correct from the first Manchester bit.
  Manchester → FM0 restarts FM0 from `B = 0`, so the first FM0 bit begins
  high. There is no guaranteed level change at that one boundary.
* `code` is combinational in `clk`. Its value is only meaningful away from the
  clock edges; around each rising edge it may briefly show the previous bit's
  first-half value until `x` settles. Sample it in mid-half-bit or drive a line
  with it. Do not clock logic from it.

## Decoder (`rtl/sols_decoder.sv`)

```
 data ──┬──► DFF_1 (falling edge) ── q1 ─┐
        │                                XNOR ──────0─┐
        └──► DFF_2 (rising edge)  ── q2 ─┴──► NOT ──1─┤ MUX ──► decoded
                                                 mode ─┘
```

* FM0 bit = `q1 XNOR q2`: equal halves give 1, a mid-bit change gives 0.
* Manchester bit = `NOT q2`: a low first half gives 1.

**Clock phase.** For the Manchester path to give the bit, `q2` must hold the
*first* half-bit. For the FM0 path, `q1` must hold the second half of the same
bit. Both hold only if the decoder clock **rises in the middle of each bit and
falls at its end**, in antiphase to the encoder clock. For a direct loop-back,
use `rx_clk = ~tx_clk`. A real receiver needs a recovered clock with that
phase. Clock recovery is not part of this design.

**When the output is valid.** Nothing re-registers the output, so:

* Manchester: valid from the rising edge in the middle of bit *k* to the
  rising edge in the middle of bit *k+1*;
* FM0: valid from the falling edge at the end of bit *k* until the next rising
  edge. In the other half cycle it compares halves of two different bits,
  which always differ in FM0, so it reads 0.

Both codes are valid **just before the rising edge that follows the end of a
bit**. Sample there: a flip-flop on the rising edge of `rx_clk` that takes
`decoded` as its D input captures bit *k*. Seen from the transmitter, the bit
leaves the decoder 1.5 cycles after it entered the encoder, and one bit comes
out per cycle.

`rst` is an active-high synchronous reset of both flip-flops. In reset,
`decoded` reads 1 in either mode.

## Top (`rtl/sols_codec.sv`)

`sols_codec` holds the transmit side (`tx_*`: encoder) and the receive side
(`rx_*`: decoder). Each side has its own clock, reset/clear and mode. The
radio channel between them is outside the design, so `tx_code` and `rx_data`
are separate ports. `sols_pkg` defines `code_mode_e`:
`MODE_FM0 = 0` and `MODE_MANCHESTER = 1` for both sides.

No module has parameters: every datapath is one bit wide. After coarse
synthesis the encoder has 1 flip-flop and 5 gates/multiplexers, and the
decoder 2 flip-flops and 5 gates/multiplexers.

## What is this design's own reading

The gate-level structure of the encoder and the decoder, the mode values and
the clear/mode pairing follow the published structure of this codec. These
points were not specified there and were chosen here:

* the clock phase of both sides. Encoder: clock high = first half-bit.
  Decoder: antiphase clock. Both are derived from the Manchester convention
  (1 = low-to-high) and the decoder's use of the first half-bit;
* which decoder flip-flop is on which edge: DFF_1 on the falling edge;
* the encoder clear is asynchronous, the decoder reset synchronous and active
  high;
* the encoder flip-flop is fed from the clock-low multiplexer leg (same value,
  see above);
* the top's split into independent transmit and receive ports.

The published structure has been checked against the signal snapshots given
for it. Four encoder cases: Manchester and FM0, each with the data held at 0
and at 1. Three decoder cases. All agree with this RTL, including the internal
multiplexer and flip-flop values.

## Verification

Each testbench is self-checking. It ends with
`TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs.

| testbench                 | what it does                                                                                                                                       |
|---------------------------|----------------------------------------------------------------------------------------------------------------------------------------------------|
| `tb/tb_sols_encoder.sv`   | 4000 bits (patterns, then random with random mode switches). Both half-bits are checked against a rules-based model, plus the FM0 boundary rule.    |
| `tb/tb_sols_decoder.sv`   | The testbench builds the coded line from the rules and checks 4000 bits in both modes, and the output in reset.                                    |
| `tb/tb_sols_codec.sv`     | End-to-end loop-back of 20000 random bits with mode switches, checked at 1.5-cycle latency. Each case must occur: both bit values in both codes, and both switch directions. |
| `tb/tb_sols_line_cases.sv`| Constant-data cases (Manchester and FM0, x = 0 and x = 1), 32 bits each. Exact line waveform and decoded value are checked.                         |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/sols_pkg.sv tb/tb_sols_codec.sv \
  --top-module tb_sols_codec -o sim && obj_dir/sim
```

The RTL lints clean with `verilator --lint-only -Wall`.

**Limits of trust.** The tests check the codec against the line-code rules at
the zero-delay RTL level. They say nothing about the glitch behaviour of
`code` in real gates. They also say nothing about a decoder whose clock is
not in the assumed phase: with the wrong phase the Manchester output comes out
inverted, and the FM0 output is valid only in the wrong half cycle.
