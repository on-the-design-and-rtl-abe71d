# Feedback shift-register encoder for the (15, 11) cyclic code

A cyclic block code protects k information bits by appending n - k parity
bits chosen so that the whole n-bit word, read as a polynomial over GF(2),
is a multiple of a generator polynomial g(x). This design computes those
parity bits with nothing more than a four-stage shift register and two
exclusive-OR gates, for the (15, 11) code with

    g(x) = x^4 + x + 1

It is a bit-serial, systematic encoder: the 11 information bits leave the
encoder unchanged and in order, and the 4 parity bits follow them. The same
register, left to run with no input, is also a cyclic shifter that walks
through all 15 nonzero four-bit patterns, which is the behaviour used to
check the hardware on the bench.

## The arithmetic in one paragraph

Write the information bits d1 ... dk as d(x) = d1 x^(k-1) + ... + dk, first
bit highest. Shift it up by r = n - k places, divide by g(x), and keep the
remainder:

    r(x) = x^r d(x) mod g(x)
    c(x) = x^r d(x) + r(x)

Because addition and subtraction are the same thing modulo 2, c(x) is an
exact multiple of g(x), so it is a code word. Its top k coefficients are the
data bits themselves, and its bottom r coefficients are the parity bits. If
d(x) happens to be a multiple of g(x) already, the parity is 0000.

## The register chain: how a shift register divides

The four stages are called B3, B2, B1, B0, in the order data flows through
them. The output of the last stage, B0, is the feedback line. It is added
(exclusive-OR) to the serial input in front of B3, and to the output of B3
in front of B2. Those are the two places where g(x) = x^4 + x + 1 has a
nonzero coefficient below x^4: the constant term and x^1.

```
 data_in --(+)--> B3 --(+)--> B2 ----> B1 ----> B0 --+--> parity out
           ^           ^                             |
           |           |            feedback switch  |
           +-----------+-------------------o/o-------+
```

On every clock pulse, all at once:

    B3 <= data_in ^ fb        B2 <= B3 ^ fb
    B1 <= B2                  B0 <= B1          where fb = B0 if the feedback is closed, else 0

Read stage B(3-i) as the coefficient of x^i. One pulse then turns the
register polynomial s(x) into x*s(x) + data_in, and whatever spills out of
x^3 into x^4 is folded back as x + 1, which is exactly reduction modulo
g(x). Clocking the bits of any polynomial in, highest first, therefore
leaves its remainder modulo g(x) in the register. B0 holds the highest
remainder coefficient.

`fsr_divider` builds this chain for any degree R and any generator
polynomial. It puts an adder in front of the first stage and in front of
every later stage whose coefficient in g(x) is 1, and wires the other
stages straight through. Each adder is a `half_adder`, which forms the
exclusive-OR from gates as (X+Y)(XY)': one OR, two ANDs and an inverter.
Each stage is a `bmv` ("bistable multivibrator"), a D flip-flop with a
synchronous preset.

## One code word, pulse by pulse

Three switches turn the divider into an encoder. `encoder_ctrl` works them,
and `fsr_encoder` wires it all together:

| phase  | pulses | information source | feedback | output line       |
|--------|--------|--------------------|----------|-------------------|
| DATA   | k = 11 | on                 | closed   | the data bit      |
| FLUSH  | r = 4  | off (input 0)      | closed   | idle, not valid   |
| PARITY | r = 4  | off                | open     | B0                |

The phase that is easiest to miss is FLUSH. The data bits enter at the low
end of the chain, so after the k-th pulse the register holds d(x) mod g(x),
not x^r d(x) mod g(x). Only after r more pulses with zero input, by which
time the last data bit has passed out of B0, does it hold the parity r(x).
Then the feedback is opened, and the chain becomes a plain shift register
that hands r3, r2, r1, r0 out through B0. It ends empty, ready for the next
word. A word therefore takes n + r = 19 pulses, and 15 of them carry an
output bit. `code_valid` marks those 15.

Worked example. The data are 11001010001, and the parity should be 0101.
B3..B0 are shown after each pulse; "out" is the output bit during that pulse.

| pulse | phase | in | out | B3..B0 after |
|---|---|---|---|---|
| 1 | DATA | 1 | 1 | 1000 |
| 2 | DATA | 1 | 1 | 1100 |
| 3 | DATA | 0 | 0 | 0110 |
| 4 | DATA | 0 | 0 | 0011 |
| 5 | DATA | 1 | 1 | 0101 |
| 6 | DATA | 0 | 0 | 1110 |
| 7 | DATA | 1 | 1 | 1111 |
| 8 | DATA | 0 | 0 | 1011 |
| 9 | DATA | 0 | 0 | 1001 |
| 10 | DATA | 0 | 0 | 1000 |
| 11 | DATA | 1 | 1 | 1100 |
| 12 | FLUSH | - | - | 0110 |
| 13 | FLUSH | - | - | 0011 |
| 14 | FLUSH | - | - | 1101 |
| 15 | FLUSH | - | - | 1010 |
| 16 | PARITY | - | 0 | 0101 |
| 17 | PARITY | - | 1 | 0010 |
| 18 | PARITY | - | 0 | 0001 |
| 19 | PARITY | - | 1 | 0000 |

The code word is 11001010001 0101.

While idle, the stages are cleared on every pulse. The pulse that accepts
`start` also clears them, so a word always starts from an empty register,
whatever came before.

## Cyclic-shift mode

With `cycle_mode` high and no word in progress, the information source stays
off and the feedback stays closed. Each pulse then moves B2 to B1, B1 to B0,
and B0 to B3, and puts B3 xor B0 into B2. Because x^4 + x + 1 is primitive,
any nonzero pattern comes back after exactly 2^4 - 1 = 15 pulses. Starting
from B3..B0 = 0100:

```
0010 0001 1100 0110 0011 1101 1010 0101 1110 0111 1111 1011 1001 1000 0100
```

This is the mode that exercises the register, the adder and the clock
without an information source. Use `load` and `preset` to set the starting
pattern: `preset[j]` goes into Bj on the next pulse.

## Clock source

All stages are triggered by the same pulse. In the complete design that
pulse comes from `amv_clock`, a model of a free-running astable
multivibrator. It is a behavioural, delay-based model and cannot be
synthesised. While `on` is high it gives a square wave with period
2 x `HALF_PERIOD` time units (default 1 kHz at 1 ns units). While `on` is
low its output rests low, so the register can be preset and reset with the
pulses switched off. The oscillator frequency is a free choice: nothing in
the design depends on it. Synthesis tools read the model as a latch.

## Modules

```
fsr_encoder_top          clock source + encoder (simulation top)
 |- amv_clock            behavioural oscillator
 '- fsr_encoder          synthesizable encoder core
     |- encoder_ctrl     phase register and pulse counter; the three switches
     '- fsr_divider      R-stage feedback shift register
         |- half_adder   x2, mod-2 adders (front of B3, front of B2)
         '- bmv          x4, storage stages B3..B0
fsr_pkg                  code size, generator polynomial, phase enum
```

For a synthesizable encoder, use `fsr_encoder` with your own clock. Its
interface:

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1     | shift pulse; everything changes on the rising edge |
| `rst_n`      | in  | 1     | asynchronous, active-low reset of the sequencer (stages are cleared by the idle state, not by reset) |
| `start`      | in  | 1     | sampled only while idle; the first data bit is taken on the next pulse |
| `cycle_mode` | in  | 1     | free-run as a cyclic shifter while idle |
| `data_in`    | in  | 1     | information bit, valid while `data_req` is high |
| `load`, `preset` | in | 1, R | preset the stages on the next pulse (overrides everything) |
| `data_req`   | out | 1     | this pulse takes `data_in` (k pulses per word) |
| `code_out`   | out | 1     | serial code bit; combinational from `data_in` during DATA |
| `code_valid` | out | 1     | `code_out` is a code bit (n pulses per word) |
| `busy`, `done` | out | 1   | a word is in progress; the last parity bit is on the output |
| `phase`      | out | 2     | `fsr_pkg::phase_e`: IDLE, DATA, FLUSH, PARITY |
| `b`          | out | R     | stage contents, `b[j]` = Bj |

Drive the inputs away from the rising edge, for instance on the falling edge,
and sample `code_out` with `code_valid` before the rising edge. `fsr_encoder_top`
has the same ports, except that `clk` is replaced by `amv_on`, the switch of
the internal clock source, whose output is brought out as `clk_pulse`.

`encoder_ctrl` checks three rules with assertions. The source is only
connected while the feedback is closed. Nothing valid is output during
FLUSH. Both switches are off during PARITY.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 15 | code word length |
| `K` | 11 | information bits (R = N - K stages) |
| `POLY` | `5'b10011` | g(x), bit i = coefficient of x^i; bits R and 0 must be 1 |
| `HALF_PERIOD` | 500000 | clock source half period (top and `amv_clock` only) |

Another cyclic code needs only these parameters. The generator must divide
x^N + 1 for the result to be a cyclic code. The divider checks at
elaboration that POLY has degree R and a constant term.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog.

- `tb_half_adder`: all four input pairs against the XOR truth table.
- `tb_bmv`: 400 random pulses of data, preset and load against a reference flip-flop.
- `tb_amv_clock`: no pulses while off; first edge after one half period; exact period; stops when switched off.
- `tb_fsr_divider`: the 15-pattern sequence above from 0100; period exactly 15 from all 15 nonzero states; the remainder of 200 random bit strings against long division; shift-out order with the feedback open.
- `tb_encoder_ctrl`: the switch settings on each of the 19 pulses of a word; start ignored while busy; cycle mode; asynchronous reset with the clock stopped.
- `tb_fsr_encoder`: all 2048 information words. Each code word is compared with long division and checked to be divisible by g(x). The 11 data requests and the 19-pulse length are checked too, and so are the 128 words with parity 0000. It then runs the cyclic-shift sequence.
- `tb_fsr_encoder_generic`: the encoder core at two other sizes, with every information word: the (7, 4) code with g(x) = x^3 + x + 1, and the (15, 7) BCH code with g(x) = x^8 + x^7 + x^6 + x^4 + 1.
- `tb_fsr_encoder_top`: the whole design at its default parameters, clocked by its own clock source. It resets and presets with the pulses off, runs the 15-pulse cycle, stops and restarts the pulses, and encodes all 2048 words. It counts each mechanism: pulses off, reset without clock, preset, cyclic shift, period 15, source on, flush, parity shift-out with the feedback open, and zero remainder. A mechanism that never happened counts as a failure.

The reference values in the testbenches come from `tb_fsr_ref_pkg`. It uses
plain polynomial long division and a table of the expected cycle, not the
shift-register structure. To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fsr_pkg.sv tb/tb_fsr_ref_pkg.sv tb/tb_fsr_encoder_top.sv \
    --top-module tb_fsr_encoder_top -Mdir obj
./obj/Vtb_fsr_encoder_top
```

Replace the testbench name to run another one. All of them finish in well
under a second.

## What follows the original design and what does not

These parts follow the original design: the register chain and where its
adders sit, the (15, 11) code and its generator, the gate structure of the
adder, the switch sequence (data, flush with the source off, parity with
the feedback open), the bit order, and the 15-pulse cycle from 0100.

The original hardware was built from discrete transistors. Only the cyclic
shifter was built, with a single exclusive-OR gate between B3 and B2 and B0
wired straight back into B3. The adder at the input is the one addition
needed to make it an encoder, and it is included here. In cycle mode its
input is held at 0, so it passes the feedback through unchanged.

These are choices of this design, not taken from the original:

- the controller, its start handshake and its asynchronous reset (originally the switches were worked by hand);
- the preset path in each stage, and clearing the stages while idle;
- rising-edge triggering;
- an idle output (`code_valid` low) during the four flush pulses;
- the clock frequency;
- the stages carry no reset, and a word always starts from cleared stages.

Tools may warn that `rst_n` is used both by the asynchronous reset and by
the assertions' `disable iff`. That is intended.
