# Bit-serial, symbol-sliced Reed-Solomon encoder

This is a Reed-Solomon (RS) encoder for the (255,223) code over GF(2^8), with an
interleaving depth of 5. It is built from identical "slice" chips: each chip holds a
fixed share of the encoder's multipliers, adders and stage registers, and a
complete encoder is a chain of such chips. Four chips make the (255,223) encoder.
With more or fewer chips, or other parameters, the same design gives other
error-correcting strengths. The datapath is one bit wide throughout: one bit enters
and one bit leaves per clock. This keeps the wires between chips to a handful of
single-bit signals.

The RTL describes the chips and their board-level wiring in synthesizable
SystemVerilog. The default configuration is the row-partitioned encoder with
shift-register stages. Two alternatives are parameters of the same top:

- a column-partitioned chip set;
- RAM-based stages with a selectable interleaving level.

## The code

- Symbols are J = 8 bits. The field GF(2^8) is generated by
  p(x) = x^8 + x^4 + x^3 + x^2 + 1, and alpha = 2 is its root.
- E = 16 symbol errors can be corrected, so every code word carries 2E = 32 parity
  symbols behind its 223 information symbols.
- The generator polynomial is g(x) = prod_{i=112}^{143} (x - alpha^i). Its roots lie
  symmetrically about alpha^127.5, so its coefficients are symmetric:
  g_j = g_{32-j}, and g_0 = g_32 = 1. Only 16 distinct coefficients other than 1
  exist, g_1 .. g_16. The encoder therefore needs 16 multipliers, not 31.
- The parity of a code word is the remainder of x^32·m(x) divided by g(x), where m(x)
  is the information polynomial. The first symbol sent is the highest-degree
  coefficient.
- Interleaving depth I = 5: consecutive symbols of the stream belong to code words
  0, 1, 2, 3, 4, 0, 1, ... A block is therefore 5 x 255 symbols. The 5 x 223
  information symbols are sent first, followed by the 5 x 32 parity symbols.

The coefficient table is not typed in. `rs_pkg::gen_coefs` computes it at
elaboration time from `FIELD_POLY`, `ROOT_EXP` (the generator roots are
beta^i with beta = alpha^ROOT_EXP) and `FIRST_ROOT`. Two uses of this:

- Setting `FIELD_POLY = 32'h187` (x^8+x^7+x^2+x+1) and `ROOT_EXP = 11` gives the
  alternative telemetry-standard code.
- Other primitive elements, for example alpha^7 = 128, are other `ROOT_EXP` values.

## How a bit-serial stage works

The textbook encoder is a linear-feedback shift register of 32 symbol stages. In each
symbol time it does the following:

1. The feedback is f = d + r_31, where d is the incoming symbol and r_31 the content
   of the last stage.
2. Each stage is updated as r_p <- r_{p-1} + g_p·f.

With interleaving depth I, every stage becomes an I-symbol delay line, so the five
code words share the hardware in turn. In this design each stage is an
I x J = 40-bit serial shift register (`rs_delay_sr`). Every stage has a one-bit XOR
adder in front of it, and both operate one bit per clock.

**Serial multiplier and its one-symbol lag.** A product g_k·f cannot be produced
bit-serially before all 8 bits of f are known. `rs_sp_mult` works like this:

- It takes g_k in parallel and f one bit per clock, MSB first.
- It accumulates by Horner's rule (acc <- acc·alpha + bit·g_k).
- On the last bit of the symbol (`sym_end`), it loads the finished product into an
  8-bit output shift register.
- During the next symbol, that register shifts the product out MSB first.

So every product reaches its adder exactly one symbol (8 clocks) late.

**Why this still works, and the 32-bit tap.** Because of interleaving, the symbol
of the same code word comes round again only every 5 symbols. Take the product made
from code word c's feedback at symbol time t. It is added at time t+1 to whatever
leaves the previous stage at t+1. After its 40-bit delay, the sum leaves that stage
at t+6. That is exactly when the product of code word c's next feedback, made at
t+5, arrives. The lag is therefore the same for every stage and drops out.

The lag does not cancel at two places, and the design handles each:

- **The feedback.** At time t the feedback needs code word c's last-stage symbol,
  but that symbol was written at t+1-5 = t-4. It is one symbol "too young" for the
  40-bit output. So the feedback and the parity output are taken from a tap 32 bits
  ((I-1) x J) into the last stage, one symbol before its end. This is the `tap`
  output of `rs_delay_sr`. The last 8 bits of the last stage are unused.
- **Position 0.** Position 0 has g_0 = 1 and needs no multiplier. Its term must
  still arrive one symbol late, so `rs_fb_ctrl` passes the gated feedback through
  an 8-bit delay register, which stands in for the missing multiplier.

**Switches.** A feedback enable separates the information phase from the parity
phase. `rs_fb_ctrl` implements the two switches:

- Switch 1 is data AND enable. Its output is added to the 32-bit tap to form the
  feedback.
- Switch 2 is feedback AND enable. It drives all multipliers and the x^0 delay.

When the enable drops after the last information symbol, the whole encoder becomes
a plain shift register:

- The products already waiting in the output registers are added one last time.
- The parity then leaves through the 32-bit tap in this order: parity symbol 31 of
  code words 0..4, then symbol 30 of code words 0..4, and so on.
- The first parity bit follows the last information bit on the very next clock.
- Reading the parity out shifts zeros into every stage. The next block can
  therefore start at once, with no reset.

## Slicing the encoder into chips

Each multiplier g_k feeds two adders, at positions k and 32-k. Picture the 32
stages as 16 "rows", with row k holding multiplier g_k and the adders and stages at
positions k and 32-k. Row 16 holds position 16, and position 0 is fed by the x^0
delay.

### Row partitioning (default, `rs_encoder_chip`)

Each chip takes four rows: 4 multipliers, 8 adders and 8 stages of 40 bits. The
two G-select inputs tell a chip its position. The coefficient table
(`rs_coef_table`, 16 x 8 bits plus four 4-to-1 multiplexers) then hands that chip
its four coefficients.

Inside a chip the eight stages form three chains. They are named here after the
pins of the original 24-pin part (b = 4 x (3 - G-select)):

- **Z**: four stages at positions b+1..b+4, using g_{b+1}..g_{b+4}. Input pin 11,
  output pin 10.
- **X**: three stages at positions 29-b..31-b, using g_{b+3}..g_{b+1}. Input
  pin 17, output pin 6. The 32-bit tap of its last stage is pin 14.
- **Y**: one stage at position 32-b, which is position 0 on the last chip. Its
  adder takes a stage output on pin 8 and the product g_b, made on the next chip,
  on pin 9. Output pin 7.

| chip (G-select) | multipliers | Z | X | Y |
|---|---|---|---|---|
| 0 (first) | g13..g16 | 13..16 | 17..19 | 20 |
| 1 | g9..g12 | 9..12 | 21..23 | 24 |
| 2 | g5..g8 | 5..8 | 25..27 | 28 |
| 3 (last) | g1..g4 | 1..4 | 29..31 | 0 |

Each chip exports its highest product g_{b+4} on pin 13 (`prod_out`). Every other
product is used on the chip that makes it.

The board wiring (`rs_encoder_top`, generate branch `g_row`):

- Pin 8 comes from pin 6 of the same chip, so X runs straight into Y. On the last
  chip pin 8 is tied to 0, because its Y stage is position 0.
- Pin 9 comes from pin 13 of the next chip. On the last chip it comes from pin 4
  of the first chip, the feedback delayed by one symbol (the x^0 term).
- Pin 7 drives pin 17 of the next chip. On the last chip it drives its own
  pin 11, the start of the Z chains.
- Pin 11 of the other chips comes from pin 10 of the next chip, and the first
  chip's pin 10 turns around into its own pin 17.
- The last chip's pin 14 is the parity output. It goes back to the first chip's
  feedback adder, and the first chip's feedback output (pin 5) drives the
  feedback input of every chip.

The stage chain therefore runs: position 0 on the last chip, Z chains from the
last chip up to the first (1..16), then X and Y of the first chip (17..20), of
the next (21..24), and so on, ending with X of the last chip (29..31). Between
two neighbouring chips there are only four single-bit signals (pins 7/17, 9/13
and 10/11), plus the shared feedback and enable lines.

### Column partitioning (`COLUMN_PART = 1`, `rs_encoder_chip_col`)

Each chip holds eight consecutive stages: chip k holds positions 8k..8k+7 and the
multipliers g_{4k+1}..g_{4k+4}. Every multiplier output and every adder's product
input is a pin, which adds 6 signal pins per chip. The board routes product
g_{min(p,32-p)} to position p, and the chain runs straight from chip 0 to chip 3.

## Stage registers in RAM (`STAGE_RAM = 1`, `rs_ram_stage`)

Each 40-bit stage can be replaced by a 40 x 1 RAM used as a circular buffer. In
each clock:

1. The bit at the pointer is read. It is the stage output, written L = ilevel x 8
   clocks earlier.
2. The same address is overwritten with the new input (write after read).
3. The pointer advances modulo L.

A second read port at pointer + 8 gives the 32-bit-equivalent tap. The interleaving
level thus becomes a run-time input (`ilevel`, 1..5), and the timing counter
follows it. At ilevel = 1 the tap is the stage input itself, which gives a
non-interleaved encoder.

The `ilevel` and reset rules:

- Change `ilevel` only while `rst_n` is low.
- Hold `rst_n` low for at least 40 clocks: the RAM is cleared by a sweep during
  reset.
- With `STAGE_RAM = 0`, `ilevel` is ignored.

## Timing and interface of `rs_encoder_top`

`rs_timing` replaces the external block counter. It contains:

- a bit counter, which produces `sym_end` on the last bit of each symbol;
- a code-word counter, modulo the interleaving level;
- a column counter that counts 1..255 once every 40 clocks.

The feedback enable (`info_phase`) is high for columns 1..223.

| signal | meaning |
|---|---|
| `clk`, `rst_n` | bit clock; synchronous active-low reset (hold ≥ 40 clocks in the RAM version) |
| `data_in` | information bit, MSB first, sampled every clock while `info_phase` is high |
| `code_out` | `data_in` during the information phase, then the parity bits |
| `info_phase` | high for 223 x 5 x 8 = 8920 clocks of every 10200-clock block |
| `sym_end`, `block_start`, `bit_idx`, `cw_idx`, `column` | stream position, for the data source |
| `ilevel` | interleaving level, used only with `STAGE_RAM = 1` |

Throughput is one bit per clock. The code-stream rate equals the clock rate, so an
800 kbit/s stream needs an 800 kHz clock. Latency from the last information bit to
the first parity bit is one clock.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `J` | 8 | bits per symbol |
| `E` | 16 | correctable symbols (2E parity symbols) |
| `I` | 5 | interleaving depth; stage length I x J |
| `N_CHIPS` | 4 | chips; each holds E/N_CHIPS multipliers |
| `N_SYM` | 255 | symbols per code word |
| `FIELD_POLY` | `32'h11D` | field polynomial including x^J |
| `ROOT_EXP` | 1 | generator roots are (alpha^ROOT_EXP)^i |
| `FIRST_ROOT` | 112 | first root exponent, 2^(J-1) - E |
| `STAGE_RAM` | 0 | 1: RAM stages with run-time interleaving level |
| `COLUMN_PART` | 0 | 1: column-partitioned chips |

The helpers in `rs_pkg` support J ≤ 8 and 2E ≤ 64.

## Files

| file | contents |
|---|---|
| `rtl/rs_pkg.sv` | GF arithmetic and generator-coefficient computation (elaboration time) |
| `rtl/rs_coef_table.sv` | coefficient table and per-chip selection |
| `rtl/rs_sp_mult.sv` | serial-parallel multiplier with output serialiser |
| `rtl/rs_delay_sr.sv` | 40-bit stage shift register with 32-bit tap |
| `rtl/rs_ram_stage.sv` | RAM stage with selectable length |
| `rtl/rs_fb_ctrl.sv` | switches, feedback adder, x^0 delay |
| `rtl/rs_encoder_chip.sv` | row-partitioned chip |
| `rtl/rs_encoder_chip_col.sv` | column-partitioned chip |
| `rtl/rs_timing.sv` | bit, code-word and column counters, feedback enable |
| `rtl/rs_encoder_top.sv` | four chips, board wiring, timing, output selection |

## Verification

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. They share `tb/tb_rs_ref_pkg.sv`, a reference
model written separately from the RTL:

- field arithmetic through log/antilog tables;
- generator polynomial by direct expansion;
- parity by polynomial long division;
- a syndrome check that evaluates a code word at all 32 roots.

| testbench | what it checks |
|---|---|
| `tb_rs_encoder_top` | default encoder, three back-to-back blocks: every output bit against the reference, zero syndromes for all 15 code words, information-phase and block lengths, parity immediately after the last information bit |
| `tb_rs_encoder_std` | the same with the x^8+x^7+x^2+x+1, beta = alpha^11 code |
| `tb_rs_encoder_col` | column-partitioned encoder, two blocks |
| `tb_rs_encoder_ram` | RAM encoder at interleaving levels 5, 1 and 3, two blocks each |
| `tb_rs_encoder_chip`, `tb_rs_encoder_chip_col` | one chip, random stimulus on every pin, against a bit-level model |
| `tb_rs_coef_table`, `tb_rs_sp_mult`, `tb_rs_delay_sr`, `tb_rs_ram_stage`, `tb_rs_fb_ctrl`, `tb_rs_timing` | the building blocks |

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/rs_pkg.sv tb/tb_rs_ref_pkg.sv \
    tb/tb_rs_encoder_top.sv --top-module tb_rs_encoder_top
./obj_dir/Vtb_rs_encoder_top
```

Verilator finds the other modules through `-Irtl`, which works because every file is
named after its module. Each run takes well under a second.

## Where this design makes its own choices

The arithmetic, the bit-serial stage structure, the one-symbol multiplier lag, the
32-bit tap, the x^0 delay, the switches and the enable timing all follow the
original architecture. The following are choices of this implementation:

- **How the rows split into the Z, X and Y chains on each chip.** The split was
  worked out so that every chip-to-chip connection the original names holds
  (pins 8/6, 9/13, 7/17, the last chip's 7/11 and 9/4). Two connections are not
  named in the original and are this design's reading: pin 11 from pin 10 of the
  next chip, and the turnaround from pin 10 to pin 17 on the first chip.
- **The column-partitioned assignment** of stages and multipliers to chips, and its
  wiring.
- **The multiplier's internals.** It is an MSB-first Horner accumulator, and bits
  travel MSB first everywhere.
- **The input of the x^0 delay register** is the gated feedback, not the ungated
  one.
- **Synchronous reset** of every register, plus the clearing sweep of the RAM
  stages. Chips also receive a symbol strobe (`sym_end`) from the timing counter.
- **The output multiplexer** that merges information and parity into `code_out`.
- **RAM timing.** The RAM stage reads and writes in the same clock, so it runs as
  fast as the shift-register version. In the original, the RAM version ran at a
  quarter of the speed (200 vs 800 kbit/s), because it made two RAM accesses per bit.
- **The telemetry-standard code uses plain polynomial-basis arithmetic** in the
  alternative field. A design that keeps symbols in another basis would need
  conversion at its ports.

Not implemented:

- **Several encoders side by side for more throughput, one code word each.** This
  needs no new logic: place N copies of the RAM version with `ilevel = 1` and
  give each its own code word. `tb_rs_encoder_ram` simulates level 1.
- **Splitting the message polynomial.** The message is split into N polynomials,
  each taking every N-th symbol. Their remainders are then delayed and summed. The
  delays and the summing network are not specified, so this is not built.
- **A symbol-parallel variant** (8 bits per clock). It is only named as an option,
  with no structure given.
