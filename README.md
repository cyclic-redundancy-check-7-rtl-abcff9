# Parallel CRC(7,4) decoder

A cyclic redundancy check protects a 4-bit data word by appending three
check bits, giving a 7-bit code word that is exactly divisible, modulo 2, by
a 4-bit divisor. The receiver repeats the division: a zero remainder (the
*syndrome*) means no error was detected and the data word, the code word's
four MSBs, is accepted; anything else means it is discarded.

This design does the receiver's division in one combinational pass. Instead
of clocking the code word through a shift register, the four steps of the
long division are unrolled into four identical hardware stages, and a
three-input NOR turns the final remainder into an `accept` bit.

## Modulo-2 long division, unrolled

Modulo-2 division is ordinary long division with XOR in place of
subtraction and no borrows. Dividing 1001110 by 1011:

```
1001 xor 1011 = 010   bring down 1 -> 0101
0101 (MSB 0)  = 101   bring down 1 -> 1011
1011 xor 1011 = 000   bring down 0 -> 0000
0000 (MSB 0)  = 000   -> syndrome 000, data word 1001 accepted
```

With 1000110 (one bit flipped) the same steps end in syndrome 011, and the
word is discarded.

Each line is one step with a fixed rule. Look at the top bit of the 4-bit
dividend. If it is 1, XOR the divisor's low three bits into the dividend's
low three bits. If it is 0, XOR in 000, which leaves them unchanged. The
divisor's MSB is always 1, so it never needs a wire. It only cancels the
dividend MSB, which the step then drops.

In gates, each remainder bit is `dvd[j] ^ (dvs[j] & dvd[3])`: three AND
gates and three XOR gates (`mod2_divider`). The next step's dividend is the
3-bit remainder with the next code word bit appended as its LSB.

## Structure

```
cw[6:3] ──► stage 0 ─rem─┐
               cw[2] ────┴► stage 1 ─rem─┐
                               cw[1] ────┴► stage 2 ─rem─┐
                                               cw[0] ────┴► stage 3 ─► syndrome ─► nor3 ─► accept
dv[2:0] ──► all four stages (divisor low bits; MSB 1 implied)
cw[6:3] ──────────────────────────────────────────────────────────────► dataword
```

| File | Contents |
|---|---|
| `rtl/crc74_pkg.sv` | widths (n = 7, k = 4, n−k = 3), word types, the default divisor's low bits `3'b011` (divisor 1011) |
| `rtl/mod2_divider.sv` | one division step: 4-bit dividend, 3 divisor bits, 3-bit remainder |
| `rtl/nor3.sv` | three-input NOR, built as OR, OR, invert |
| `rtl/crc74_decoder.sv` | the top: four `mod2_divider` stages chained as above, `nor3` on the syndrome |

### Top-level ports (`crc74_decoder`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `cw` | in | 7 | received code word, bit 6 first |
| `dv` | in | 3 | divisor bits below its leading 1 (`3'b011` for 1011) |
| `accept` | out | 1 | 1 when the syndrome is 000 |
| `dataword` | out | 4 | `cw[6:3]`; meaningful only while `accept` is 1 |
| `syndrome` | out | 3 | remainder of `cw` divided by `{1, dv}` |

There is no clock and no reset. The path from `cw` to `accept` is four stage
delays (one AND and one XOR each) plus the NOR. To use the decoder in a
clocked system, register its inputs or outputs as the timing requires.

The divisor is an input, so the same logic checks any divisor with a leading
1. The sender must of course have used the same one. Divisor 1011
(x³ + x + 1) is the one the code below is built from and the default of the
testbenches.

## The code for divisor 1011

| data | code word | data | code word |
|---|---|---|---|
| 0000 | 0000000 | 1000 | 1000101 |
| 0001 | 0001011 | 1001 | 1001110 |
| 0010 | 0010110 | 1010 | 1010011 |
| 0011 | 0011101 | 1011 | 1011000 |
| 0100 | 0100111 | 1100 | 1100010 |
| 0101 | 0101100 | 1101 | 1101001 |
| 0110 | 0110001 | 1110 | 1110100 |
| 0111 | 0111010 | 1111 | 1111111 |

Any two code words differ in at least three bits. Every 1-bit and 2-bit
error therefore gives a non-zero syndrome and is detected. The decoder only
detects errors. It does not correct them.

## Design choices and departures

- **Bringing down code word bits.** Stages 1 to 3 take `cw[2]`, `cw[1]` and
  `cw[0]` as their dividend LSB. This is what the long division above
  requires, and it is the only wiring that makes 1001110 pass and its
  neighbours fail. A description that feeds 0 into those LSBs would compute
  the encoder's remainder of `cw[6:3]` and ignore the check bits entirely.
- **Extra outputs.** The reference circuit has `accept` as its only
  output. `dataword` and `syndrome` are ports here for convenience.
  `dataword` is plain wiring from `cw[6:3]`, so synthesis reports it as
  outputs driven straight from inputs.
- **Parameters.** `crc74_decoder` has parameters `N` (code word width,
  default 7) and `K` (data word width, default 4). It builds K division
  stages of width N−K. `nor3` is used when N−K = 3; for other widths a
  reduction NOR takes its place. Only the defaults are tested.
- **Not included.** Three things are absent. The analog-to-digital and
  digital-to-analog bridges and the voltage sources belonged to the mixed
  signal simulation of the original circuit and have no logic function.
  The sender-side encoder is outside this design. The testbenches use its
  code book as reference data.

## Simulation

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and has a watchdog. Every module is combinational, so each check samples its
outputs one time unit after the inputs change.

| Testbench | What it checks |
|---|---|
| `tb/mod2_divider_tb.sv` | all 16 dividends × 8 divisors against an integer model; the three steps of the 1001110 example |
| `tb/nor3_tb.sv` | the eight-row truth table |
| `tb/crc74_decoder_tb.sv` | the top at its default size, in five groups: the code book (accepted, data word returned), the two worked examples (syndromes 000 and 011), the 1001_000…1001_111 sweep, all 128 code words × 8 divisors against a bit-serial long-division model, and every 1- and 2-bit error on every code word. It counts accepted and discarded words and fails if either count is zero. |
| `tb/crc74_sweep_tb.sv` | the demonstration run: divisor 1011, cw = 1001 followed by 000…111; `accept` must be high for exactly one step, 1001_110 |

To run one with Verilator 5:

```
verilator --binary --timing --assert rtl/crc74_pkg.sv rtl/mod2_divider.sv \
  rtl/nor3.sv rtl/crc74_decoder.sv tb/crc74_decoder_tb.sv \
  --top-module crc74_decoder_tb
./obj_dir/Vcrc74_decoder_tb
```

For another testbench, change the last file and the top module name. Each
test finishes in well under a second.

Verilator's `-Wall` lint reports one warning, for
`crc74_pkg::DIVISOR_LOW_DEFAULT` when only the RTL is linted. That constant
is there for testbenches and users, not for the decoder's logic.
