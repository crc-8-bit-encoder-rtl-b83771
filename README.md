# CRC-8-CCITT encoder and decoder

A cyclic redundancy check lets a receiver detect whether a block of data was
corrupted on its way. The sender treats the data as a polynomial over GF(2),
divides it by a fixed generator polynomial and appends the remainder. The
receiver divides the whole received block by the same generator. A zero
remainder means no error was detected.

This RTL implements that scheme for single bytes. It uses the CRC-8-CCITT
generator

    G(x) = x^8 + x^2 + x + 1        (0x107, written 8'h07 without the x^8 term)

An 8-bit dataword becomes a 16-bit codeword. The **encoder** produces one
codeword per clock. The **decoder** checks one codeword per clock and forwards
the dataword if the codeword is clean. Both are small, fully parallel XOR
networks behind one output register. They follow a published FPGA
encoder/decoder pair that targeted a Spartan-3E. The port names and widths are
the ones that design uses.

## The code

| item | value |
|---|---|
| dataword | 8 bits |
| remainder (check value) | 8 bits |
| codeword | `{dataword, remainder}`: dataword in bits 15:8, remainder in bits 7:0 |
| generator | x^8 + x^2 + x + 1 |
| initial remainder | 0 |
| final XOR / bit reflection | none; most significant bit first |

With these settings the encoder reproduces the reference codewords of the
original design:

| data | codeword (decimal) | codeword (hex) |
|---|---|---|
| 185 | 47398 | B926 |
| 70  | 18133 | 46D5 |
| 80  | 20663 | 50B7 |
| 90  | 23169 | 5A81 |
| 130 | 33415 | 8287 |

The initial value, final XOR and reflection are not stated explicitly. They
were fixed by matching this table. ATM header error control, often named as an
application of this polynomial, also XORs the remainder with 0x55. This design
does **not** do that. Add it in `crc8_encoder` and `crc8_decoder` if you need
ATM HEC.

For this generator, every single-bit error in a 16-bit codeword, every
odd-weight error and every burst of 8 bits or fewer gives a non-zero
remainder. The checker testbench checks these exhaustively for single bits and
bursts.

## From long division to logic

Both dividers are written as the schoolbook long division, as a `for` loop
over the input bits inside `always_comb`. The loop has constant bounds, so
synthesis unrolls it into one XOR expression per remainder bit. There is no
state and no iteration in hardware.

- **`crc_generator`** (encoder side) divides `dataword * x^CRC_W`. Each step
  shifts the partial remainder left. The bit that leaves the top is XORed with
  the next dataword bit. If the result is 1, the polynomial is XORed in.
  Feeding the data bit in at the top this way is the same as appending
  `CRC_W` zeros (the "augmented dataword") and dividing. It saves `CRC_W`
  iterations.
- **`crc_checker`** (decoder side) divides the codeword itself. The codeword
  bits enter the remainder at the bottom, and the polynomial is XORed in
  whenever a 1 leaves the top. This gives `codeword(x) mod G(x)`. It is zero
  for every codeword the encoder makes, and for a corrupted codeword it equals
  `error(x) mod G(x)`.

Both modules take `DATA_W`/`CW_W`, `CRC_W` and `POLY` as parameters. The
defaults are the CRC-8-CCITT values from `crc8_pkg`. The testbenches also run
them with the usual classroom example, G(x) = x^3 + x + 1 (`1011`, so
`POLY = 3'b011`). In that example dataword `1101` gives remainder `001`, and
codeword `1101001` divides to `000`.

## Encoder: `crc8_encoder`

```
data[7:0] ──┬──────────────────────────► codeword[15:8] ─┐
            └─► crc_generator ─► crc ──► codeword[7:0]  ─┴─► register ─► codeword[15:0]
```

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst | in | 1 | active high, synchronous: codeword register cleared to 0 |
| data | in | 8 | dataword |
| codeword | out | 16 | `{data, crc8(data)}` registered |

The codeword appears one rising edge after `data`. A new byte can be applied
every cycle.

## Decoder: `crc8_decoder`

```
codeword[15:0] ─► crc_checker ─► syndrome ─┬──────────────────────► register ─► remaind[7:0]
      │                                    ▼
      └─ codeword[15:8] ──────────► crc_decision_logic ─ data ─► register ─► data[7:0]
```

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst | in | 1 | active high, synchronous: both output registers cleared to 0 |
| codeword | in | 16 | received codeword |
| data | out | 8 | dataword if the remainder is zero, else 0 (discarded) |
| remaind | out | 8 | remainder of the check: 0 = clean, non-zero = error detected |

`crc_decision_logic` implements accept/discard. A zero syndrome passes the
dataword through. Any other syndrome forces the data to zero. It also has
`accept`/`discard` flags, but the decoder leaves them unconnected so that its
port list stays the original five ports. A non-zero `remaind` is the error
indication. Both outputs follow `codeword` by one rising edge.

Note that a discarded byte and a genuine zero byte both show as `data = 0`.
Use `remaind` to tell them apart.

## The link: `crc8_codec_top`

The top joins the two halves as a transmitter and a receiver:

```
data_in ─► crc8_encoder ─► codeword_tx ─► XOR err_mask ─► crc8_decoder ─► data_out, remaind
```

`err_mask` flips codeword bits on the way, which stands in for a noisy
channel. It is combinational and applies to the codeword that `codeword_tx`
shows in the same cycle. With `err_mask = 0`, a byte on `data_in` reaches
`data_out` two rising edges later. The link and its error mask are this
design's own addition. The original treats encoder and decoder as separate
components.

## Files

| file | content |
|---|---|
| `rtl/crc8_pkg.sv` | widths, polynomial, `codeword_t` struct |
| `rtl/crc_generator.sv` | combinational remainder of the augmented dataword |
| `rtl/crc_checker.sv` | combinational remainder of a codeword |
| `rtl/crc_decision_logic.sv` | accept / discard |
| `rtl/crc8_encoder.sv` | registered encoder |
| `rtl/crc8_decoder.sv` | registered decoder |
| `rtl/crc8_codec_top.sv` | encoder, error-injecting link, decoder |
| `tb/crc_ref_pkg.sv` | reference model: wide-integer polynomial division |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the block with `crc_ref_pkg`. That package divides
with the full generator aligned under each leading 1 of a wide integer. This
is a different formulation from the RTL's shift loops. The testbenches also
compare against the published values above.

- `crc_generator_tb`: the five reference pairs, all 256 bytes, and the 4-bit
  `1011` example with all 16 datawords.
- `crc_checker_tb`: every valid codeword gives 0. Every single-bit error and
  every burst of 2 to 8 bits on every valid codeword is detected. 2000 random
  words are compared with the reference.
- `crc_decision_logic_tb`: pass-through on a zero syndrome, zero on any other.
- `crc8_encoder_tb`, `crc8_decoder_tb`: replay the reference streams,
  including two resets. They also check that the output changes exactly at
  the expected edge, then run random traffic with resets. The decoder test
  injects every single-bit error and random errors.
- `crc8_codec_top_tb`: end-to-end run at full size. It uses a cycle-accurate
  model of both pipeline stages and 4000 random cycles with resets and
  single- or multi-bit link errors. It counts resets, accepted codewords,
  discarded codewords and caught single-bit errors, and fails if any count is
  zero.

Each testbench ends with `TB_RESULT checks=N failures=M` and has a cycle or
time watchdog.

To simulate with Verilator 5, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/crc8_pkg.sv tb/crc_ref_pkg.sv rtl/*.sv tb/crc8_codec_top_tb.sv \
  --top-module crc8_codec_top_tb -Mdir obj_top
./obj_top/Vcrc8_codec_top_tb
```

Swap the testbench file and top module name for the other blocks. To lint:
`verilator --lint-only -Wall rtl/crc8_pkg.sv rtl/*.sv --top-module crc8_codec_top`.
The remaining lint warnings are the intentionally open `accept`/`discard`
pins in the decoder. Package constants unused by a single module also warn.

## Choices made here, and open points

- **Reset** is active high, as in the original, and **synchronous** here. The
  original does not say which. Make the `always_ff` blocks
  `@(posedge clk or posedge rst)` for an asynchronous reset.
- **Latency**: one registered stage per component. The original reports 16
  I/O flip-flops for each component, which matches registering the 16 output
  bits, but it does not state the latency.
- **Discarded data shows as zero.** The original says only that a corrupted
  codeword is discarded.
- **The initial value, reflection and final XOR** were fixed by the reference
  table (see above).
- **Size**: the original reports 8 four-input LUTs and 4 slices for the
  encoder, and 20 LUTs and 11 slices for the decoder, on a Spartan-3E. A
  lower decoder figure (10 LUTs, 5 slices) also appears alongside it. The
  generic Yosys synthesis of this RTL gives about 17 word-level XOR cells for
  the generator and 16 for the checker, plus 16 flip-flops in each registered
  component. No FPGA mapping was done here.
