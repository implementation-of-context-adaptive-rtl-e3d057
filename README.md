# CAVLC entropy coder for an H.264 baseline video encoder

After intra prediction, the 4x4 integer transform and quantization, an H.264
encoder holds blocks of 16 small signed integers that are mostly zero. The
baseline profile codes each block with CAVLC (context adaptive variable
length coding). CAVLC sends how many coefficients are non-zero, the signs of
the trailing +/-1 values, the remaining levels, the zeros before the last
non-zero coefficient, and the run of zeros in front of each coefficient. Every
code table is chosen from what has already been coded. This RTL takes
quantized 4x4 blocks in, one coefficient per clock, and sends the CAVLC bit
stream out of a 128 Kbit FIFO onto a serial channel.

The processor is a chain of five blocks, each with flow control:

```
coeff_in ─► dram_nc ─► cavlc_encoder ─► store_coded_blk ─► p2s ─► bit_fifo ─► serial channel
  12 bit    2 banks,    coeff_token,     syntax elements    1 bit   128 Kbit
            zig-zag,    T1 signs,        -> 21-bit words    /clock
            nC          levels,
                        total_zeros,
                        run_before
```

It codes only the residual blocks. Macroblock and slice headers (mb_type,
prediction modes, coded_block_pattern, QP) come from elsewhere in an encoder
and are not generated here.

## The bit stream of one block

A 4x4 block is read in zig-zag order and coded from its highest frequency
down. For the block

```
 0  4 -1  0
 0 -1  1  0        zig-zag:  0 4 0 1 -1 -1 0 1 0 0 0 0 0 0 0 0
 1  0  0  0
 0  0  0  0
```

there are 5 non-zero coefficients (TotalCoeff). The last three of them,
counted down from the highest frequency, are +/-1 (T1s = 3). A fourth trailing
+/-1 exists, but at most three are coded as T1s, so it is coded as a level.
There are 3 zeros below the highest non-zero coefficient (total_zeros). With
nC = 0 the stream is:

| element | value | code |
|---|---|---|
| coeff_token | TotalCoeff 5, T1s 3, table nC 0..1 | `0000100` |
| T1 signs | +, -, - (highest frequency first) | `0` `1` `1` |
| level | +1, suffixLength 0 | `1` |
| level | +4, suffixLength 1 | `0001` `0` |
| total_zeros | 3 for TotalCoeff 5 | `111` |
| run_before | zerosLeft 3, run 1 | `10` |
| run_before | zerosLeft 2, run 0 | `1` |
| run_before | zerosLeft 2, run 0 | `1` |
| run_before | zerosLeft 2, run 1 | `01` |
| (last coefficient) | its run is implied | — |

That gives `0000100 011 1 00010 111 10 1 1 01`, 25 bits. The encoder
testbench checks this string bit for bit.

The rules behind the codes:

* **coeff_token** is one code for the pair (TotalCoeff, T1s). The context nC
  chooses among four tables: 0<=nC<2, 2<=nC<4, 4<=nC<8 (variable length), and
  nC>=8, a 6-bit fixed code `TotalCoeff-1 : T1s`, with `000011` for an empty
  block. An empty block sends only its coeff_token.
* **Levels** are sent as levelCode = 2*level-2 for positive and -2*level-1 for
  negative levels. The first level after fewer than three T1s cannot be +/-1,
  so 2 is subtracted from its levelCode. The code is `prefix` zeros, a `1`,
  then `suffixLength` suffix bits. suffixLength starts at 0, or at 1 when
  TotalCoeff > 10 and T1s < 3. After each level it becomes at least 1, and it
  grows by one (up to 6) when |level| > 3<<(suffixLength-1). Large values
  escape: prefix 14 with a 4-bit suffix (suffixLength 0 only), or prefix 15
  with a 12-bit suffix. That covers the whole 12-bit coefficient range, and the
  longest level code is 28 bits.
* **total_zeros** is sent when 0 < TotalCoeff < 16. Its table is chosen by
  TotalCoeff.
* **run_before** is sent for each coefficient but the lowest-frequency one,
  and only while zeros are left. Its table is chosen by zerosLeft (1..6, or
  more than 6).

All tables are those of the H.264 standard and are held in `rtl/cavlc_pkg.sv`
as length/value arrays.

## Context nC, block order and the double buffer (`dram_nc`)

Coefficients arrive in raster order inside a block. Blocks arrive in macroblock
coding order, 24 per 4:2:0 macroblock:

* 0..15 are luma, numbered in the H.264 order: 8x8 quadrants in Z order, and
  4x4 blocks in Z order inside each quadrant. Block `b` sits at column
  `{b[2],b[0]}` and row `{b[3],b[1]}`.
* 16..19 are Cb and 20..23 are Cr, each a 2x2 grid in raster order.

Macroblocks arrive in raster order over the picture. The input `mb_width` gives
the picture width in macroblocks (1..`MAX_MB_W`, default 64, i.e. 1024 pixels).
`pic_start`, high with the first coefficient of a picture, restarts the count
at the top-left macroblock. Reset does the same.

`dram_nc` writes a block into one of two 16-entry banks and counts its non-zero
coefficients as it does. When the bank is full, the buffer works out the
block's nC:

* If both the left neighbour (nA) and the upper neighbour (nB) exist, nC is
  `(nA + nB + 1) >> 1`.
* If only one exists, nC is that one.
* If neither exists, nC is 0.

nC and the non-zero count are stored with the bank. The counts of the current
macroblock are kept in a 24-entry table.

As in H.264, neighbours in the macroblock to the left and in the macroblock
above count too. When a macroblock is complete, its right-column counts and its
bottom-row counts (4 luma, 2 Cb, 2 Cr each) are saved. The right column goes to
a left-edge register and the bottom row to a line buffer with one entry per
macroblock column. Blocks outside the picture are unavailable: the left
neighbour at the left edge and the upper neighbour in the first macroblock row.
All blocks are treated as 16-coefficient 4x4 blocks. There are no
separate Intra16x16 DC or chroma DC blocks, so the chroma-DC coeff_token table
is not used.

The read side sends a full bank as a burst of 16 coefficients in zig-zag order,
one per clock. The burst starts when the encoder's capture buffer is empty
(`enc_ready`) and pauses while `halt` is high. With each burst come nC, the
non-zero count and the block number (0..23). Those three values stay steady for
the whole burst.

## The encoder (`cavlc_encoder`)

The encoder has two stages:

* **Capture stage.** Holds the 16 coefficients of the next block.
* **Working stage.** Codes the current block.

When a block is complete in the capture stage and the working stage is idle,
one clock copies the block across. That same clock also analyses the block,
with combinational logic over all 16 positions:

* It lists the non-zero values from the highest frequency down, with their scan
  positions.
* It works out each coefficient's run of zeros.
* It counts T1s (up to 3) and works out total_zeros.

A state machine then issues one syntax element per clock, in bitstream order:
token (with signs), each level, total_zeros, each run_before. The element stays
on the outputs until `store_coded_blk` is ready. `halt` holds the machine. While
one block is coded, `dram_nc` can already send the next.

A block costs 1 clock for the copy, plus 1 + (TotalCoeff - T1s) + 1 + (number
of runs sent) element clocks. That is at most 33 clocks, and 2 for an empty
block. These counts assume no stalls. The 16-clock input burst of the next
block overlaps with this work.

Outputs, with the widths of the processor's block diagram:

* `coeff_token[15:0]`/`coeff_token_len[4:0]`, `no_of_T1s[1:0]` and
  `T1s_sign[2:0]` (right-aligned; the highest-frequency sign is the first one
  sent).
* `no_of_prefix_bits[3:0]`, `no_of_suffix_bits[3:0]` and `level_suffix[12:0]`.
  level_suffix is the `1` that ends the prefix followed by the suffix, so a
  level is `no_of_prefix_bits` zeros followed by the low
  `no_of_suffix_bits+1` bits of level_suffix.
* `tot_zeros_code[8:0]`/`tot_zeros_len[3:0]` and
  `zero_runs_code[10:0]`/`zero_runs_len[3:0]`.

Each of these groups has its own valid signal.

## Parallel words and serialization

`store_coded_blk` turns each element into parallel words `code_out[20:0] =
{length[4:0], code[15:0]}`. The code is right-aligned, and its `length` bits
are sent MSB first.

* coeff_token and its sign bits share a word when they fit in 16 bits.
* Levels up to 16 bits take one word.
* Longer elements are split. A token of up to 16 bits with up to 3 signs
  becomes token, then signs. An escape level becomes a word of prefix zeros,
  then a word with the 1 and the suffix.
* The store holds two words. It takes a new element when it is empty, or when
  its last word leaves in the same clock.

`p2s` shifts one word out at one bit per clock. It takes the next word during
the last bit of the current one, so a stream of words leaves with no gaps.
`bit_fifo` is 131072 x 1 bit with a synchronous read: the serial channel
raises `bs_rd_en` and gets the bit on `bs_out` one clock later, flagged by
`bs_out_valid`.

## Flow control and `halt`

Back-pressure runs from the channel to the source:

1. A full FIFO stops `p2s`.
2. A busy `p2s` stops `store_coded_blk`.
3. A full store holds the encoder's element.
4. A busy encoder keeps its capture buffer full.
5. A full capture buffer keeps `dram_nc` from starting a burst.
6. With both banks full, `coeff_ready_out` goes low.

The source must watch `coeff_ready_out`. A coefficient offered while it is low
is dropped, and the sticky `overflow` output is set. `halt` is meant for a rate
controller. It freezes the read side of `dram_nc` and the encoder. Writes into
a free bank, and everything downstream of the encoder, keep running. Reset
(`reset_n`) is asynchronous and active low.

## Throughput and sizes

The input takes one coefficient per clock, so one block needs 16 clocks. The
output sends one bit per clock. One 1024x768 4:2:0 frame has 3072 macroblocks,
73,728 blocks and 1,179,648 coefficients. At a compression of about 10 (8-bit
samples), a frame comes to about 0.94 Mbit. Real time at 25 frames/s therefore
needs about 30 MHz, plus whatever the encoder's longer blocks and the channel
add.

The design stores no frame. Its memories are:

* two 16 x 12-bit banks,
* two 16-entry block registers in the encoder,
* a 24 x 5-bit count table,
* the nC edge counts: 8 x 5 bits for the left macroblock, and a line buffer of
  `MAX_MB_W` x 8 x 5 bits (2560 bits at 64 columns) for the row above,
* the 128 Kbit FIFO.

A compressed 512x512 4:2:0 picture at compression 6 to 14 is 0.22 to 0.52
Mbit. That is more than the FIFO holds, so the channel has to drain the FIFO
while a picture is coded. When it cannot keep up, the FIFO fills and the
processor stalls the source through `coeff_ready_out`; nothing is lost.

Parameters: `cavlc_top #(FIFO_DEPTH = 131072, MAX_MB_W = 64)`,
`dram_nc #(MAX_MB_W = 64)` and `bit_fifo #(DEPTH = 131072,
WIDTH = 1)`. The widths (12-bit coefficients, 6-bit block number, 21-bit words)
are constants in `cavlc_pkg`.

## What follows the source description and what does not

The following come from the processor's published description:

* the five-block chain,
* the names and widths of the signals between dram_nc, the encoder and
  store_coded_blk,
* the double buffer with zig-zag read-out,
* `halt`, the 21-bit `code_out`, and the 128 Kbit FIFO,
* the CAVLC algorithm, with its worked example.

This design's own choices:

* The layout of the 21-bit word (5-bit length, 16-bit code).
* Raster input order inside a block, and the block numbering 0..23.
* Reading the `nc` output of dram_nc as the coeff_token context nC.
* The `mb_width` and `pic_start` inputs, which give the picture geometry that
  nC needs across macroblock edges.
* All ready/valid handshakes, `coeff_ready_out` and `overflow`.
* One element per clock in the encoder and one bit per clock in `p2s`.
* The FIFO read interface.

The description builds the coeff_token by concatenating TotalCoeff and T1s,
but it also gives it a length output and a 16-bit width. This design follows
the second reading, so coeff_token is the variable length code. The upper bits
of `tot_zeros_code` and `zero_runs_code` are always 0, because no code value in
those tables exceeds 7.

## Verification

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`.
The reference model is `tb/cavlc_ref_pkg.sv`. It holds a behavioural CAVLC
encoder, a CAVLC decoder, the nC rule and a random block generator. The code
tables of `cavlc_pkg` are prefix-free, and their Kraft sums are 1 or one
codeword short of 1, as in the standard.

| testbench | what it shows |
|---|---|
| `tb_cavlc_encoder` | The worked example bit for bit. The empty-block codes of all four coeff_token tables (`1`, `11`, `1111`, `000011`). 400 random blocks (sparse, dense, large-valued, empty) against the reference, with random `halt` and ready stalls. |
| `tb_dram_nc` | Zig-zag order, non-zero counts, block numbers and nC over a picture of 2x2 macroblocks, then a `pic_start` and one row of a second picture, with `halt` and a random consumer. Also `coeff_ready_out` and `overflow` when both banks are full. |
| `tb_store_coded_blk` | 2000 random elements of all kinds, including 28-bit escape levels. The word bits must equal the element bits, and each word must hold 1..16 bits. |
| `tb_p2s` | Bit order under random stalls, and the rate: one bit per clock with no gaps. |
| `tb_bit_fifo` | A 64-entry FIFO against a queue model: data, read latency, level, full and empty. |
| `tb_cavlc_top` | 12 macroblocks through the whole chain (a picture 4 macroblocks wide and 2 high, then one row of a second picture), with a 512-bit FIFO and a bursty channel. The stream must equal the reference, and decoding it must give back every coefficient. Fails if any of these never happens: halt during coding, input back-pressure, FIFO full, both banks full, each coeff_token table, more than three trailing ones, empty and 16-coefficient blocks, escape levels, suffixLength 6, split words. |
| `tb_cavlc_top_full` | One 1024x768 4:2:0 frame (3072 macroblocks) at the default sizes, checked bit for bit and decoded back. It takes a few seconds. |
| `tb_cavlc_picture_qp` | A generated 512x512 4:2:0 picture, transformed and quantized in the testbench (H.264 4x4 integer transform and quantizer, no prediction), coded at QP 16, 22, 28 and 34 as four pictures back to back (`mb_width` = 32, `pic_start` on each) at the default sizes. Checked bit for bit and decoded back. It reports the bits per picture: 931,393, 613,139, 428,736 and 272,240, a compression of 3.4 to 11.6 on this noisy synthetic picture. |

To run one with plain Verilator (5.x) from the repository root (the testbench
code gives width warnings, hence `-Wno-fatal`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/cavlc_pkg.sv tb/cavlc_ref_pkg.sv tb/tb_cavlc_top.sv --top-module tb_cavlc_top
./obj_dir/Vtb_cavlc_top
```

Not verified:

* Interoperability with a real H.264 decoder. The stream has no headers, and
  there are no separate DC blocks.
* Timing closure at any clock frequency.

## Files

* `rtl/cavlc_pkg.sv`: widths, the code word type, the zig-zag scan, and the
  coeff_token, total_zeros and run_before tables with their lookup functions.
* `rtl/dram_nc.sv`, `rtl/cavlc_encoder.sv`, `rtl/store_coded_blk.sv`,
  `rtl/p2s.sv`, `rtl/bit_fifo.sv`: the blocks.
* `rtl/cavlc_top.sv`: the processor.
* `tb/`: the reference package and the testbenches listed above.
