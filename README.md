# Fault tolerant parallel filters with DMC protected result memory

When a system runs several filters in parallel on the same input, protecting each
one with duplication or triple modular redundancy costs far more than the filters
themselves. This design protects four *unmatched* FIR filters (four different
impulse responses, one shared input) with only two extra filters, using an
error-correcting code whose "bits" are whole filter outputs. The corrected output
samples are then stored in memories protected by a decimal matrix code (DMC), which
corrects multiple-cell upsets in a stored word at a small area cost because the
encoder is reused as part of the decoder.

```
            +--> h1 --+                         +--> DMC mem y11 (samples 1-4 of filter 1)
            +--> h2 --+     +-------------+     +--> DMC mem y12 (samples 5-8 of filter 1)
 x ---------+--> h3 --+---->| ECS single  |---->|    ...
            +--> h4 --+     | fault       |  packer (8 samples x 8 bits = 2 words/filter)
            +--> h5 --+---->| correction  |     +--> DMC mem y41
            +--> h6 --+     +-------------+     +--> DMC mem y42
      h5 = h1+h2+h3+h4      h6 = h1+2h2+3h3+4h4
```

All sizes are those of the case study the design follows: 4 filters, 8 output
samples of 8 bits per filter and block, 8 memories of one 32-bit word each, a DMC
word of 2 x 4 symbols of 4 bits.

## Catching a faulty filter: the efficient coding scheme (ECS)

A FIR filter is linear, so a filter whose impulse response is a weighted sum of the
others outputs the same weighted sum of their outputs. The two redundant filters are

- h5 = h1 + h2 + h3 + h4
- h6 = h1 + 2 h2 + 3 h3 + 4 h4

For every output sample `ecs_corrector` forms two syndromes:

- z1 = (y1 + y2 + y3 + y4) - y5
- z2 = (y1 + 2 y2 + 3 y3 + 4 y4) - y6

If filter i (1 to 4) puts out its correct value plus an error e, then z1 = e and
z2 = i·e. The ratio z2/z1 therefore names the faulty filter, and z1 is the error to
remove: the sample is corrected to yi - z1. A fault in h5 gives z1 ≠ 0 with z2 = 0,
and a fault in h6 gives z1 = 0 with z2 ≠ 0. In both cases the four original outputs
are already right. Two redundant filters suffice for single-fault correction however
many filters are protected; only the weights grow.

**Modulo-256 arithmetic and its one blind spot.** All six filters, and both
syndromes, are 8 bits wide and wrap modulo 256. The check stays exact under
wrap-around, because reduction modulo 256 preserves sums and products. But 2 and 4
are not invertible modulo 256, so an error that is a multiple of 64 can fit more than
one filter. For example, e = 128 in filter 1 and in filter 3 both give z2 = 128. The
locator therefore lists every single-filter explanation of (z1, z2):

| explanation | condition |
|---|---|
| filter i, i = 1..4 | z1 ≠ 0 and z2 = i·z1 (mod 256) |
| filter 5 | z1 ≠ 0 and z2 = 0 |
| filter 6 | z1 = 0 and z2 ≠ 0 |

It acts only when exactly one explanation fits. Otherwise it reports `ECS_UNCORR` and
passes the samples through unchanged. A single fault is thus either corrected or
flagged, never miscorrected. Two simultaneous faults in one sample are outside what
the code promises. The design flags them when it can, but it cannot flag them all.
For example, errors +1 in h1 and -1 in h2 look exactly like a fault in h6. The
locator then leaves the outputs alone, so the wrong samples pass through
uncorrected.

The result of each sample is visible on `ecs_err`, `ecs_loc`, `ecs_filt_err`,
`ecs_z1` and `ecs_z2`. Per block, `blk_ecs_flags[k]` records whether sample k had a
non-zero syndrome.

## The decimal matrix code

A 32-bit word D is viewed as eight 4-bit symbols in 2 rows x 4 columns. Symbol
s = 4r + c is `D[4s+3:4s]`, so row 0 is D[15:0] and row 1 is D[31:16].

```
row 0:  sym3 D15-12 | sym2 D11-8  | sym1 D7-4   | sym0 D3-0    H9..H5 = sym1+sym3, H4..H0   = sym0+sym2
row 1:  sym7 D31-28 | sym6 D27-24 | sym5 D23-20 | sym4 D19-16  H19..H15= sym5+sym7, H14..H10 = sym4+sym6
        V15..V12      V11..V8       V7..V4        V3..V0       V[j] = D[j] xor D[j+16]
```

- **Horizontal check bits (20).** In each row, symbols c and c+2 are added as
  integers, giving four 5-bit sums.
- **Vertical check bits (16).** XOR of the two rows.

Each word therefore carries 36 check bits.

**Decoding** (`dmc_decoder`) recomputes H' and V' from the data read back. It then
forms:

- the horizontal syndrome ΔH = H' - H, a 5-bit subtraction per adder group;
- the vertical syndrome S = V' xor V.

A symbol is declared wrong when both its adder group's ΔH and its column's 4 bits of
S are non-zero. It is repaired by XORing it with that column's S. An upset confined
to check bits makes only one side non-zero, so it is reported on `err` but leaves the
data alone.

What this corrects for sure, as exercised by the testbenches:

- any pattern of flipped cells inside one symbol (up to 4 bits);
- two symbols whose columns differ in parity (columns 0/1, 0/3, 1/2, 2/3), which
  covers any burst across two horizontally neighbouring symbols (up to 8 bits);
- any upset in check bits only.

Measured over bursts of L adjacent flipped data bits at every position of random
words (`tb_dmc_burst_rate`):

| L | 1-5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 | 16 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| words corrected | 100 % | 92 % | 84 % | 76 % | 65 % | 59 % | 52 % | 44 % | 36 % | 28 % | 20 % | 10 % |

Patterns outside the guaranteed ones can be missed or miscorrected. Examples are two errors in the
same column of both rows with equal bits, or errors in symbols c and c+2 of one row
whose values cancel in the sum. This is inherent to the code.

## Encoder reuse in the memory

`dmc_memory` has a single `dmc_encoder`, whose input is selected by En = `we`:

- **Write (En = 1).** The encoder encodes `wdata`. Data go to the information array
  and {H, V} to the redundancy array.
- **Read (En = 0).** The encoder sees the stored data. Its outputs are the H' and V'
  the decoder needs, so the decoder has only subtracters, XORs, the locator and the
  corrector.

The price is one operation per cycle. An assertion checks that `we` and `re` are
never high together. The two arrays are `sram_1p` instances: DEPTH words,
synchronous write and asynchronous read. They also have an upset port that XORs a
mask into a stored word to model single- or multiple-cell upsets. Corrected data are
returned, not written back.

## Top level: `ft_filter_bank_top`

| group | ports | timing |
|---|---|---|
| input | `x_valid`, `x[7:0]` | one sample per cycle at most, idle cycles allowed |
| filter faults | `flt_fault[6][8]` | XOR masks on the outputs of h1..h6 during the cycle that `y_valid` is high |
| ECS result | `y_valid`, `y_corr[4][8]`, `ecs_err`, `ecs_loc`, `ecs_filt_err`, `ecs_z1`, `ecs_z2` | one cycle after `x_valid` |
| block write | `blk_valid`, `blk_ecs_flags[8]`, `wr_addr` | one cycle after the ECS result of the 8th sample; the memories write on that cycle's edge |
| read | `rd_ready`, `rd_en`, `rd_addr` → `rd_valid`, `rd_samp[4][8][8]`, `mem_err[8]`, `mem_sym_err[8][8]` | data one cycle after an accepted `rd_en`; `rd_ready` is low during a block write, and a read requested then is dropped |
| memory upsets | `upset_en[8]`, `upset_addr`, `upset_info_mask[8][32]`, `upset_red_mask[8][36]` | applied on the clock edge |

Mapping between samples and memories:

- Memory `2f + w` holds word w of filter f, i.e. y11, y12, y21, …, y42.
- Sample k of a filter is byte k mod 4 of word k / 4. The first sample is in the low
  byte.
- `rd_samp[f][k]` undoes this mapping.

`mem_err[m]` is high when memory m saw a non-zero syndrome on the last read.
`mem_sym_err[m]` lists the symbols it repaired.

The parameter `DEPTH` (default 1) is the number of blocks each memory holds. With 1,
every new block overwrites the previous one, as in the case study. Larger values make
`wr_addr` advance through the memory.

## Departures and own choices

The protection scheme follows its published description:

- the redundant filters with weights 1..4;
- single-fault correction per sample;
- the DMC layout, its 20 + 16 check bits, its decoder and the encoder reuse;
- the split of each filter's 64 bits into two 32-bit memories.

The following are this implementation's own choices:

- **Filters.** The original description gives neither the tap count nor the impulse
  responses. Here every filter is a 4-tap direct-form FIR computed modulo 256, with
  example responses (c0 first):

  | filter | c0..c3 |
  |---|---|
  | h1 | 3, 1, 2, 1 |
  | h2 | 1, 4, 1, 2 |
  | h3 | 2, 2, 3, 1 |
  | h4 | 1, 3, 1, 4 |

  They are set in `ft_pkg` (`H1`..`H4`). `H5` and `H6` are derived from them, so
  changing `H1`..`H4` keeps the bank consistent.
- **ECS ambiguity.** The modulo-256 ambiguity rule described above.
- **Interfaces.** Valid strobes, latencies, the read/write arbitration, the
  fault-injection ports and synchronous active-low reset.
- **Check-bit count.** The source quotes both 36 and 72 redundant bits for this code
  shape. The 36 that the bit numbering implies (H0..H19, V0..V15) are used.
- **Memory arrays.** These are RTL arrays, not SRAM macros, and the memory depth is a
  parameter.

Only the per-sample ECS flag of a block is kept (`blk_ecs_flags`); which filter
was repaired is visible per sample on `ecs_loc` and is not stored with the block.

Not modelled: the area, power and delay comparisons, which need a cell library.

## Files

| file | contents |
|---|---|
| `rtl/ft_pkg.sv` | sizes, the ECS result enum, impulse responses h1..h6 |
| `rtl/fir_filter.sv` | one FIR filter |
| `rtl/ecs_corrector.sv` | ECS syndromes, locator and corrector (combinational) |
| `rtl/dmc_encoder.sv` | DMC encoder (combinational) |
| `rtl/dmc_decoder.sv` | DMC syndrome, locator, corrector (combinational) |
| `rtl/sram_1p.sv` | storage array with upset port |
| `rtl/dmc_memory.sv` | DMC protected memory with encoder reuse |
| `rtl/sample_packer.sv` | collects 8 samples per filter into 32-bit words |
| `rtl/ft_filter_bank_top.sv` | the whole bank |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_dmc_burst_rate.sv` | correction rate of the code for bursts of 1 to 16 flipped bits |
| `tb/tb_ft_filter_bank_top_depth.sv` | the bank with 4 blocks per memory: address advance, wrap-around, upsets at one address |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. A
watchdog ends a hung simulation with a failure. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ft_pkg.sv \
          tb/tb_ft_filter_bank_top.sv --top-module tb_ft_filter_bank_top
./obj_dir/Vtb_ft_filter_bank_top
```

Replace the testbench name to run another one. All testbenches read `rtl/ft_pkg.sv`
first.

What the testbenches cover:

- **`tb_ft_filter_bank_top`.** Runs the top at its default parameters for 24 blocks.
  It compares against its own convolution of the input and injects:
  - single faults in each of h1..h6;
  - a double fault;
  - a 4-bit upset in y11 and an 8-bit burst in y42 (the memories 1 and 8 of the case
    study);
  - check-bit upsets;
  - a read that collides with a block write.

  It counts each of these events and fails if one never occurred.
- **Unit testbenches.** They check each block against values computed in the
  testbench: explicit DMC equations, a shadow memory, a reference FIR.
