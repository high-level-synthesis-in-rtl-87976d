# Two's complement to RNS converter

A residue number system (RNS) represents an integer X by its remainders
`(|X|_m1, ..., |X|_mN)` modulo a set of pairwise coprime moduli. Additions
and multiplications then run in small independent channels without carries
between them, but data usually arrive in two's complement and must first be
converted. This design converts a signed W-bit word into its residue vector,
one channel per modulus. It needs no divider: each channel looks up short
segments of the word in small ROMs and adds the looked-up residues with a
tree of compare-and-subtract modular adders.

Default configuration: 16-bit input, 5-bit segments, 5-bit residues and the
base {25, 27, 29, 31}. The product of the base is 606825, so every 16-bit
word has its own residue vector. The result appears two clock cycles after
the word, and a new word can enter on every cycle.

## One channel: segments, ROMs, adder tree

For one modulus m, the channel (`tcs_rns_channel`) works in two stages:

```
 x[W-1] (sign) ─────┬────────────┬────────────┐
 x[14:10] ──► ROM2  │  x[9:5] ──► ROM1   x[4:0] ──► ROM0      (64 x 5 bits each)
               │              │              │
             [reg]          [reg]          [reg]               stage 1
               └──────┬───────┘              │
                    TOMA                     │
                      └──────────┬───────────┘
                               TOMA
                                 │
                               [reg]                           stage 2
                                 ▼
                               |X|_m
```

- **Segmentation.** The sign bit `x[W-1]` is set apart. The W-1 value bits are
  cut into segments of 5 bits, starting at bit 0. When W-1 is not a multiple
  of 5, the most significant segment is shorter. A 16-bit word gives three
  segments. A 20-bit word gives four (5, 5, 5, 4 bits) and a tree of three
  TOMAs.
- **Modulo generators.** Each segment k has its own ROM (`seg_rom`). The ROM
  has a 6-bit address `{sign, segment}` and returns the residue mod m of that
  segment's share of X (next section).
- **Multi-operand modulo adder.** `mo_mod_adder` sums the ROM outputs mod m.
  It is a binary tree of two-operand modular adders (TOMAs). Neighbours
  (0,1), (2,3), ... are paired, and an odd operand left over moves up a level
  unchanged.
- **TOMA.** `toma` computes `s = a + b` one bit wider than the residues, then
  returns `s - m` if `s >= m`, else `s`. Both inputs are below m, so one
  correction is always enough. The residues never leave [0, m-1] inside the
  tree, so every adder is only 5 bits wide plus a carry.

## What the ROMs hold, and why negative words work

Positive words are easy to handle. With `v_k` the value of segment k,
`X = sum_k v_k * 2^(5k)`. ROM k therefore holds `|v * 2^(5k)|_m` in its lower
half (sign = 0).

A negative word cannot be split this way directly. The two's complement
weight of the sign bit belongs to no segment. Negating the word first would
carry a +1 across all the segments. The design uses the identity
`-X = ~X + 1`, taken over the W-1 value bits:

```
X = -( sum_k (~v_k) * 2^(5k)  + 1 )
```

Here `~v_k` is the complement of segment k within its own width. Each
complemented segment depends only on its own bits. The single `+1` is added
to segment 0 alone, so no carry crosses between segments. The upper half of
ROM k (sign = 1) therefore holds

```
| m - | (~v) * 2^(5k) + [k == 0] |_m |_m
```

which is the additive inverse mod m of that term. Added mod m over all
segments, these entries give `|X|_m`, which equals `|M + X|_m`, the usual
RNS code for a negative number. The outer reduction makes an entry 0
rather than m when the inner residue is 0.

Two worked examples, for m = 29 and W = 16:

| X    | value bits (seg2 seg1 seg0)  | ROM2 | ROM1 | ROM0                    | sum mod 29 |
|------|------------------------------|------|------|-------------------------|------------|
| -1   | 11111 11111 11111            | 0    | 0    | 29 - (0 + 1) = 28       | 28         |
| -32  | 11111 11111 00000            | 0    | 0    | -(31 + 1) mod 29 = 26   | 26         |

The ROM contents are not stored in a file. The constant function
`tcs_rns_pkg::rom_entry(m, k, width, sign, v)` computes them during
elaboration, so any modulus up to 2^RES_BITS and any segment position work
without regenerating tables. `pow2_mod` computes `|2^(5k)|_m` by repeated
doubling, so long words do not overflow 32-bit arithmetic. Synthesis maps
each table to a 64 x 5 ROM. The register after it folds into a
registered-output ROM.

## The converter top and its interface

`tcs_rns_converter` instantiates one channel per entry of `MODULI` and a
2-bit valid pipeline.

| port        | dir | width        | meaning                                               |
|-------------|-----|--------------|-------------------------------------------------------|
| `clk`       | in  | 1            | clock                                                 |
| `rst`       | in  | 1            | synchronous, active high; clears only the valid bits  |
| `in_valid`  | in  | 1            | `in_x` carries a word                                 |
| `in_x`      | in  | W            | two's complement word                                 |
| `out_valid` | out | 1            | `out_res` holds the residues of the word of 2 cycles ago |
| `out_res`   | out | N_MOD x RW   | `out_res[i] = |X|_MODULI[i]`, mathematical remainder   |

There is no back-pressure. Data registers are not reset: only `out_valid`
says whether `out_res` means anything. An assertion checks that every
delivered residue is below its modulus.

| parameter | default            | notes                                                         |
|-----------|--------------------|---------------------------------------------------------------|
| `W`       | 16                 | input width including the sign bit (at least 2)               |
| `N_MOD`   | 4                  | number of channels                                            |
| `MODULI`  | `'{25,27,29,31}`   | pairwise coprime, each in [2, 2^RW]                           |
| `RW`      | 5                  | residue width                                                 |

Elaboration stops with an error if a modulus does not fit in RW bits. It
also stops if the product of the moduli is below 2^W, because signed words
would then share residue vectors. Four 5-bit moduli cannot cover a 20-bit
word (the largest product is 32·31·29·27 = 776736). A 20-bit converter
therefore needs five channels, for example `{23, 25, 27, 29, 31}`. The
moduli are not checked for being coprime.

Segment width (`SEG_BITS = 5`, so 6-bit ROM addresses) and the default
residue width are package constants in `rtl/tcs_rns_pkg.sv`. Segments of
another width should keep the ROM address small enough for LUT-based ROMs.

## Where this design comes from and where it departs

The segmentation with a sign bit in every ROM address, the 6-bit ROMs, the
5-bit modular adders with compare-and-subtract reduction and the tree
structure follow a published HLS study of this converter. The following
are this design's own choices:

- **RNS base.** The study works its examples modulo 29 and fixes no base.
  {25, 27, 29, 31} was chosen as four 5-bit pairwise coprime moduli that
  cover the 16-bit signed range.
- **Negative numbers.** The study describes negative words through the
  magnitude of the word and complemented segments, in more than one slightly
  different form. The complement-plus-one-in-segment-0 form above is the
  reading implemented here. The testbenches check it exhaustively.
- **Segment bit positions.** Segments start at bit 0, and only the top
  segment may be shorter. One published figure of the 20-bit structure
  labels its segments differently. Those labels do not cover every bit, so
  they were not followed.
- **Pipelining and handshake.** The two register stages (after the ROMs and
  after the tree), the valid strobe and the reset are assumed. The study
  reports flip-flops alongside its ROMs, which fits registered ROM outputs,
  but gives no latency.
- **Not included.** The study also synthesised two alternatives that it only
  compares against: reduction with a general `%` (divider) operator, and a
  ROM-less form that computes every segment residue with arithmetic. It
  found both larger. Neither is part of this design. Its FPGA resource
  figures come from an HLS tool and a specific device and are not
  reproduced here.

## Verification

Each testbench checks itself against values it computes in 64-bit integer
arithmetic, independently of the RTL package functions. Each has a
watchdog and ends with a `TB_RESULT checks=N failures=M` line.

| testbench                    | what it covers                                                                 |
|------------------------------|--------------------------------------------------------------------------------|
| `toma_tb`                    | all operand pairs for m = 29, 31, 32 (5-bit) and 7 (3-bit)                     |
| `seg_rom_tb`                 | every address of ROMs for segments 0-3, full and short widths, m = 29/31/25    |
| `mo_mod_adder_tb`            | trees of 1, 3, 4, 5 operands, corner and random residues                       |
| `tcs_rns_channel_tb`         | all 16-bit and all 10-bit words mod 29; 20-bit words mod 31; 2-cycle latency   |
| `tcs_rns_converter_tb`       | default top: all 65536 words, idle gaps, a reset flush, CRT reconstruction     |
| `tcs_rns_converter_w20_tb`   | 20-bit top with five moduli, 100000 back-to-back words, CRT reconstruction    |

The default-parameter test counts the events it must exercise and fails if
any did not occur:

- negative and non-negative words;
- words whose segment residues need a TOMA correction;
- sums that wrap to exactly 0;
- idle cycles;
- words dropped by reset.

The testbench checks each residue against the remainder of the signed word.
It also checks that Chinese-remainder reconstruction of the whole vector
gives back the input.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/tcs_rns_pkg.sv \
    tb/tcs_rns_converter_tb.sv --top-module tcs_rns_converter_tb
./obj_dir/Vtcs_rns_converter_tb
```

The other testbenches are run the same way, with their own file and top
name. The package must come first on the command line. `-y rtl` lets
Verilator find the other modules by name. Every run finishes in well under a
second.

## Files

- `rtl/tcs_rns_pkg.sv`: segment and residue widths, ROM content functions
- `rtl/seg_rom.sv`: 64-word segment modulo generator
- `rtl/toma.sv`: two-operand modular adder
- `rtl/mo_mod_adder.sv`: TOMA tree
- `rtl/tcs_rns_channel.sv`: one modulus: segmentation, ROMs, tree, two register stages
- `rtl/tcs_rns_converter.sv`: top, one channel per modulus, valid pipeline
- `tb/*_tb.sv`: the testbenches listed above
