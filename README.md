# Matching ECC-protected tags without decoding them

A cache or TLB that protects its tag array with an error-correcting code has
to compare an incoming tag with a stored code word that may hold bit errors.
The obvious approach is to decode the stored word (compute the syndrome,
correct the error) and then compare. That puts a full decoder in front of the
comparator, on the critical path of every lookup.

This design avoids decoding. It encodes the incoming tag instead and measures
the Hamming distance `d` between that code word and the stored one. For a code
that corrects `tmax` errors and detects `rmax` errors, the distance alone
answers the question:

| distance             | verdict                                               |
|----------------------|-------------------------------------------------------|
| `d == 0`             | match                                                 |
| `0 < d <= tmax`      | match; the stored word holds a correctable error      |
| `tmax < d <= rmax`   | fault: the stored word holds an uncorrectable error   |
| `d > rmax`           | mismatch: a different tag                             |

The default is a (40,33) single-error-correcting, double-error-detecting
(SEC-DED) code: 33 tag bits and 7 parity bits, `tmax = 1`, `rmax = 2`.

The two ideas that keep it fast and small are below.

## Idea 1: the data part needs no encoding

The code is systematic: a code word is the raw tag followed by its parity bits.
The data part of the stored word can therefore be compared with the incoming
tag immediately. Only the 7 parity bits have to wait for the encoder. The
matcher runs the encoder and the data comparison side by side, so the encoder
delay overlaps with the data-side distance count, instead of being followed by
a full 40-bit comparison.

## Idea 2: counting ones with a butterfly of half adders

The distance is the number of 1's in the difference vector
(`encode(tag) ^ stored`). The design counts them with butterfly-formed weight
accumulators (BWAs) built only of half adders.

### General BWA (`bwa`)

The input is padded to `P = 2^L` bits and passes through `L` stages of `P/2`
half adders. Stage `s` pairs position `i` with position `i + 2^s` (for every `i`
whose bit `s` is 0). The sum stays at `i` and the carry moves to `i + 2^s`.
Both bits of every pair always carry the same weight, so the sum bits and the
carry bits of one stage are accumulated separately in the next. After the last
stage, output bit `p` has weight `2^popcount(p)`, and

    number of input 1's = sum over p of w_o[p] * 2^popcount(p)

For 8 inputs the outputs have weights 1, 2, 2, 4, 2, 4, 4, 8 (positions 0..7).
When an output bit is 1, the number of 1's among the inputs that reach it is
exactly its weight. For example, bit 7 (weight 8) is set only when all 8
inputs are 1.

### Modified BWA (`bwa_mod`)

The matcher only needs to tell the distances 0, 1, 2 and "3 or more" apart.
Exact counting beyond weight 2 is wasted, so the modified BWA keeps only the
half adders whose inputs have weight 1 or 2. Each weight-4 carry produced by a
weight-2 adder goes to an OR-gate tree, and the adders that would have added
such carries are left out. Outputs:

* `w1_o`: the weight-1 bit.
* `w2_o[L-1:0]`: the weight-2 bits.
* `or_o`: set when some weight-4 carry was produced.

If `or_o` is 0, the count is exactly `w1_o + 2*popcount(w2_o)`. If `or_o` is 1,
the count is at least 4. The count can also reach 4 or more through several
weight-2 bits with `or_o` still 0. The next level handles that case.

## The matcher (`ecc_tag_matcher`)

```
 tag_in ──┬──────────────────────► xor_stage (K) ──► diff_d ─┐
          │  cw_stored[K-1:0] ───►                           │  slices of BWA_IN bits
          └► ecc_encoder ─► xor_stage (R) ──► diff_p ────────┤
             cw_stored[K+R-1:K] ►                            ▼
                                   first level: one bwa_mod per slice
                                   (5 data slices + 1 parity slice for (40,33))
                                     │ or_o          │ w1_o          │ w2_o
                                     ▼               ▼               ▼
                                   or_tree         bwa (6 in)      bwa (18 in)
                                     └──────────┬────┴───────────────┘
                                                ▼
                                          decision_unit ──► match / fault / mismatch
```

* **First level.** The data difference bits and the parity difference bits are
  cut into slices of `BWA_IN` (8) bits. Data and parity slices are kept apart,
  and the last slice of each is zero-padded. Each slice goes to a `bwa_mod`.
* **Second level.** The OR flags of all slices feed one `or_tree`. All weight-1
  bits feed one general `bwa`, and all weight-2 bits feed another: bits of
  weight `w` go to the accumulator for weight `w`.
* **Decision unit.** The distance is 4 or more if any of these is set:
  * the second-level OR flag;
  * any weight-4-or-higher output of the weight-1 accumulator;
  * any output of the weight-2 accumulator other than its bit 0.

  Otherwise the distance is

      d = s1[0] + 2 * (weight-2 outputs of s1 that are set) + 2 * s2[0]

  The unit saturates `d` at 4 and compares it with `TMAX` and `RMAX`.

The whole matcher is combinational: no clock, no reset, no registers. Put
registers around it as the surrounding pipeline requires. The verdicts are
one-hot: an immediate assertion checks that exactly one of `match`, `fault`
and `mismatch` is set.

### Ports of `ecc_tag_matcher`

| port        | dir | width | meaning                                                    |
|-------------|-----|-------|------------------------------------------------------------|
| `tag_in`    | in  | K     | incoming tag                                               |
| `cw_stored` | in  | K+R   | stored code word: tag bits in `[K-1:0]`, parity in `[K+R-1:K]` |
| `match`     | out | 1     | `d <= TMAX`                                                |
| `corrected` | out | 1     | `0 < d <= TMAX`: matched, with an error in the stored word |
| `fault`     | out | 1     | `TMAX < d <= RMAX`                                         |
| `mismatch`  | out | 1     | `d > RMAX`                                                 |
| `dist_sat`  | out | 3     | `min(d, 4)`                                                |
| `range_o`   | out | enum  | `ecc_pkg::dist_range_e`: EXACT, CORRECT, FAULT, MISMATCH   |

### Parameters

| parameter | default | meaning                                                       |
|-----------|---------|---------------------------------------------------------------|
| `K`       | 33      | tag (data) bits                                               |
| `R`       | 7       | parity bits                                                   |
| `BWA_IN`  | 8       | inputs per first-level modified BWA                           |
| `TMAX`    | 1       | errors the code corrects                                      |
| `RMAX`    | 2       | errors the code detects; must be below 4 (the modified BWAs merge all counts of 4 and up) |

## The code

The matcher works with any systematic code whose minimum distance is
`TMAX + RMAX + 1`. This implementation uses a Hsiao SEC-DED code, generated
in `ecc_pkg::hsiao_columns`:

* Column `j` of the parity part of the parity-check matrix is the `j`-th
  `R`-bit vector of odd weight 3 or more.
* The vectors are ordered by weight, and by value within one weight.
* Parity bit `i` is the XOR of every tag bit whose column has bit `i` set.

All columns are distinct and have odd weight, so the minimum distance is 4.
With 7 parity bits there are 57 such columns, enough for the 33 tag bits.

If your tags are stored with a different code, replace `ecc_encoder` (or the
column function). The rest of the matcher only sees the difference vector.

## What follows the source description and what is this design's choice

These parts follow the published architecture:

* the encode-and-compare principle;
* the data comparison running in parallel with the encoder;
* the two XOR stages;
* BWAs built of half adders in a butterfly;
* a first level of modified BWAs that produce weight bits plus an OR-gate tree
  output;
* a second level made of an OR-gate tree and one BWA per weight;
* a combinational decision unit that separates four distance ranges;
* the (40,33) code size.

These are choices of this implementation:

* **The code.** Hsiao, with its column order.
* **The bit order of the stored word.** The tag is in the low bits.
* **The four ranges.** They are exact match, corrected match, fault and
  mismatch, with `tmax = 1` and `rmax = 2`.
* **First-level BWAs of 8 inputs.**
* **The butterfly pairing order.**
* **Where the modified BWA is cut.** Weight-4 carries go to the OR tree.
* **General, unmodified BWAs at the second level.**
* **No pipeline registers.**

The SA-based matcher is not included: it uses saturating adders after a
complete encode-then-compare, and only serves as a point of comparison for this
design. A decode-and-compare matcher is not included either. The tag memory
that holds the code words is outside the design. Its read data is the
`cw_stored` port.

The latency and area advantages over those baselines depend on the gate library
and were not measured here.

## Files

`rtl/`:

* `ecc_pkg.sv`: default sizes, the range enum and the code's column generator.
* `ecc_encoder.sv`: the parity of the incoming tag.
* `xor_stage.sv`: the bitwise difference.
* `half_adder.sv`, `or_tree.sv`: the cells.
* `bwa.sv`, `bwa_mod.sv`: the general and the modified accumulator.
* `decision_unit.sv`: distance to verdict.
* `ecc_tag_matcher.sv`: the top.

`tb/` has one self-checking testbench per module:

* `tb_<module>.sv`: the testbench itself.
* `ecc_ref_pkg.sv`: a reference encoder. It builds the same code a different
  way, by enumerating bit positions.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

* `tb_half_adder`, `tb_or_tree`, `tb_bwa` and `tb_bwa_mod` check all input
  values of their small instances, and random values of larger ones.
* `tb_ecc_encoder` checks the encoder against the reference code. It also
  checks that the code is SEC-DED: distinct odd-weight columns, and a distance
  of at least 4 between code words.
* `tb_ecc_tag_matcher` runs the full (40,33) matcher at its default parameters.
  It tries over 20,000 tag and stored-word pairs with 0 to 3 injected errors.
  It checks every verdict against the popcount of the reference difference
  vector. It also requires that each of these cases occurred:
  * exact match;
  * a corrected error in the data part, and in the parity part;
  * a fault on a matching tag;
  * a mismatch;
  * a slice with 4 or more differences;
  * a case carried only by weight-2 bits.
* `tb_ecc_tag_matcher_sizes` runs three other sizes through
  `matcher_harness.sv`: the (40,33) code with 4-bit and with 16-bit
  first-level slices, and a (32,26) Hsiao code with 8-bit slices. Each must
  reach every distance from 0 to 4.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_ecc_tag_matcher \
    rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecc_tag_matcher.sv
./obj_dir/Vtb_ecc_tag_matcher
```

Swap the testbench name to run another one; `-y` lets Verilator find the
modules it uses. Lint a module with
`verilator --lint-only -Wall rtl/ecc_pkg.sv rtl/*.sv --top-module <module>`.
The full-size end-to-end test runs in well under a second.
