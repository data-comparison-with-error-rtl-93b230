# Tag matching against ECC-protected codewords without decoding

A cache that protects its tag array with an error-correcting code has to
answer, on every access, "does the stored tag equal the incoming tag?" The
obvious way is to decode the stored codeword (correcting a possible error) and
then compare tags, but the decoder then sits in the hit path. This design
avoids it: it **encodes the incoming tag** and measures the **Hamming distance**
between the two codewords. Because the code has a minimum distance of 4, the
distance alone says whether the stored word is the incoming tag, the incoming
tag with one flipped bit, a corrupted word that cannot be trusted, or a
different tag.

The distance is not counted with a binary adder. The differing bits are fed to
small trees of half adders, *butterfly weighted accumulators* (BWAs), whose
outputs are left as loose bits of weight 1, 2 and 4. Only as much of the count
is resolved as the decision needs.

The configuration built here is an (8,4) code: a 4-bit tag plus 4 parity bits.
The top level also contains the LFSR-based generator of pseudo-random
codeword/tag pairs used to exercise the comparator.

## Block diagram

```
 retrieved codeword {tag[3:0], parity[3:0]}          incoming tag[3:0]
        |                     |                          |
        |                     |                    ham84_encoder
        |                     |                          | parity'
   xor_bank (tag field)   xor_bank (parity field) <------+
   stored tag ^ tag       stored parity ^ parity'
        |                     |
     bwa4 (tags)           bwa4 (parities)
   w1  w2 w2  w4          w1  w2 w2  w4
    |   |  |   |           |   |  |   |
    +---|--|---|-----------+   |  |   |      "interconnection":
        +--+---|---------------+--+   |       group bits by weight
               +----------------------+
    weight 1 (2 bits)  weight 2 (4 bits)  weight 4 (2 bits)
        bwa_ones          bwa_twos          or_gate_tree
         u, v             t, r, s               q
           \________________|__________________/
                      decision_unit
                 match / fault / mismatch
```

## The code

The stored word is systematic: the tag bits are kept as they are, followed by
four parity bits. The parity bits are those of the (7,4) Hamming code plus an
overall parity bit, which gives every codeword even weight and makes the
minimum distance 4 (single error correction, double error detection):

```
p0 = t0^t1^t3    p1 = t0^t2^t3    p2 = t1^t2^t3    p3 = t0^t1^t2
codeword = {t3 t2 t1 t0, p3 p2 p1 p0}
```

These exact equations are a choice of this design; any (8,4) code of minimum
distance 4 works with the rest of the comparator unchanged, since nothing
downstream of the encoder depends on which bits the parities cover.

With the incoming tag encoded to X and the stored word Y, the distance
`d = popcount(X ^ Y)` classifies the access (T_MAX = 1 correctable error,
R_MAX = 2 detectable errors):

| d     | meaning                                                   | output     |
|-------|-----------------------------------------------------------|------------|
| 0     | exact hit                                                 | `match`    |
| 1     | hit; the stored word has one bit error that ECC corrects  | `match`    |
| 2     | stored word has an uncorrectable error                    | `fault`    |
| >= 3  | a different tag (or damage beyond detection)              | `mismatch` |

The comparison assumes that the incoming tag itself is error free; only the
stored word can be damaged.

## Counting the distance with weighted bits

This is the part that needs the most care.

**Two fields in parallel.** The tag field and the parity field are compared by
separate XOR banks and counted by separate 4-input BWAs. So the tag bits do not
wait for the encoder: only the parity half goes through it.

**A 4-input BWA** (`bwa4`) is two layers of two half adders. Each half adder
maps two bits of weight w to a sum of weight w and a carry of weight 2w. In the
butterfly, sums are paired with sums and carries with carries:

```
layer 1:  (x0,x1) -> s0 (1), c0 (2)        (x2,x3) -> s1 (1), c1 (2)
layer 2:  (s0,s1) -> w1 (1), w2[0] (2)     (c0,c1) -> w2[1] (2), w4 (4)
popcount(x) = w1 + 2*(w2[0] + w2[1]) + 4*w4
```

The outputs are not a binary number: there are two bits of weight 2. They stay
apart so that the next stage can merge equal weights from both BWAs.

**Merging by weight.** From the two BWAs come two weight-1 bits, four weight-2
bits and two weight-4 bits:

* `bwa_ones` adds the two weight-1 bits with one half adder: `v` (weight 1)
  and `u` (weight 2). They are never both 1.
* `bwa_twos` adds the four weight-2 bits with a 4-input butterfly. Its
  weight-2 result is `t`. It has three weight-4 carries. Their exact number
  does not matter, because any of them already means d >= 4. So the half adder
  that would add the two layer-1 carries is replaced by an OR gate (`r`), and
  the layer-2 carry is `s`.
* `or_gate_tree` ORs the two weight-4 bits of the tag and parity BWAs into `q`.

The result is the identity

```
d = 4*(number of weight-4 bits set) + 2*t + 2*u + v
```

so when q, r and s are all 0, `d = 2t + 2u + v` exactly.

**Decision.** `decision_unit` implements this table (X = don't care):

| q\|r\|s | t | u | v | d     | decision |
|---------|---|---|---|-------|----------|
| 0       | 0 | 0 | X | 0 / 1 | match    |
| 0       | 0 | 1 | X | 2     | fault    |
| 0       | 1 | 0 | 0 | 2     | fault    |
| 0       | 1 | 0 | 1 | 3     | mismatch |
| 0       | 1 | 1 | X | 4     | mismatch |
| 1       | X | X | X | >= 4  | mismatch |

Note that d = 4 can show up as t = u = 1 with no weight-4 bit set. The table
handles it, but a reader who expects "d >= 4 sets q, r or s" should not.

Worked example: stored word `8'b1010_0000`, incoming tag `4'b1010`, which
encodes to `8'b1010_1010`. The tag field differs nowhere. The parity field
differs in `1010` (bits 1 and 3). The parity BWA gives s0 = s1 = 1, so w1 = 0
and w2[0] = 1. `bwa_twos` sees one weight-2 bit: t = 1. `bwa_ones` sees none:
u = v = 0. The result is d = 2, so the decision is **fault**.

The exact split of the BWA outputs into q, r, s, t, u and v is a choice of this
design. It was chosen so that the six-row table above is exact.

## The pseudo-random code generator

`random_code_gen` holds two Fibonacci LFSRs with XOR feedback, one for an 8-bit
codeword and one for a 4-bit tag (`lfsr`; polynomials x^8+x^6+x^5+x^4+1 and
x^4+x^3+1). Both are maximal-length: 255 and 15 states, never zero. Since 15
divides 255, the pair sequence repeats after 255 steps. The generator produces
raw random bytes, not valid codewords, so most generated pairs are mismatches.
In one period the top-level test sees only a few exact matches, corrected
matches and faults.

## Top level: `ecc_tag_compare_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low synchronous reset |
| `ext_mode` | in | 1 | 0: compare generator pairs; 1: compare external inputs |
| `gen_enable` | in | 1 | generator mode: compare the current pair and step the LFSRs |
| `ext_valid`, `ext_codeword`, `ext_tag` | in | 1, 8, 4 | external request (`ext_codeword` is `{tag, parity}`) |
| `gen_codeword`, `gen_tag` | out | 8, 4 | current generator pair |
| `result_valid` | out | 1 | result valid |
| `decision` | out | 2 | `ecc_cmp_pkg::decision_t`: 0 match, 1 fault, 2 mismatch |
| `flags` | out | 6 | `{q,r,s,t,u,v}` of that comparison |
| `match`, `fault`, `mismatch` | out | 1 | one-hot, qualified by `result_valid` |

**Timing.** The comparator is combinational from its inputs to one output
register. A request presented in cycle n produces its result in cycle n+1, and
a new request can be issued every cycle. In generator mode, the pair on
`gen_codeword`/`gen_tag` in the cycle where `gen_enable` is high is the one
compared, and the LFSRs step on that edge. In external mode the generator
holds its state, and it resumes from there when `ext_mode` returns to 0.
`flags` distinguishes an exact match (t = u = v = 0) from a corrected one.

The comparator `systematic_compare` can be used on its own. It has the same
request/result signals (`in_valid`, `codeword_in`, `tag_in` → `out_valid`,
`decision`, `flags`, `match`, `fault`, `mismatch`).

## What comes from the source architecture, and what does not

These parts follow the published architecture:

* the encode-and-compare principle
* the split into encoder, two XOR banks, BWAs for tags and for parities, an
  interconnection, an OR-gate tree, BWAs for 2's and 1's, and a decision unit
* half-adder butterflies, with OR gates standing in for some half adders
* the (8,4) size and the decision table
* the 8-bit/4-bit LFSR generator with XOR feedback
* the names q…v

These are this design's own choices:

* the parity equations and the codeword bit order
* which BWA outputs become q…v
* the single register stage, the valid handshake and the synchronous reset
* the LFSR polynomials and seeds
* the external-input mode of the top level

The published architecture was synthesised for a Spartan-3E FPGA at about
264 MHz in 31 slices. Those figures come from the vendor flow and have not been
reproduced. A generic synthesis of the top gives about 70 word-level cells and
21 flip-flops.

The following are not built:

* **Baseline comparators.** The decode-then-compare architecture and the
  saturating-adder Hamming distance computer that this design replaces are
  only comparison points.
* **Extra signals of the original simulation.** That simulation showed a
  counter and extra flag signals on the generator and on the comparator. Their
  function is not specified, so they are not reproduced.
* **Other code sizes.** The comparator is fixed at (8,4). `xor_bank`,
  `or_gate_tree` and `lfsr` are parameterised, but `bwa4`, `bwa_twos`,
  `bwa_ones` and the decision table are written for 4+4 bits. `decision_unit`
  stops elaboration if the package thresholds are changed.

## Files

`rtl/`:

* `ecc_cmp_pkg` – sizes, thresholds, `decision_t`, `weight_flags_t`, `codeword_t`
* `ecc_tag_compare_top` – generator + comparator + mode mux
* `systematic_compare` – the comparator
* `ham84_encoder`, `xor_bank`, `bwa4`, `bwa_twos`, `bwa_ones`, `or_gate_tree`,
  `decision_unit`, `half_adder` – its parts
* `random_code_gen`, `lfsr` – the stimulus generator

`tb/`: one self-checking testbench `tb_<module>` per module, plus
`tb_ecc_ref_pkg`. That package is a reference model: the code as generator
rows, and the decision from `$countones` of the codeword difference.
`tb_systematic_compare` tries all 256 × 16 codeword/tag combinations and
checks the one-cycle latency. `tb_ecc_tag_compare_top` runs the whole design
at its defaults: two generator periods, 400 external requests with 0–4
injected bit errors, and mode switches in both directions. It counts each kind
of outcome (exact, corrected, fault, mismatch at d = 3 and at d >= 4) and
fails if one never occurred. Every testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ecc_cmp_pkg.sv tb/tb_ecc_ref_pkg.sv tb/tb_ecc_tag_compare_top.sv \
    --top-module tb_ecc_tag_compare_top
./obj_dir/Vtb_ecc_tag_compare_top
```

Replace the testbench name to run any other one. Each finishes in well under a
second. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/ecc_cmp_pkg.sv rtl/<module>.sv`. The
only warnings are package constants that a given module does not use.
