# Extended OLS error correction: double-error correction for memory words, with detection of heavier errors

This RTL protects a memory or register word with an **Orthogonal Latin Square
(OLS) code** that corrects any two bit errors. Decoding is *one-step majority
logic*. Every data bit takes part in four check equations. It is flipped when at
least three of them fail. There is no iteration, no error-locator search and
no state, so the whole decoder is a few levels of XOR gates and a small vote
per bit.

On top of the plain OLS code the design adds three things:

* **Extended code.** The 16 check bits of the m = 4 OLS code protect **20**
  data bits instead of 16. No check bits and no decoding steps are added.
* **Multi-error flag.** Words with more than two bit errors are flagged as
  uncorrectable where possible, instead of being miscorrected without notice
  (silent data corruption).
* **Concurrent error detection (CED).** A parity-prediction check watches the
  encoder and the syndrome logic themselves. It catches a fault on any single
  node of their XOR trees.

The default configuration is m = 4 and t = 2: 20 data bits plus 16 check
bits, a 36-bit stored word. The parameter `M` also builds the larger extended
codes for m = 8, 16 and 32. The parameter `T` builds plain OLS codes that
correct t = 1 error, or 3 or 4 errors.

## The code

Let k = m² and arrange the data bits in an m × m array. Data bit `c` sits at
row `a = c / m` and column `b = c % m`. There are 4m check bits in four groups
of m:

| group | check bit of data bit (a, b) | matrix |
|-------|------------------------------|--------|
| 0 | `a` | M1: row r has ones at data bits r·m … r·m+m−1 |
| 1 | `m + b` | M2 = [I I … I] |
| 2 | `2m + (a ⊕ b)` | Latin square a + b |
| 3 | `3m + (a ⊕ α·b)` | Latin square a + α·b |

Sums and products are taken in GF(m), with α = x and field polynomials
x²+x+1, x³+x+1, x⁴+x+1 and x⁵+x²+1. The four functions are mutually
orthogonal, which gives two properties:

* each data bit is in exactly one check bit of each group;
* two different data bits share at most one check bit.

With t = 2 there are four groups. A code correcting t errors uses 2t groups:
group g ≥ 2 is the Latin square a ⊕ α^(g−2)·b, so each step in t adds 2m check
bits. GF(m) has m − 1 usable multipliers, which limits t to 2t ≤ m + 1. That
means t ≤ 2 for m = 4 and t ≤ 4 for m = 8. The t = 1 code, with groups 0 and 1
only, is the classic single-error-correcting OLS code. The rest of this section
is written for t = 2; for general t, read "four checks" as 2t and the vote
threshold as t + 1.

The second property is what makes the majority vote work. Say a data bit is in
error and one other bit is too. The other error spoils at most one of the
erroneous bit's four checks, so at least 3 of the 4 still fail. Now say a data
bit is correct and two other bits are in error. Each error reaches at most one
of its checks, so at most 2 of the 4 fail. A threshold of 3 therefore corrects
every single and double error.

### Extension: more data bits for the same check bits

Inside one group, every original column has a single one. So a new data column
made of four check bits *from one group* shares at most one bit with every
original column. Two new columns only need to share at most one bit with each
other. The extension columns used here, per group of m check bits:

| m | original k | new columns per group | extended k | check bits |
|---|-----------|-----------------------|------------|------------|
| 4 | 16 | 1 (all four bits of the group) | **20** | 16 |
| 8 | 64 | 2 (bits 0–3 and 4–7 of the group) | 72 | 32 |
| 16 | 256 | 20 (the columns of the m = 4 extended code) | 336 | 64 |
| 32 | 1024 | 72 (the columns of the m = 8 extended code) | 1312 | 128 |

The extension exists for t = 2 only (`EXT = 1` requires `T = 2`). The m = 16
and m = 32 rows use nesting: a group of m = 4l check bits is exactly
the check-bit set of the extended code with parameter l. The columns of that
code can therefore be used inside the group. Counting pairs gives an upper
bound on the new columns per group: C(m,2) / C(4,2) = (m² − m)/12. This bound
is 1, 4.7, 20 and 82.7 for the four sizes, so m = 4 and m = 16 meet it exactly.

Extension columns are numbered after the m² original ones, group by group.
For the default m = 4 the full matrix is shown below (`1` = data bit feeds
check bit). Data bits 16–19 are the extension.

```
check | data bit 0..19
c0   | 1 1 1 1 . . . . . . . . . . . . 1 . . .
c1   | . . . . 1 1 1 1 . . . . . . . . 1 . . .
c2   | . . . . . . . . 1 1 1 1 . . . . 1 . . .
c3   | . . . . . . . . . . . . 1 1 1 1 1 . . .
c4   | 1 . . . 1 . . . 1 . . . 1 . . . . 1 . .
c5   | . 1 . . . 1 . . . 1 . . . 1 . . . 1 . .
c6   | . . 1 . . . 1 . . . 1 . . . 1 . . 1 . .
c7   | . . . 1 . . . 1 . . . 1 . . . 1 . 1 . .
c8   | 1 . . . . 1 . . . . 1 . . . . 1 . . 1 .
c9   | . 1 . . 1 . . . . . . 1 . . 1 . . . 1 .
c10  | . . 1 . . . . 1 1 . . . . 1 . . . . 1 .
c11  | . . . 1 . . 1 . . 1 . . 1 . . . . . 1 .
c12  | 1 . . . . . . 1 . 1 . . . . 1 . . . . 1
c13  | . . . 1 1 . . . . . 1 . . 1 . . . . . 1
c14  | . 1 . . . . 1 . 1 . . . . . . 1 . . . 1
c15  | . . 1 . . 1 . . . . . 1 1 . . . . . . 1
```

The code is systematic. The stored word is the data bits unchanged plus the
check bits. How the two are placed in memory is up to the user.

## Decoding

1. **Syndrome** (`ols_syndrome`). The check bits are recomputed from the data
   read back and XORed with the stored check bits.
2. **Vote** (`ols_mld_corrector`). For every data bit, count its four syndrome
   bits and flip the bit if the count is 3 or more. Only data bits are
   corrected. A check-bit error shows up as a single syndrome bit and never
   reaches a vote of 3 on its own.
3. **Multi-error flag** (`ols_multi_err_detect`). This step is explained below.
4. **Syndrome CED** (`ols_ced_checker`). This step is explained below.

Steps 2–4 all work from the syndrome and run side by side.

### Beyond two errors

With three or more errors the vote can flip a correct bit or miss an erroneous
one. The multi-error flag tests whether the vote's decision is a *consistent*
explanation with at most two errors:

* remove the columns of the flipped data bits from the syndrome;
* whatever remains can only be check-bit errors, one per syndrome bit;
* if flipped bits plus remaining syndrome bits exceed two, raise `uncorrectable`.

For up to two errors this count equals the true number of errors, so the flag
never fires on a correctable word. Random 3- to 6-bit errors in the 36-bit word
were flagged about 94 % of the time in simulation. By weight: about 89 % at 3
errors and about 96 % at 4 and 5 errors. Roughly 6 % still decode to wrong
data without the flag.

One such case is three check-bit errors that hit three of the four checks of
a single data bit. The vote flips that bit, and the one leftover syndrome bit
looks like a check-bit error. The flag reduces silent corruption but does not
remove it.

The same test works for any t (flag when the implied weight exceeds t). With
the t = 1 code at m = 4, about 87 % of double errors were flagged. With t = 3
and t = 4 at m = 8, every sampled error of weight t + 1 was flagged.

### Checking the checker: parity prediction

Every original data bit is in exactly one check bit of each group. So the XOR
of the m check bits in any group equals the parity of the m² original data
bits. An extension bit is in four check bits of one group, so it cancels out of
that parity. `ols_ced_checker` compares each group's parity with the parity
predicted from the data:

* **encoder** (in `ols_ecc_top`): `vec_i` = computed check bits, `ref_i` = 0,
  giving `wr_ced_err_o`;
* **syndrome** (in `ols_decoder`): `vec_i` = syndrome, `ref_i` = received
  check bits, giving `status.ced_err`. The group parity of the syndrome
  equals the data parity XOR the group parity of the received check bits.
  This holds whatever errors the stored word carries, so this check sees only
  faults in the logic, not errors in the data.

A fault at one node of either XOR tree changes one check or syndrome bit, and
hence the parity of one group. Two wrong bits in the *same* group cancel and
are not seen. Faults in the vote and in the correction are not covered.

## Modules

| module | role |
|--------|------|
| `ols_pkg` | `dec_status_t`, `config_ok`, and elaboration-time functions that build the matrix: `chk_idx`, `h_col`, `h_row`, `data_bits`, `check_bits` |
| `ols_encoder` | one XOR tree per check bit |
| `ols_syndrome` | encoder on the read data, XOR with the read check bits |
| `ols_mld_corrector` | 2t-input count (4 for t = 2) and threshold per data bit |
| `ols_multi_err_detect` | residual syndrome and error-weight test |
| `ols_ced_checker` | group-parity prediction |
| `ols_decoder` | syndrome + corrector + multi-error flag + syndrome CED |
| `ols_ecc_top` | encoder + encoder CED on the write side, decoder on the read side |

All modules take `M` (4, 8, 16 or 32; default 4) and `T` (1 to 4 with
2T ≤ M + 1; default 2). Most also take `EXT` (default 1; 0 gives the plain OLS
code with k = m²). The widths follow: `K = data_bits(M, T, EXT)` and
`R = check_bits(M, T) = 2*T*M`.

`ols_ecc_top` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `wr_data_i` | in | K | word to be stored |
| `wr_check_o` | out | R | its check bits; store `{wr_check_o, wr_data_i}` |
| `wr_ced_err_o` | out | 1 | encoder fault detected |
| `rd_data_i`, `rd_check_i` | in | K, R | the stored word as read back |
| `rd_data_o` | out | K | corrected data |
| `rd_status_o` | out | `dec_status_t` | `err_detected` (syndrome ≠ 0), `corrected` (a bit was flipped), `uncorrectable` (more than t errors implied), `ced_err` (syndrome logic fault) |

**Timing.** Everything is combinational: no clock, no reset and no latency.
The storage, and any registers around the encoder and decoder, belong to the
surrounding design. The encoder CED runs in parallel with the write. The
syndrome CED and the multi-error flag run in parallel with the vote. Their
results are ready when the corrected data is.

At m = 4 the top synthesises (yosys, coarse) to about 240 word-level cells.
The matrix is built by constant functions during elaboration. At m = 32 this
takes noticeable time: about 25 s in verilator's elaboration, and a C++ build
of two to over ten minutes for a testbench holding that size, depending on
build options.

## Design choices not fixed by the code description

* **Latin squares.** M1 and M2 follow the definition of OLS codes. M3, M4
  and beyond use a ⊕ α^i·b over GF(m). Any pair of orthogonal Latin squares would
  do, so check-bit numbering in groups 2 and above may differ from other OLS
  implementations.
* **Extension for m = 8.** Two disjoint quadruples per group are used. Any two
  quadruples sharing at most one bit would also be valid.
* **Extension for m = 32.** The 72-column extended m = 8 code is used in each
  group, giving k = 1312. Using the plain 64-column code would give k = 1280.
* **Multi-error flag.** The goal, flagging errors of more than two bits, is
  given. The weight test that achieves it is this design's own.
* **CED.** Parity prediction from the OLS group property is given. The exact
  checker (one comparison per group, OR-ed) is this design's own.
* **Status outputs.** `err_detected` and `corrected` are extras for
  monitoring.
* **Correction scope.** Check bits are not corrected. They are rewritten with
  fresh values on the next write.
* **No memory.** No memory array is included: the code is meant for memories,
  registers and caches, but their organisation is not specified.

## Simulation

The testbenches live in `tb/`. Each one checks the RTL against
`tb/ols_ref_pkg.sv`, an independent reference model. That model builds the
matrix with a general GF multiplier, checks the OS-MLD structure (column weight
2t, pairwise overlap ≤ 1) and decodes bit by bit. Every testbench prints
`TB_RESULT checks=N failures=F`.

| testbench | what it covers |
|-----------|----------------|
| `tb_ols_encoder` | hand-worked columns, all unit vectors, random words |
| `tb_ols_syndrome` | valid words, single check-bit and data-bit errors, random pairs |
| `tb_ols_mld_corrector` | every single and double error of the 36-bit word; random syndromes |
| `tb_ols_multi_err_detect` | errors of weight 0–5 against the reference; hand-built cases |
| `tb_ols_ced_checker` | encoder and syndrome use, faults in one and in two groups |
| `tb_ols_decoder` | all 0-, 1- and 2-bit errors exhaustively; 2000 heavy errors against the reference |
| `tb_ols_ecc_top` | end to end at the default size. Counts clean reads, single and double corrections, check-bit-only errors, uncorrectable flags, and one injected (`force`) encoder fault and syndrome fault each; fails if any of these never happens |
| `tb_ols_workloads` | the m = 8 (k = 72) and m = 16 (k = 336) extended codes through `ols_ecc_top`; m = 32 (k = 1312) passes the same test when added to its size list, but is left out by default for its build time |
| `tb_ols_t_variants` | plain codes with t = 1 (m = 4), t = 3 and t = 4 (m = 8): structure, encoder, all errors up to t corrected, t+1 errors flagged |

To run one, for example the end-to-end test:

```sh
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/ols_pkg.sv tb/ols_ref_pkg.sv tb/tb_ols_ecc_top.sv --top-module tb_ols_ecc_top
./obj_dir/Vtb_ols_ecc_top
```
