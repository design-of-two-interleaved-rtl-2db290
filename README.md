# Interleaved SEC-DED EDAC for 32-bit memory words (Hsiao and CRC variants)

A single-event upset in a dense memory often flips not one bit but two or
more neighbouring bits. A plain SEC-DED code (single error correction, double
error detection) corrects one flipped bit per word and only reports two.
This design turns two ordinary SEC-DED codes into a double-adjacent-error
correcting EDAC by interleaving them: the even-numbered bits of the stored
word form one codeword and the odd-numbered bits form another. Any burst of
two neighbouring upsets then puts one error in each codeword, and each is
corrected on its own.

Two complete EDACs are provided, identical except for the code used inside
the halves:

* a **Hsiao** (24,16) code, built for speed: every check bit is a 6-input XOR;
* a **CRC-8** (24,16) code with generator g(x) = x^8 + x^3 + x^2 + 1 and a
  zero seed, which spends slightly wider XORs (up to 7 inputs) for better
  detection of three- and four-bit errors.

Everything is combinational. The top, `edac_top`, holds both EDACs side by
side so the two codes can be compared on the same data.

## Word format

Each EDAC protects 32 data bits with 16 check bits, a 48-bit codeword:

```
cw[47:32] = check bits      cw[31:0] = data bits
even code : cw[0], cw[2], ..., cw[30]  (data d0,d2,..,d30)  and cw[32], cw[34], ..., cw[46] (its 8 check bits)
odd code  : cw[1], cw[3], ..., cw[31]  (data d1,d3,..,d31)  and cw[33], cw[35], ..., cw[47]
```

The parity of a bit's index alone decides which half it belongs to, also
across the data/check boundary (`cw[31]` is odd data, `cw[32]` is even
check). Two bits that are neighbours anywhere in the 48-bit word are therefore
always in different halves. Each half is a (24,16) code: 16 data bits and 8
check bits; check bit `k` of the even half is `chk[2k]`, of the odd half
`chk[2k+1]`.

## The two (24,16) codes

Both are systematic: H = [A | I8], where A is an 8 x 16 matrix and check bit
r is the XOR of the data bits with a one in row r of A. Column j of A is the
syndrome a flip of data bit j produces; the identity columns belong to the
check bits. Both matrices live in `rtl/edac_pkg.sv`.

**Hsiao.** The Hsiao rules are: every column of H has odd weight; the total
number of ones is minimal; the rows are as equally loaded as possible. With 8
rows, the 16 data columns are taken from the C(8,3) = 56 weight-3 columns
(weight 1 is used by the check bits), giving 48 ones, exactly 6 per row. The
chosen set is the first balanced one in lexicographic order of the 56
columns:

```
data bit : 0   1   2   3   4   5   6   7   8   9   10  11  12  13  14  15
rows     : 123 124 125 126 127 128 345 346 347 348 356 478 567 568 578 678
```

(row r = check bit r-1). Single errors give a weight-1 or weight-3 syndrome;
any double error gives a non-zero even-weight syndrome, so it can never be
mistaken for a single.

**CRC.** Column j of A is x^(j+8) mod g(x) with g(x) = x^8 + x^3 + x^2 + 1,
so the check bits equal the CRC of the 16-bit message shifted in bit 15 first
with the register cleared (seed 0). A zero seed means no constant terms enter
the XOR trees. g(x) = (x+1)·p(x) with a degree-7 p(x) of order larger than 24,
which gives the 24-bit code minimum distance 4: singles are distinct and
double errors never alias a single. The package computes the columns with a
constant function, so the polynomial appears in one place (`CRC_POLY`, the
low 8 coefficients). Row weights are 7,6,7,7,7,7,7,6 (check bit 0 first).

## Decoding

For each half, `secded_syndrome` re-encodes the received data bits and XORs
the result with the received check bits. `secded_decoder` compares the
syndrome with all 24 columns of H:

* zero syndrome: no error;
* equal to a data column: that data bit is flipped back, `ce` = 1;
* equal to an identity column: a check bit was hit, data is already right, `ce` = 1;
* anything else: `ue` = 1 (uncorrectable), data passed through unchanged.

The same column-matching decoder serves both codes. (The common Hsiao shortcut
of using the syndrome's parity to tell singles from doubles does not carry
over to the CRC code, whose columns are not all odd.)

`interleaved_decoder` runs two such chains and merges the flags into
`edac_status_t`: per-half `{ce, ue}`, a word-level `ue` if either half
failed, and a word-level `ce` if a half corrected and neither failed.

## What is corrected and what is detected

Counting errors as (bits in the even half)+(bits in the odd half):

| Errors | Outcome |
|---|---|
| 1 (any bit) | corrected |
| 2, one even + one odd (includes every adjacent pair) | corrected |
| 2 in the same half | detected (`ue`) |
| 3 split 2+1 (includes every 3-bit burst) | detected |
| 4 split 2+2 (includes every 4-bit burst) | detected |
| 3 or 4 with three or more in one half | usually detected, can be miscorrected |

The last row is the limit of any distance-4 code: three errors in one half can
look like a single error at a fourth position. Measured exhaustively on the
word 0x12345678 (all 17296 triple and 194580 quadruple errors of the 48-bit
codeword):

| Class | Hsiao detected | CRC detected |
|---|---|---|
| 3+0 / 0+3 | 1484 of 2024 (73.3 %) | 1700 of 2024 (84.0 %) |
| 2+1 / 1+2 | 100 % | 100 % |
| all triples | 93.8 % | 96.3 % |
| 4+0 / 0+4 | 10491 of 10626 (98.7 %) | 10545 of 10626 (99.2 %) |
| 3+1 / 1+3 | 35616 of 48576 (73.3 %) | 40800 of 48576 (84.0 %) |
| 2+2 | 100 % | 100 % |
| all quadruples | 86.5 % | 91.9 % |

A single non-interleaved (24,16) code detects 73.3 % (Hsiao) or 84.0 % (CRC)
of its triple errors, so interleaving raises the triple-error detection of the
32-bit word to 94–96 %. The CRC code detects more multi-bit errors; the Hsiao
code has narrower XORs (6 vs 7 inputs, 48 vs 54 ones in the data part of H),
hence fewer gates and shorter paths.

Four-bit errors split 1+3 are therefore not fully detectable with either
code, and no error of three or more bits is ever corrected: each half is a
plain SEC-DED code, and the interleaving guarantees only the classes in the
first five rows above.

## Modules

| File | Role |
|---|---|
| `rtl/edac_pkg.sv` | sizes (K=16, R=8, 48-bit codeword), `code_e`, Hsiao matrix, CRC column function, status structs |
| `rtl/hsiao_encoder.sv` | (24,16) Hsiao check bits |
| `rtl/crc_encoder.sv` | (24,16) zero-seed CRC-8 check bits, parallel form |
| `rtl/secded_syndrome.sv` | syndrome of one half; `CODE` selects the encoder |
| `rtl/secded_decoder.sv` | column-matching correction and `{ce, ue}` for one half |
| `rtl/interleaved_encoder.sv` | 32 data bits to 16 interleaved check bits, two encoders (48 signals) |
| `rtl/interleaved_decoder.sv` | 48-bit codeword to corrected 32 bits and `edac_status_t` |
| `rtl/edac_top.sv` | Hsiao EDAC and CRC EDAC side by side; forms the codewords {check, data} |

`CODE` (type `edac_pkg::code_e`, `CODE_HSIAO` or `CODE_CRC`) is the only
module parameter; the encoder and the decoder of one memory must use the same
value. The sizes are package constants because both matrices are made for
(24,16).

Top-level ports of `edac_top`: `wr_data[31:0]` in; `hsiao_cw[47:0]`,
`crc_cw[47:0]` out (to be stored); `hsiao_rd_cw[47:0]`, `crc_rd_cw[47:0]` in
(read back); `hsiao_rd_data[31:0]`, `crc_rd_data[31:0]`, `hsiao_status`,
`crc_status` out. There is no clock: place registers where the surrounding
memory controller needs them. Synthesized, each check bit is one XOR tree of
6 (Hsiao) or up to 7 (CRC) inputs; the decoder adds an 8-bit XOR, 24 8-bit
comparators and a 16-bit XOR per half.

## Departures and open points

* The Hsiao matrix is one valid balanced choice, not necessarily the only one
  in use for this construction; a different balanced set gives different check
  bits with the same properties. Check-bit values from other implementations
  of "the same" code will therefore not match bit for bit.
* The codeword is 48 bits, {check, data}. If the memory is 64 bits wide, the
  remaining 16 bits are simply unused; the EDAC does not need them.
* The CRC bit order (message bit 15 shifted first, check bit r = coefficient
  of x^r) was chosen to match the published matrix columns.
* No memory array, error-injection logic or scrubbing is included.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. They share a reference model,
`tb/edac_ref.svh` (row-by-row Hsiao masks, a bit-serial CRC register and a
separate interleaving routine), written apart from the RTL.

| Testbench | What it covers |
|---|---|
| `tb_hsiao_encoder` | Hsiao rules on the matrix, all 65536 data words |
| `tb_crc_encoder` | all 65536 words against the serial CRC, distance-4 property |
| `tb_secded_syndrome` | syndromes of 0/1/2-bit errors, both codes |
| `tb_secded_decoder` | every single and double error of a half; prints triple-error detection |
| `tb_interleaved_encoder` | corner and random words, both codes |
| `tb_interleaved_decoder` | every single and double error, all 3- and 4-bit bursts |
| `tb_edac_top` | end to end, counts each error class, exhaustive triple/quadruple table |

Run one with plain Verilator from the repository root, e.g.

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/edac_pkg.sv tb/tb_edac_top.sv --top-module tb_edac_top -o sim
./obj_dir/sim
```

`tb_edac_top` runs the top with its default configuration in well under a
minute and prints the counts of each error class and the triple/quadruple
table above.
