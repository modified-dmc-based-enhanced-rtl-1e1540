# Decimal Matrix Code (DMC) protected memory, 32-bit, with XOR syndrome decoding

Radiation can flip not just one memory cell but a cluster of neighbouring cells
at once (a multiple cell upset, MCU). A plain single-error-correcting code cannot
repair such clusters. The Decimal Matrix Code stores, beside each 32-bit word, 36
check bits computed over a small matrix of 4-bit symbols: integer sums along the
rows and XOR parities down the columns. On a read, the row sum tells *which
symbol* is wrong and the column parity tells *which bits* of it flipped, so a
whole symbol, or two neighbouring symbols, can be repaired in one combinational
pass.

This RTL implements the DMC variant described in *"Modified DMC based Enhanced
Memory Reliability against MCUs"*: the decoder compares the recomputed and stored
check bits with plain XOR gates (a 5-bit XOR comparator, 5 gates) instead of the
5-bit subtractor of the classic DMC decoder (35 gates). Around the encoder and
decoder it adds a small codeword memory with an upset-injection port, so the whole
write → store → upset → read → correct path can be simulated.

## The code

The 32-bit word is cut into eight 4-bit symbols, `S[s] = data[4s+3:4s]`, placed in a
2 × 4 matrix:

```
            column 0   column 1   column 2   column 3
  row 0      S0         S1         S2         S3        H0 = S0 + S2   H1 = S1 + S3
  row 1      S4         S5         S6         S7        H2 = S4 + S6   H3 = S5 + S7

             V0 =       V1 =       V2 =       V3 =
             S0 ^ S4    S1 ^ S5    S2 ^ S6    S3 ^ S7
```

* **Horizontal check bits** `hcb[19:0]`: each `Hg` is the unsigned binary sum of two
  4-bit symbols two columns apart in one row, kept at 5 bits with its carry;
  `Hg = hcb[5g+4:5g]`. This integer addition is the "decimal" part of the name.
* **Vertical check bits** `vcb[15:0]`: each `Vc` is the bitwise XOR of the two
  symbols of column `c`; `Vc = vcb[4c+3:4c]`.
* A stored codeword is `{data, hcb, vcb}`, 68 bits (`dmc_pkg::codeword_t`).

Worked example (used in the tests): data `0xA86479BE` gives
`hcb = 10000_01100_10010_10111` and `vcb = 1101_0001_1101_1010`.

## Decoding: locate by row sum, repair by column parity

The decoder (`dmc_decoder`) treats the word read back exactly as the writer did:

1. **Re-encode.** An instance of the encoder recomputes `H'` and `V'` from the data
   as read.
2. **Syndromes by XOR comparison** (`dmc_syndrome`, built from `dmc_xor_cmp`):
   `hsyn = H' ^ H` (20 XOR gates, four 5-bit comparators) and `vsyn = V' ^ V`
   (16 XOR gates). A horizontal group is suspect when its 5-bit field is nonzero.
   The 4-bit column field is exactly the set of bits that flipped in that column.
3. **Locate** (`dmc_err_locator`). Symbol `s` belongs to horizontal group
   `g = 2·(s/4) + (s mod 2)` and column `c = s mod 4`. Its location bit is
   `err_loc[s] = (hsyn group g ≠ 0) AND (vsyn column c ≠ 0)`. The error sits where
   a suspect row pair crosses a suspect column.
4. **Repair** (`dmc_corrector`). Each located symbol is XORed with its column's
   vertical syndrome: S0/S4 with `vsyn[3:0]`, S1/S5 with `vsyn[7:4]`, S2/S6 with
   `vsyn[11:8]`, S3/S7 with `vsyn[15:12]`. All other symbols pass unchanged.
5. **Output register.** The corrected word and `err_loc` are registered on the
   next rising edge.

Replacing the subtractor with XOR comparison does not change what is corrected.
The classic decoder only asks whether the row-sum difference is zero, and
`H' − H = 0` exactly when `H' ^ H = 0`.

## What is corrected, and what is not

This is the part to understand before relying on the code. Correction is exact
when every erroneous symbol is alone in its column and no clean symbol sits at
the crossing of a suspect row group and a suspect column. In practice that means:

| Upset | Result |
|---|---|
| Any bits flipped inside one symbol (1 to 4 bits) | always corrected |
| Any bits flipped in two horizontally adjacent symbols of one row (S0/S1, S1/S2, S2/S3, S4/S5, S5/S6, S6/S7), up to 8 bits | always corrected |
| A contiguous run of up to 5 flipped data bits, in data-bit order, including across the S3/S4 boundary | always corrected |
| Flips only in `hcb`, or only in `vcb` | data delivered untouched, no symbol marked |
| Symbols S(c) and S(c+4) of the same column both hit | **miscorrected**: the column parity is the XOR of both error patterns |
| Flips in both S(k) and S(k+2) of one row whose sum changes cancel (e.g. +1 and −1) | not detected |
| Three symbols hit, e.g. data bits 11..16 (S2, S3, S4) | can mark a clean symbol (here S0) and corrupt it |
| Flips in `hcb` and `vcb` at the same time | can mark and corrupt a clean symbol |

Over random all-ones bursts of contiguous data bits, bursts of 6 bits are fully
repaired about 93 % of the time, 8 bits about 76 %, and 16 bits about 10 %. The
decoder raises no separate "uncorrectable" flag. `err_loc` reports the symbols it
changed, and a read whose `err_loc` is nonzero is the only hint that an upset
happened.

Physical interleaving helps. Vertically adjacent symbols are miscorrected, so a
layout in which physically adjacent cells map to row-adjacent symbols gets the
most out of the code. The memory model here does not interleave.

## Modules

| File | Module | Role | Timing |
|---|---|---|---|
| `rtl/dmc_pkg.sv` | package | widths, `codeword_t`, symbol/group/column index helpers | - |
| `rtl/dmc_encoder.sv` | `dmc_encoder` | 4 five-bit adders, 4 four-bit XORs | combinational |
| `rtl/dmc_xor_cmp.sv` | `dmc_xor_cmp` | W-bit XOR comparator | combinational |
| `rtl/dmc_syndrome.sv` | `dmc_syndrome` | `hsyn`, `vsyn` | combinational |
| `rtl/dmc_err_locator.sv` | `dmc_err_locator` | 8 error-location bits | combinational |
| `rtl/dmc_corrector.sv` | `dmc_corrector` | symbol bit inversion | combinational |
| `rtl/dmc_decoder.sv` | `dmc_decoder` | re-encode → syndrome → locate → repair → register | 1 cycle |
| `rtl/dmc_codeword_mem.sv` | `dmc_codeword_mem` | `DEPTH` × 68-bit store with upset port | 1-cycle read |
| `rtl/dmc_top.sv` | `dmc_top` | encoder + memory + decoder | 2-cycle read |

The encoder's `data_out` is its input passed through. It exists so the encoder
presents the whole codeword, as the published encoder does (32 data in, 32 data
out, 20 + 16 check bits).

## The protected memory, `dmc_top`

Parameters: `DEPTH` (default 16 words) and `ADDR_W = clog2(DEPTH)`.

* **Write**: `wr_en`, `wr_addr`, `wr_data[31:0]`. The word is encoded and stored on
  the rising edge.
* **Read**: `rd_en`, `rd_addr`. Two rising edges later, `rd_valid` is high for one
  cycle with `rd_data[31:0]` (corrected) and `rd_err_loc[7:0]` (symbols that were
  repaired). The first edge belongs to the synchronous memory read, the second to
  the decoder's output register. A read can be issued every cycle.
* **Upset injection**: `upset_en`, `upset_addr`, `upset_mask[67:0]`. On the rising
  edge the stored codeword is XORed with the mask, whose layout is
  `{data[31:0], hcb[19:0], vcb[15:0]}` (data bit `i` is mask bit `36+i`). A write to
  the same address in the same cycle takes priority. A read of a word being written
  or upset in the same cycle returns the old contents.
* **Reset**: `rst_n`, asynchronous, active low, clears the decoder output register
  and `rd_valid`. Memory contents are not cleared.

The corrected word is not written back. A repaired upset stays in the array until
the word is rewritten.

## Where this RTL goes beyond the paper

Taken from the paper: the 32-bit word as eight 4-bit symbols, 20 horizontal and
16 vertical check bits, XOR syndrome comparison, one location bit per symbol from
the horizontal and vertical syndrome groups, the bit-inversion table, and an
output register after correction. The symbol-to-group arrangement was checked
against the paper's example word and check bits, which this RTL reproduces bit
for bit.

Choices made here:

* The location bit of a symbol is *(any bit of its horizontal syndrome group) AND
  (any bit of its column syndrome)*. The paper says the grouped syndrome bits are
  ANDed. Reducing each group to "nonzero" first is the reading under which single
  errors are always corrected.
* Encoder and decoder work on one word with no handshake. The encoder is
  combinational. The decoder registers its output every cycle and has an
  asynchronous reset.
* `err_loc` is brought out of the decoder, which the paper's decoder does not do.
* The memory (size, synchronous read, upset port, write-over-upset priority) and
  the read-valid pipeline of `dmc_top` are this design's own. The paper only says
  that the encoder output is stored in memory and decoded on the way out.
* The conventional subtractor-based syndrome unit, which the paper uses as a
  baseline, is not included.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
Expected values come from `tb/dmc_ref_pkg.sv`, an independently written
behavioural model of the code.

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_dmc_top \
    rtl/dmc_pkg.sv tb/dmc_ref_pkg.sv tb/tb_dmc_top.sv
./obj_dir/Vtb_dmc_top
```

The two packages are named explicitly. Verilator finds the modules in `rtl/` by
file name through `-y`. To run another block's test, replace `tb_dmc_top` with
`tb_dmc_encoder`, `tb_dmc_syndrome`, `tb_dmc_err_locator`, `tb_dmc_corrector`,
`tb_dmc_decoder` or `tb_dmc_codeword_mem`. The end-to-end test runs in well
under a second.

What the tests cover:

* `tb_dmc_encoder`: the worked example, corner words, and 2000 random words.
* `tb_dmc_decoder`:
  * every nonzero error pattern in every symbol;
  * random errors in every horizontally adjacent symbol pair;
  * check-bit-only errors;
  * 2000 random error patterns compared with the model;
  * the one-cycle latency and the reset.
* `tb_dmc_top`: runs the default-size memory end to end. It exercises clean
  reads, single-bit upsets, multi-bit upsets inside one symbol, two-symbol
  upsets, check-bit-only upsets, random upsets and write-over-upset collisions.
  Reads come singly and back to back. It counts each class (every one must
  occur), checks the two-cycle latency, and requires the original word back for
  every correctable class.

* `tb_dmc_example`: runs the worked example word through `dmc_top`. It checks
  the stored check bits, a clean read, and a corrected read for every single-symbol
  error pattern.

Two assertions guard the design in simulation (`--assert`):

* `dmc_decoder` checks that a word with no located symbol leaves the register
  unchanged.
* `dmc_top` checks that every `rd_valid` follows a read request by exactly two
  cycles.

All testbenches pass. The simulator used has two-state logic, so the tests do
not cover X propagation.
