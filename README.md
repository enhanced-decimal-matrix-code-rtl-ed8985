# Modified Decimal Matrix Code: an SRAM that corrects multiple cell upsets

A particle strike in a dense SRAM often flips several neighbouring cells at
once (a multiple cell upset, MCU). Per-word SEC-DED codes cannot repair that,
and strong codes such as Reed-Solomon are large and slow. The Modified Decimal
Matrix Code (Modified-DMC) is a cheap two-dimensional code aimed at MCUs. It
splits each 32-bit word into a 2 x 4 matrix of 4-bit symbols. The lower row is
protected by a small Hamming code per symbol. Every bit column is protected by
an XOR parity bit over both rows. With 28 check bits per 32-bit word, it repairs
any upset that stays within one row of the matrix, up to all 16 bits of that row.
That holds provided the Hamming code of every hit lower-row symbol notices the
upset (see below).

This repository holds synthesizable SystemVerilog for the encoder, the decoder,
the codeword SRAM, and a top level that puts them together into a protected
memory. It also has self-checking testbenches for every module.

## The code

### Logical matrix

The data word `D[31:0]` is cut into eight symbols of four bits each. Symbol
*s* is `D[4s+3:4s]`. The symbols are arranged only logically; the memory
stores the bits in a flat word.

```
              column group 0   column group 1   column group 2   column group 3
row 0         D3..D0  (s0)     D7..D4  (s1)     D11..D8  (s2)    D15..D12 (s3)
row 1         D19..D16 (s4)    D23..D20 (s5)    D27..D24 (s6)    D31..D28 (s7)
```

Bit column *i* (0..15) holds `D[i]` in row 0 and `D[i+16]` in row 1.

### Check bits (28 in total)

* **Horizontal, P0..P11.** Each row-0 symbol `d3 d2 d1 d0` gets three
  Hamming(7,4) parity bits:
  `P(3s) = d3^d1^d0`, `P(3s+1) = d3^d2^d0`, `P(3s+2) = d3^d2^d1`.
  Row 1 gets no horizontal check bits.
* **Vertical, V0..V15.** `V[i] = D[i] ^ D[i+16]`, one per bit column.

In the SRAM a codeword is stored as the 60-bit word `{V[15:0], P[11:0], D[31:0]}`.

## Decoding: which row was hit?

This is the part that needs the most care. The decoder passes the data word
it read, `D'`, through a second instance of the same encoder ("encoder
re-use"), which gives `P'` and `V'`. Then:

1. **Vertical syndrome.** `S[i] = V'[i] ^ V[i]`. A one says that column *i* has
   an odd number of upsets. Under the fault model this means exactly one upset,
   either in `D[i]` (row 0) or in `D[i+16]` (row 1). The vertical syndrome says
   which column was hit, but not which row.
2. **Horizontal syndrome.** For each row-0 symbol, the 7-bit Hamming codeword
   `{P0 P1 P2 d3 d2 d1 d0}` is formed twice. One copy uses the recomputed parity
   bits and the other uses the stored ones. The code subtracts the stored copy
   from the recomputed one as an unsigned integer, modulo 128 (P0 is the most
   significant bit). The data part of both copies is the same received symbol.
   The result is therefore non-zero exactly when the parity bits disagree,
   which means the symbol was upset.
3. **Locating.** For every column *i* with `S[i] = 1`:
   * if the horizontal syndrome of row-0 symbol `i/4` is non-zero, the upset
     is in row 0, and `D[i]` is inverted;
   * otherwise row 0 is clean in that column group, the upset is in row 1, and
     `D[i+16]` is inverted.
4. **Correcting.** `Dcorrect = D' ^ err_mask`.

The example below uses the word `0xF5AFF6AC`, stored with upsets at bits 0, 1,
2, 3, 13, 26 and 27. Symbol 0 (all four bits) and symbol 3 (bit 13) have
non-zero Hamming syndromes, so columns 0-3 and 13 are repaired in row 0.
Symbol 2 has a zero syndrome, so columns 10 and 11 are repaired in row 1
(bits 26 and 27).

### What is corrected, and what is not

Correction is guaranteed when both of the following hold for each column group:

* the upsets are confined to one row of that group;
* if they are in row 0, they are not invisible to the Hamming code. Exactly
  one 4-bit pattern is invisible: d0, d1 and d2 flipped together. It leaves
  all three parity bits unchanged.

Under these conditions, both whole-row upsets are corrected: all 16 bits of
row 1, and all 16 bits of row 0.

The decoder does **not** detect or report these cases:

* **A column upset in both rows.** `S[i]` stays zero and the upset is missed.
* **An invisible row-0 pattern.** The bits are "corrected" into row 1 instead.
* **An upset in a stored check bit.** It is flagged by `err_detected` (and by
  `sym_err` for a P bit). However, a flipped V bit makes the decoder invert
  the matching row-1 data bit. A flipped P bit redirects any real data upset
  in that column group to row 0.

There is no "uncorrectable" output. The design has no such flag.

## Modules

| module | role |
|---|---|
| `dmc_pkg` | constants: symbol width M = 4, rows K1 = 2, 3 Hamming bits per symbol |
| `hamming_encoder` | three Hamming(7,4) parity bits of one symbol |
| `mdmc_encoder` | K2 Hamming encoders on row 0 plus the column XORs; used on the write path and again inside the decoder |
| `syndrome_calculator` | 7-bit codeword subtraction per row-0 symbol, column XOR syndromes |
| `error_locator` | steers each column syndrome to row 0 or row 1; `sym_err`, `err_detected` |
| `error_corrector` | `d_rx ^ err_mask` |
| `mdmc_decoder` | encoder re-use + syndrome calculator + error locator + error corrector |
| `codeword_sram` | DEPTH x 60-bit memory with one write port, one read port and an upset-injection port |
| `mdmc_top` | encoder -> SRAM -> decoder |

The number of symbols per row, `K2`, is a parameter (default 4, which gives a
32-bit word). The symbol width and the two rows are fixed, because the Hamming
equations and the row-steering rule depend on them.

## Interface and timing of `mdmc_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears `rd_valid` only) |
| `wr_en`, `wr_addr`, `wr_data` | in | 1, 4, 32 | write: encoded and stored at the rising edge |
| `rd_en`, `rd_addr` | in | 1, 4 | read request |
| `rd_valid` | out | 1 | high for one cycle, one clock after `rd_en` |
| `rd_data` | out | 32 | corrected word |
| `rd_err_mask` | out | 32 | data bits the decoder inverted |
| `rd_sym_err` | out | 4 | row-0 symbols whose Hamming syndrome was non-zero |
| `rd_err_detected` | out | 1 | some syndrome was non-zero |
| `upset_en`, `upset_addr`, `upset_mask` | in | 1, 4, 60 | invert the masked bits of a stored codeword at the edge (fault model) |

* **Write.** Write latency is one edge.
* **Read.** The SRAM registers the codeword and the decoder is combinational,
  so the corrected word shows one clock after `rd_en`. It stays on `rd_data`
  until the next read.
* **Reads and writes together.** A read and a write can happen in the same
  cycle. A read of the address being written returns the old word.
* **Upsets.** An upset and a write to the same word in the same cycle: the
  write wins.
* **Address checks.** When `DEPTH` is not a power of two, `codeword_sram`
  asserts that every address it uses is in range.
* **No scrubbing.** Corrected data is not written back. An upset stays in the
  array until that word is written again, and a second upset later may make it
  uncorrectable.

## Where this design makes its own choices

The following points come from the code itself:

* the matrix layout;
* the Hamming and XOR equations;
* the 28-bit redundancy;
* decoding by encoder re-use, with the steps syndrome -> locate -> correct;
* the use of an integer subtraction for the horizontal syndrome.

These are choices of this implementation:

* **Row-steering rule.** It is the natural reading of "horizontal syndrome
  detects, vertical syndrome locates". It is also the reading under which the
  16-bit correction capability and the example above both hold.
* **Bit order of the 7-bit codeword.** It is `{P0, P1, P2, d3..d0}`. Any order
  gives the same zero/non-zero result, so correction does not depend on it.
* **SRAM.** The depth (16 words), the port structure, the codeword bit order,
  the one-cycle read latency and the `rd_valid` handshake.
* **Upset-injection port.** It exists for verification. Tie `upset_en` low in
  use.
* **Status outputs.** `rd_err_mask`, `rd_sym_err` and `rd_err_detected`.
* **No register for the written data.** Some descriptions of the scheme keep a
  plain copy of each written word in a separate register. Nothing in the
  decoding uses it, so this design leaves it out.

The original Decimal Matrix Code puts a 5-bit adder (sum of two symbols) on
each row instead of the Hamming bits and needs 36 check bits. It is not built
here; the Modified-DMC replaces it.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/dmc_pkg.sv \
          tb/mdmc_top_tb.sv --top-module mdmc_top_tb -Mdir obj
./obj/Vmdmc_top_tb
```

The package is given first; Verilator finds the modules in `rtl/` by file
name. Replace the testbench and top-module names to run another one.

| testbench | what it checks |
|---|---|
| `hamming_encoder_tb` | all 16 symbols against the equations; minimum distance 3 of the resulting codewords |
| `mdmc_encoder_tb` | check bits against a bit-level model, for directed and random words |
| `syndrome_calculator_tb` | exact subtraction values (modulo 128) and XOR syndromes |
| `error_locator_tb` | row steering, symbol flags and detect flag for random syndromes |
| `error_corrector_tb` | masked inversion |
| `mdmc_decoder_tb` | 3000 random correctable upsets, both whole-row upsets, both example patterns, detection of a check-bit upset |
| `codeword_sram_tb` | read latency and hold, read-during-write, upset port, write-over-upset priority |
| `mdmc_top_tb` | end to end at default size: clean reads, row-0 and row-1 corrections, a 16-bit row upset, the example patterns, all 28 check-bit upsets flagged, `rd_valid` timing; it fails if any of these cases never occurs |
| `reference_vectors_tb` | the two published example upset words and a full-row upset, bit-exact |
| `mdmc_width_sweep_tb` | decoder at K2 = 2, 4 and 8 (16-, 32-, 64-bit words) with random correctable upsets |

Each runs in well under a second. All except the width sweep use the default
parameters.
