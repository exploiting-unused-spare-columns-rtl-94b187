# Spare-column ECC memory: extra check bits in unused repair columns

Memories are built with a few spare columns so that a defective column (or bit line)
can be replaced after manufacturing test. Most dies need fewer spares than they carry,
and the leftovers sit unused for the life of the part. This design puts them to work:
every spare column that repair did not consume stores one *extra check bit* of the
word's error-correcting code. Each extra check bit adds one row to the code's
parity-check matrix H, so fewer multi-bit errors alias with a correctable pattern.

The memory is protected by a minimal SEC-DED code (single error correcting, double
error detecting; 7 check bits for 32 data bits). Such a code miscorrects more than
half of all triple-bit errors: their syndrome equals the syndrome of some single bit,
and the decoder "fixes" the wrong bit. With one free spare holding an extra check bit,
the design below miscorrects 26% of triple errors; with three, 4%. When repair uses
up all spares the memory falls back to the plain SEC-DED code, still correct.

The added hardware is small: one XOR tree per spare in the check bit generator and in
the syndrome generator, one 2-input AND per spare in the error-detection OR, and one
2-input OR per spare and per data bit in the correction logic. Everything else (the
shift MUXes that route around a repaired column, the array, the SEC-DED decoder)
exists in a conventional memory with column repair and ECC anyway.

The scheme and its block structure follow the paper "Exploiting Unused Spare Columns
to Improve Memory ECC". The H matrices, the array, the port protocol and the handling
of more than one spare are choices of this implementation; they are listed below.

## Block structure

```
 wdata ──► ecc_check_gen ──► {extra, check, data} ──► spare_write_mux ──► ecc_sram
                                                          ▲                  │
 defect_i ──► spare_repair_ctrl ── wshift ───────────────┘                  │
                      │ rshift ──────────────────────────► spare_read_mux ◄──┘
                      │ spare_used                               │
                      ▼                                          ▼
               ecc_error_detect ◄── syndrome ── ecc_syndrome_gen ◄┘
                      ▲                 │
                      └─ correctable ── ecc_correct ──► rdata
```

| module | role |
|---|---|
| `ecc_pkg` | H-matrix type, base-code construction, searched extra rows |
| `ecc_check_gen` | XOR trees: `CHECK_W` base check bits plus one extra bit per spare |
| `spare_repair_ctrl` | turns the per-column defect flags into MUX selects and `spare_used` |
| `spare_write_mux` | shifts the logical word past repaired columns into the array |
| `ecc_sram` | `DEPTH` x (`DATA_W+CHECK_W+SPARES`) array, spares are the top columns |
| `spare_read_mux` | undoes the shift on read |
| `ecc_syndrome_gen` | recomputes all check bits and XORs with the stored ones |
| `ecc_correct` | one bit slice per data bit; flips the bit whose column matches the syndrome |
| `ecc_error_detect` | OR of syndrome bits, extra bits gated by `~spare_used` |
| `ecc_spare_mem` | top level |

## How the spares are shared between repair and ECC

The logical word is laid out as data bits, then base check bits, then the extra
check bits (extra bit 0 first). `defect_i` has one flag per physical column, spares
included, and comes from memory test and repair. That process and where its result is
kept (fuses, BIST registers) are outside this design. The logical word is placed on
the unflagged physical columns from left to right. With `d` flagged columns every bit
right of a flag moves `d` places right, and the last `d` logical bits drop off the
end. Those are always extra check bits, last one first.

- `wshift[p]` = number of flagged columns left of physical column p. Column p then
  writes logical bit `p - wshift[p]`. With one spare this is exactly a row of 2:1
  MUXes whose select means "a repaired column lies to my left". The rightmost MUX
  chooses between its neighbour's check bit (spare used) and the extra check bit
  (spare free).
- `rshift[l]` = how far right logical bit l now lives. Same MUX row, mirrored, on the
  read side.
- `spare_used[j] = (d > SPARES-1-j)`. A defective spare counts as a flag like any
  other column, so "spare used for repair" is also 1 when the spare itself is bad.

Because the last extra bit is lost first, extra bit 0 is the one that stays longest.
It is also the row chosen to give the largest gain on its own (see below). Flagging
more columns than there are spares cannot be repaired. The top asserts against it;
the outputs are then meaningless.

## The code

H is stored column by column for the data bits (`ecc_pkg::h_mat_t`, up to 64 data
bits and 12 rows). The check bit columns are always the identity. Row `b < CHECK_W`
belongs to the base code and row `CHECK_W+j` is the extra row of spare j. Every module
takes H as a parameter, so any code can be supplied. The default is
`ecc_pkg::default_h(DATA_W, CHECK_W, SPARES, DAEC)`.

**Base SEC-DED code.** The data columns are odd-weight vectors of weight 3 or more,
taken by increasing weight and then by increasing value. All columns are odd-weight
and distinct, so the XOR of two columns is even-weight and can never look like a
single error: the code is SEC-DED.

**Extra rows.** Adding a row never breaks SEC-DED: the base part of every syndrome is
unchanged. Rows are chosen one at a time, with earlier rows fixed. Each row is the
one that minimises the number of triple errors (over all C(n,3) triples of the n
stored bits) whose syndrome equals a column of H. Ties go to fewer ones, which means
fewer XOR gates. For 16, 18 and 20 data bits all 2^k possible rows were tried. For 32
and 64 bits the best of 2000 and 600 random rows was kept. For 16 bits both methods
reach the same counts. Only the results are in the source, as constants. For other
widths the 64-bit rows are truncated; these work but were not optimised.
Miscorrected triple errors with this design's matrices:

| data bits | check bits | no spare free | 1 free | 2 free | 3 free |
|---|---|---|---|---|---|
| 16 | 6 | 1036 / 1540 (67%) | 476 / 1771 (27%) | 196 / 2024 (9.7%) | 60 / 2300 (2.6%) |
| 18 | 6 | 1468 / 2024 (73%) | 668 / 2300 (29%) | 280 / 2600 (10.8%) | 96 / 2925 (3.3%) |
| 20 | 6 | 2060 / 2600 (79%) | 948 / 2925 (32%) | 408 / 3276 (12.5%) | 148 / 3654 (4.1%) |
| 32 | 7 | 5500 / 9139 (60%) | 2604 / 9880 (26%) | 1188 / 10660 (11%) | 508 / 11480 (4.4%) |
| 64 | 8 | 34164 / 59640 (57%) | 16764 / 62196 (27%) | 8104 / 64824 (12.5%) | 3856 / 67525 (5.7%) |

Ones in the data part of H, which is the number of XOR inputs per encoder before any
sharing, for 0/1/2/3 extra rows: 48/55/62/68 (16 bits), 54/62/69/77 (18 bits),
60/76/84/92 (20 bits), 96/111/126/145 (32 bits), 208/247/276/311 (64 bits).

The paper reports the same trend with its own codes. For 32 bits it gives 5,452
miscorrected triples for a Hsiao base code, then 2,548 / 1,200 / 588 with one, two
and three extra rows. Base codes optimised for this metric do better when no spare
is free: the paper quotes 4,284 for 32 bits. The base codes used here are plain
Hsiao-style codes, close to the Hsiao figure.

**SEC-DAEC variant (`DAEC = 1`).** Multi-bit upsets mostly hit neighbouring cells. A
SEC-DAEC code also corrects any two adjacent bits. It needs every single-bit syndrome
and every adjacent-pair syndrome to be distinct. `ecc_pkg::daec_base` orders the data
columns greedily. At each position it takes the first odd-weight vector, by weight and
then by value, that is not yet in use as a syndrome and whose XOR with the previous
column is not in use either. For the last data column, its XOR with check column 0
must also be unused. Adjacency runs along the logical word: data, check, then extra
check bits. Such a code can miscorrect a *non-adjacent* double error whose syndrome
equals an adjacent pair's. The extra rows were searched to minimise exactly that:

| data bits | no spare free | 1 free | 2 free | 3 free |
|---|---|---|---|---|
| 16 | 141 / 210 | 54 / 231 | 15 / 253 | 1 / 276 |
| 32 | 436 / 703 | 187 / 741 | 71 / 780 | 23 / 820 |
| 64 | 1463 / 2485 | 677 / 2556 | 305 / 2628 | 129 / 2701 |

Ones in the data part of H for 0/1/2/3 extra rows: 50/59/69/77 (16 bits),
96/111/132/146 (32 bits), 208/237/261/295 (64 bits).

## Decoding when a spare may or may not be there

The correction slice for data bit i is an AND over all syndrome bits. Each bit enters
true where column h_i has a 1 and inverted where it has a 0, so the AND fires exactly
when S = h_i, and an XOR then flips d_i. For an extra syndrome bit, the term first
passes an OR with `spare_used[j]`. A spare taken for repair therefore forces its term
to 1, and the slice compares only the rows that really exist. Error detection works
the same way: the extra syndrome bit enters the final OR through an AND with
`~spare_used[j]`. A stored extra bit is thus used when it exists and ignored when it
does not, with no change to the base decoder.

With `DAEC = 1` each slice also compares S with the two adjacent-pair syndromes that
contain its bit, `h_(i-1)^h_i` and `h_i^h_(i+1)`. Both slices of a pair fire together.
The paper draws only the SEC-DED slice, so this extension is this design's.

Check bits are never corrected; only data bits are. `err_uncorrectable_o` is an
addition. It means "an error was detected, but the active syndrome names no correctable
pattern": no slice fired, and the syndrome is neither a single check bit nor (with
DAEC) two adjacent ones. A miscorrected multi-bit error shows up as detected but not
uncorrectable. That is the undesirable case that the extra check bits make rarer.

## Top-level interface and timing

Parameters of `ecc_spare_mem`: `DATA_W` (32), `CHECK_W`
(`secded_check_bits(DATA_W)`, 7), `SPARES` (1), `DEPTH` (1024), `DAEC` (0), `H`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (only `rvalid_o` is reset) |
| `defect_i` | in | DATA_W+CHECK_W+SPARES | repair flags per physical column, static during operation |
| `en_i`, `we_i` | in | 1 | request; `we_i`=1 write, 0 read |
| `addr_i` | in | log2(DEPTH) | word address |
| `wdata_i` | in | DATA_W | write data |
| `rvalid_o` | out | 1 | read answer valid; 1 in the cycle after a read request |
| `rdata_o` | out | DATA_W | corrected read data |
| `err_detected_o` | out | 1 | non-zero active syndrome |
| `err_uncorrectable_o` | out | 1 | detected but not correctable |
| `spare_used_o` | out | SPARES | 1 = that spare's extra check bit is not stored |

The array is single-ported. A write takes effect at the clock edge. A read registers
the physical word at the edge, and the read MUXes, syndrome and correction that
follow are combinational, so `rdata_o` and the flags are valid together with
`rvalid_o`, one cycle after the request. They hold until the next read. The array is
not initialised, so read only what was written. `ecc_sram` is a register array that
stands in for an SRAM macro; in a real memory the shift MUXes and ECC logic sit
around the macro the same way.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line.

- `tb_ecc_spare_mem` runs the top with no parameter overrides (32 bits, one spare,
  1024 words). The spare is free, then a data/check column is repaired, then the spare
  itself is defective. In each case the test checks the stored bit layout through the
  array and corrupts the repaired column, which must not matter. It flips every single
  stored bit (must be corrected) and random pairs (must be flagged uncorrectable). It
  injects all triples and checks each verdict against a syndrome computed in the
  testbench, and the totals against 2604 and 5500. The test fails if any mechanism
  never occurred: extra bit stored, shift repair, defective spare, correction, double
  detection, miscorrection, or a triple that the extra bit catches and the base code
  would miss. It also checks the one-cycle read latency.
- `tb_ecc_spare_mem_table1` builds 16/32/64-bit memories with three spares and takes
  each through 0 to 3 used spares. All triple errors are injected and the miscorrection
  counts must match the first table above.
- `tb_ecc_spare_mem_table3` does the same for 16, 18 and 20 data bits with one
  spare, the widths whose rows came from exhaustive search.
- `tb_ecc_spare_mem_table2` does the same for the SEC-DAEC variant: all adjacent
  pairs must be corrected, and all non-adjacent pairs are counted against the second
  table.
- `tb_ecc_correct` includes the paper's small (7,3) Hsiao example with one added
  row, data columns (1,0,1,1,0), (1,1,0,1,1), (0,1,1,1,0). It must miscorrect 28 of
  the 35 triples without the extra row, and 12 (of the 56 triples of the 8-bit word)
  with it. It also checks one bit slice exhaustively against its truth table, for a
  column h_i = [1 0 1 0 1 1] with five base and one extra syndrome bit.

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ecc_pkg.sv tb/tb_ecc_spare_mem.sv --top-module tb_ecc_spare_mem -o sim
./obj_dir/sim
```

The full-size test takes well under a second, and the two table tests a few seconds.
Every file in `rtl/` lints clean with `verilator --lint-only -Wall`.

## Where this departs from, or goes beyond, the paper

- The H matrices are this design's (see above), so the miscorrection numbers match the
  paper's in trend, not digit for digit.
- The paper shows the datapath for a single spare and says the control is replicated
  for more. The shift-by-count generalisation and the rule that the last extra bit is
  dropped first are this design's.
- Repair information arrives as a per-column flag vector; the paper leaves its form
  open.
- The paper does not give array depth, porting, read latency or reset; the values above
  are choices.
- `err_uncorrectable_o` and the SEC-DAEC correction slice are additions.
- The offline search that picks H is not hardware and is not part of the RTL. Only its
  results are, so a new data width needs new rows for best results.
