// ecc_pkg: shared constants and H-matrix construction for the spare-column ECC memory.
//
// The parity-check matrix H is held column by column for the data bits only; the
// check-bit columns are always the identity and are never stored. Column i is a
// vector of MAX_ROWS bits: bit b (b < R) is row b of the base SEC-DED code, bit
// R+j is row j of the extra rows, one extra row per spare column.
//
// Base code: an odd-weight-column (Hsiao) SEC-DED code. Its data columns are the
// odd-weight R-bit vectors of weight 3 or more, taken in order of increasing weight
// and, within a weight, of increasing value. Every such code is SEC-DED, which is the
// property that must survive when all spares end up used for repair.
//
// Starting from an SEC-DED code and adding rows one at a time is the paper's method;
// the particular matrices below are this design's.
//
// Extra rows: rows are added one at a time, greedily, each one chosen to minimise
// the number of triple-bit errors that alias with a single-bit syndrome, with the
// earlier rows fixed and ties broken by fewer ones (fewer XOR gates). For 16, 18 and
// 20 data bits every one of the 2^k possible rows was tried (exhaustive search); for
// 32 and 64 bits the best of 2000 and 600 random rows was kept (random search). The
// constants below are the results. The first row is the one kept longest: when
// repairs consume spares, the last rows are dropped first. Triple-error
// miscorrection counts over all C(n,3) triples of the n-bit codeword:
//   16 data bits, 6 base check bits: 1036/1540, +1 row 476/1771, +2 196/2024, +3 60/2300
//   18 data bits, 6 base check bits: 1468/2024, +1 row 668/2300, +2 280/2600, +3 96/2925
//   20 data bits, 6 base check bits: 2060/2600, +1 row 948/2925, +2 408/3276, +3 148/3654
//   32 data bits, 7 base check bits: 5500/9139, +1 row 2604/9880, +2 1188/10660, +3 508/11480
//   64 data bits, 8 base check bits: 34164/59640, +1 row 16764/62196, +2 8104/64824, +3 3856/67525
// Any extra row keeps the code SEC-DED, so for other data widths the 64-bit rows are
// used truncated; they still work, but were not optimised for that width.
//
// SEC-DAEC variant (daec = 1): the data columns are ordered so that every single-bit
// syndrome and every syndrome of two adjacent bits (data, then check bits, then
// extra check bits, in that order along the word) is distinct. The order is built
// greedily: position by position, the first odd-weight vector (by weight, then
// value) is taken whose own value and whose XOR with the previous column are not
// yet in use as a syndrome; for the last data column its XOR with check column 0
// must be unused as well. Extra rows were searched as above, minimising the number
// of non-adjacent double errors whose syndrome aliases with an adjacent pair:
//   16 bits: 141/210, +1 row 54/231, +2 15/253, +3 1/276
//   32 bits: 436/703, +1 row 187/741, +2 71/780, +3 23/820
//   64 bits: 1463/2485, +1 row 677/2556, +2 305/2628, +3 129/2701
package ecc_pkg;

  localparam int MAX_DATA   = 64;  // widest data word supported by the H-matrix type
  localparam int MAX_ROWS   = 12;  // base check bits plus extra rows, at most
  localparam int MAX_SPARES = 3;   // extra rows for which searched constants exist

  typedef logic [MAX_ROWS-1:0]                h_col_t;
  typedef logic [MAX_DATA-1:0][MAX_ROWS-1:0]  h_mat_t;

  // Number of base check bits of a minimal SEC-DED code: smallest r with 2^(r-1) - r >= k.
  function automatic int secded_check_bits(int k);
    int r;
    r = 2;
    while (((1 << (r - 1)) - r) < k) r++;
    return r;
  endfunction

  // Searched extra row j (0 = first added) for a data width k; bit i belongs to data bit i.
  function automatic logic [MAX_DATA-1:0] extra_row(int k, int j);
    logic [MAX_SPARES-1:0][MAX_DATA-1:0] rows;
    case (k)
      16:      rows = {64'h0000_0000_0000_6909, 64'h0000_0000_0000_3263, 64'h0000_0000_0000_00df};
      18:      rows = {64'h0000_0000_0001_2d62, 64'h0000_0000_0001_8a16, 64'h0000_0000_0003_0c5c};
      20:      rows = {64'h0000_0000_0000_4e5c, 64'h0000_0000_000c_44c5, 64'h0000_0000_0003_bf7f};
      32:      rows = {64'h0000_0000_253c_fd1f, 64'h0000_0000_4e4d_8e94, 64'h0000_0000_3e85_14c7};
      default: rows = {64'h1bcf_d696_49ea_4e99, 64'hcda2_4085_38a7_ac79, 64'hc3a7_9e1d_ebdb_587e};
    endcase
    if (j >= MAX_SPARES) return '0;
    return (k >= MAX_DATA) ? rows[j] : (rows[j] & ((64'd1 << k) - 64'd1));
  endfunction

  // Searched extra row j for the SEC-DAEC variant.
  function automatic logic [MAX_DATA-1:0] extra_row_daec(int k, int j);
    logic [MAX_SPARES-1:0][MAX_DATA-1:0] rows;
    case (k)
      16:      rows = {64'h0000_0000_0000_b645, 64'h0000_0000_0000_f9a6, 64'h0000_0000_0000_3bc9};
      32:      rows = {64'h0000_0000_be09_0b1a, 64'h0000_0000_e3af_3bbc, 64'h0000_0000_ca33_c949};
      default: rows = {64'hc32e_f721_de83_38ce, 64'h28a1_2923_a143_7207, 64'heea1_d2d1_9224_c269};
    endcase
    if (j >= MAX_SPARES) return '0;
    return (k >= MAX_DATA) ? rows[j] : (rows[j] & ((64'd1 << k) - 64'd1));
  endfunction

  // Base SEC-DED data columns: odd weight >= 3, by weight, then by value.
  function automatic h_mat_t hsiao_base(int k, int r);
    h_mat_t h;
    int     i;
    h = '0;
    i = 0;
    for (int w = 3; w <= r; w += 2) begin
      for (int v = 0; v < (1 << r); v++) begin
        if ($countones(v) == w && i < k) begin
          h[i] = h_col_t'(v);
          i++;
        end
      end
    end
    return h;
  endfunction

  // Base SEC-DAEC data columns, built greedily (see the header). Columns that
  // cannot be placed are left zero, which the modules' users would notice at once.
  function automatic h_mat_t daec_base(int k, int r);
    h_mat_t                   h;
    logic [(1<<MAX_ROWS)-1:0] taken;   // syndromes already in use
    int                       n;
    h_col_t                   prev, p, p2;
    bit                       placed;
    h = '0;
    taken = '0;
    for (int b = 0; b < r; b++)     taken[1 << b] = 1'b1;
    for (int b = 0; b < r - 1; b++) taken[(1 << b) | (1 << (b + 1))] = 1'b1;
    prev = '0;
    for (n = 0; n < k; n++) begin
      placed = 1'b0;
      for (int w = 3; w <= r; w += 2) begin
        for (int v = 0; v < (1 << r); v++) begin
          if (!placed && $countones(v) == w && !taken[v]) begin
            p  = prev ^ h_col_t'(v);
            p2 = h_col_t'(v) ^ h_col_t'(1);
            if (!(n > 0 && taken[p]) && !(n == k - 1 && taken[p2])) begin
              taken[v] = 1'b1;
              if (n > 0) taken[p] = 1'b1;
              h[n]   = h_col_t'(v);
              prev   = h_col_t'(v);
              placed = 1'b1;
            end
          end
        end
      end
    end
    return h;
  endfunction

  // Default H (data columns) for k data bits, r base check bits and ns extra rows,
  // SEC-DED (daec = 0) or SEC-DAEC (daec = 1).
  function automatic h_mat_t default_h(int k, int r, int ns, bit daec = 1'b0);
    h_mat_t h;
    logic [MAX_DATA-1:0] row;
    h = daec ? daec_base(k, r) : hsiao_base(k, r);
    for (int j = 0; j < ns; j++) begin
      row = daec ? extra_row_daec(k, j) : extra_row(k, j);
      for (int d = 0; d < k; d++) h[d][r + j] = row[d];
    end
    return h;
  endfunction

endpackage
