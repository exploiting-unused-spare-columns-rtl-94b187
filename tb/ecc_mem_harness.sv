// ecc_mem_harness: reusable end-to-end test of ecc_spare_mem, instantiated by the
// top-level testbenches.
//
// For every repair situation from "no column repaired" to "all spares used" (plus
// one where a spare column itself is defective) it programs the defect flags,
// writes random words and then, through hierarchical access to the array:
//   - checks every stored physical bit against a reference layout worked out here
//     (shifted codeword, extra check bits in the free spares);
//   - corrupts the flagged columns, which must not change what is read;
//   - flips every single stored bit (must be corrected, detected, not
//     uncorrectable), random pairs (must be detected and uncorrectable) and every
//     triple of stored bits, comparing the design's verdict on each triple with a
//     syndrome computed here from H, and the total number of miscorrected triples
//     with EXP_MIS[d] (d = flagged columns).
// With DAEC=1 (SEC-DAEC code) the pair and triple steps are replaced by: every
// adjacent pair of stored bits (must be corrected) and every non-adjacent pair,
// whose miscorrections are compared with the reference and with EXP_MIS[d].
// USE_DEFAULTS=1 instantiates the memory with no parameter overrides at all; the
// other parameters must then equal the memory's defaults.
// Outputs: done, and the check/failure/mechanism counters, valid once done is 1.
module ecc_mem_harness #(
  parameter bit          USE_DEFAULTS = 1'b1,
  parameter int          DATA_W       = 32,
  parameter int          SPARES       = 1,
  parameter int          DEPTH        = 1024,
  parameter bit          DAEC         = 1'b0,
  parameter int unsigned EXP_MIS [4]  = '{2604, 5500, 0, 0}
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_spare_store,   // configurations with at least one extra check bit stored
  output int   n_repair_shift,  // configurations with a main column bypassed
  output int   n_spare_defect,  // configurations with a defective spare
  output int   n_corrected,     // single errors corrected
  output int   n_double,        // double errors flagged uncorrectable
  output int   n_adjacent,      // adjacent double errors corrected (DAEC)
  output int   n_miscorrect,    // triples (DAEC: non-adjacent pairs) miscorrected
  output int   n_rescued        // of those, ones the base code alone would miscorrect but the extra bits catch
);
  import ecc_pkg::*;

  localparam int     CHECK_W = secded_check_bits(DATA_W);
  localparam int     ROWS    = CHECK_W + SPARES;
  localparam int     N       = DATA_W + CHECK_W + SPARES;
  localparam int     AW      = $clog2(DEPTH);
  localparam h_mat_t H       = default_h(DATA_W, CHECK_W, SPARES, DAEC);

  logic              en, we;
  logic [AW-1:0]     addr;
  logic [DATA_W-1:0] wdata, rdata;
  logic [N-1:0]      defect;
  logic              rvalid, det, unc;
  logic [SPARES-1:0] spare_used;

  if (USE_DEFAULTS) begin : g_dut
    ecc_spare_mem dut (
      .clk(clk), .rst_n(rst_n), .defect_i(defect), .en_i(en), .we_i(we), .addr_i(addr),
      .wdata_i(wdata), .rvalid_o(rvalid), .rdata_o(rdata), .err_detected_o(det),
      .err_uncorrectable_o(unc), .spare_used_o(spare_used));
  end else begin : g_dut
    ecc_spare_mem #(.DATA_W(DATA_W), .SPARES(SPARES), .DEPTH(DEPTH), .DAEC(DAEC)) dut (
      .clk(clk), .rst_n(rst_n), .defect_i(defect), .en_i(en), .we_i(we), .addr_i(addr),
      .wdata_i(wdata), .rvalid_o(rvalid), .rdata_o(rdata), .err_detected_o(det),
      .err_uncorrectable_o(unc), .spare_used_o(spare_used));
  end

  int phys_of [N];   // physical column holding logical bit l, -1 if not stored
  int n_active;      // logical bits stored: N minus the number of flagged columns

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (DATA_W=%0d SPARES=%0d)", what, DATA_W, SPARES);
    end
  endfunction

  // Reference encoder: logical word {extra check, base check, data}.
  function automatic logic [N-1:0] ref_word(input logic [DATA_W-1:0] d);
    logic [ROWS-1:0] c;
    for (int b = 0; b < ROWS; b++) begin
      c[b] = 1'b0;
      for (int i = 0; i < DATA_W; i++) if (H[i][b]) c[b] ^= d[i];
    end
    return {c, d};
  endfunction

  // Syndrome signature of logical bit l over the rows that are in use.
  function automatic h_col_t col_of(input int l, input int active_rows);
    h_col_t v, mask;
    mask = (h_col_t'(1) << active_rows) - h_col_t'(1);
    if (l < DATA_W) v = H[l];
    else            v = h_col_t'(1) << (l - DATA_W);
    return v & mask;
  endfunction

  task automatic set_defects(input int nmain, input bit spare_bad);
    int placed, p, k;
    defect = '0;
    placed = 0;
    while (placed < nmain) begin
      p = int'($urandom_range(DATA_W + CHECK_W - 1));
      if (!defect[p]) begin defect[p] = 1'b1; placed++; end
    end
    if (spare_bad) defect[N-1] = 1'b1;
    k = 0;
    for (int l = 0; l < N; l++) phys_of[l] = -1;
    for (int q = 0; q < N; q++) if (!defect[q]) begin phys_of[k] = q; k++; end
    n_active = k;
  endtask

  task automatic mem_write(input int a, input logic [DATA_W-1:0] d);
    @(negedge clk);
    en = 1'b1; we = 1'b1; addr = AW'(a); wdata = d;
    @(negedge clk);
    en = 1'b0; we = 1'b0;
  endtask

  // Read with a latency check: the answer must come exactly one clock after the request.
  task automatic mem_read(input int a, output logic [DATA_W-1:0] q, output logic d, output logic u);
    @(negedge clk);
    check(!rvalid, "rvalid low before a read");
    en = 1'b1; we = 1'b0; addr = AW'(a);
    @(negedge clk);
    en = 1'b0;
    check(rvalid, "rvalid one cycle after the read");
    q = rdata; d = det; u = unc;
  endtask

  task automatic flip(input int a, input int l);
    g_dut.dut.u_sram.mem[a][phys_of[l]] = ~g_dut.dut.u_sram.mem[a][phys_of[l]];
  endtask

  task automatic run_config(input int nmain, input bit spare_bad);
    logic [DATA_W-1:0] d0, q;
    logic [N-1:0]      w0;
    logic              dd, uu;
    int                a, arows, nflag, mis_hw, mis_sw, l1, l2;
    h_col_t            s, sb, basemask;
    bit                sw_mis, sw_mis_base;

    set_defects(nmain, spare_bad);
    nflag = nmain + int'(spare_bad);
    arows = CHECK_W + SPARES - nflag;
    @(negedge clk);
    for (int j = 0; j < SPARES; j++)
      check(spare_used[j] == (j >= SPARES - nflag), "spare_used pattern");
    if (nflag < SPARES) n_spare_store++;
    if (nmain > 0)      n_repair_shift++;
    if (spare_bad)      n_spare_defect++;

    // Clean words: layout in the array and error-free read back.
    for (int t = 0; t < 8; t++) begin
      a  = int'($urandom_range(DEPTH - 1));
      d0 = DATA_W'({$urandom, $urandom});
      w0 = ref_word(d0);
      mem_write(a, d0);
      for (int l = 0; l < n_active; l++)
        check(g_dut.dut.u_sram.mem[a][phys_of[l]] == w0[l], "stored bit layout");
      for (int q2 = 0; q2 < N; q2++) if (defect[q2]) g_dut.dut.u_sram.mem[a][q2] ^= 1'b1;
      mem_read(a, q, dd, uu);
      check(q == d0 && !dd && !uu, "clean read through repaired columns");
    end

    a  = 3 % DEPTH;
    d0 = DATA_W'({$urandom, $urandom});
    mem_write(a, d0);

    // Every single stored bit.
    for (int l = 0; l < n_active; l++) begin
      flip(a, l);
      mem_read(a, q, dd, uu);
      check(q == d0 && dd && !uu, "single error corrected");
      if (q == d0 && dd && !uu) n_corrected++;
      flip(a, l);
    end

    if (DAEC) begin
      run_daec_pairs(a, d0, arows, nflag);
      return;
    end

    // Random double errors.
    for (int t = 0; t < 64; t++) begin
      l1 = int'($urandom_range(n_active - 1));
      l2 = int'($urandom_range(n_active - 1));
      if (l1 == l2) continue;
      flip(a, l1); flip(a, l2);
      mem_read(a, q, dd, uu);
      check(dd && uu, "double error detected as uncorrectable");
      if (dd && uu) n_double++;
      flip(a, l1); flip(a, l2);
    end

    // Every triple of stored bits.
    basemask = (h_col_t'(1) << CHECK_W) - h_col_t'(1);
    mis_hw = 0; mis_sw = 0;
    for (int x = 0; x < n_active; x++)
      for (int y = x + 1; y < n_active; y++)
        for (int z = y + 1; z < n_active; z++) begin
          s  = col_of(x, arows) ^ col_of(y, arows) ^ col_of(z, arows);
          sb = s & basemask;
          sw_mis = 1'b0; sw_mis_base = 1'b0;
          for (int l = 0; l < n_active; l++) begin
            if (s == col_of(l, arows)) sw_mis = 1'b1;
            if (l < DATA_W + CHECK_W && sb == col_of(l, CHECK_W)) sw_mis_base = 1'b1;
          end
          flip(a, x); flip(a, y); flip(a, z);
          mem_read(a, q, dd, uu);
          flip(a, x); flip(a, y); flip(a, z);
          check((dd && !uu) == sw_mis, "triple error verdict matches reference syndrome");
          check(dd || s == '0, "triple error detected unless its syndrome is zero");
          if (dd && !uu) mis_hw++;
          if (sw_mis) mis_sw++;
          if (sw_mis_base && !sw_mis) n_rescued++;
        end
    n_miscorrect += mis_hw;
    check(mis_hw == mis_sw, "miscorrection count equals reference count");
    check(mis_hw == int'(EXP_MIS[nflag]), "miscorrection count equals expected");
    $display("DATA_W=%0d SPARES=%0d flagged=%0d (spare defective=%0d): %0d of %0d triples miscorrected",
             DATA_W, SPARES, nflag, spare_bad, mis_hw,
             n_active * (n_active - 1) * (n_active - 2) / 6);
  endtask

  // SEC-DAEC: all adjacent pairs must be corrected; non-adjacent pairs are counted.
  task automatic run_daec_pairs(input int a, input logic [DATA_W-1:0] d0, input int arows, input int nflag);
    logic [DATA_W-1:0] q;
    logic              dd, uu;
    int                mis_hw, mis_sw;
    h_col_t            s, sb, basemask;
    bit                sw_mis, sw_mis_base;
    for (int l = 0; l + 1 < n_active; l++) begin
      flip(a, l); flip(a, l + 1);
      mem_read(a, q, dd, uu);
      flip(a, l); flip(a, l + 1);
      check(q == d0 && dd && !uu, "adjacent double error corrected");
      if (q == d0 && dd && !uu) n_adjacent++;
    end
    basemask = (h_col_t'(1) << CHECK_W) - h_col_t'(1);
    mis_hw = 0; mis_sw = 0;
    for (int x = 0; x < n_active; x++)
      for (int y = x + 2; y < n_active; y++) begin
        s  = col_of(x, arows) ^ col_of(y, arows);
        sb = s & basemask;
        sw_mis = 1'b0; sw_mis_base = 1'b0;
        for (int l = 0; l + 1 < n_active; l++) begin
          if (s == (col_of(l, arows) ^ col_of(l + 1, arows))) sw_mis = 1'b1;
          if (l + 1 < DATA_W + CHECK_W && sb == (col_of(l, CHECK_W) ^ col_of(l + 1, CHECK_W))) sw_mis_base = 1'b1;
        end
        flip(a, x); flip(a, y);
        mem_read(a, q, dd, uu);
        flip(a, x); flip(a, y);
        check(dd, "non-adjacent double error detected");
        check((dd && !uu) == sw_mis, "non-adjacent double verdict matches reference syndrome");
        if (dd && uu) n_double++;
        if (dd && !uu) mis_hw++;
        if (sw_mis) mis_sw++;
        if (sw_mis_base && !sw_mis) n_rescued++;
      end
    n_miscorrect += mis_hw;
    check(mis_hw == mis_sw, "miscorrection count equals reference count");
    check(mis_hw == int'(EXP_MIS[nflag]), "miscorrection count equals expected");
    $display("SEC-DAEC DATA_W=%0d SPARES=%0d flagged=%0d: %0d of %0d non-adjacent double errors miscorrected",
             DATA_W, SPARES, nflag, mis_hw, (n_active - 1) * (n_active - 2) / 2);
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    n_spare_store = 0; n_repair_shift = 0; n_spare_defect = 0;
    n_corrected = 0; n_double = 0; n_adjacent = 0; n_miscorrect = 0; n_rescued = 0;
    en = 1'b0; we = 1'b0; addr = '0; wdata = '0; defect = '0;
    @(posedge rst_n);
    for (int d = 0; d <= SPARES; d++) run_config(d, 1'b0);
    $display("harness done at %0t", $time);
    run_config(SPARES - 1, 1'b1);
    done = 1'b1;
  end

endmodule
