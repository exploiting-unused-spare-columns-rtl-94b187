// tb_ecc_spare_mem: end-to-end test of the memory at its default size (32 data bits,
// 7 base check bits, one spare column, 1024 words), with no parameter overrides.
// Runs ecc_mem_harness over: spare free, one data/check column repaired (spare used),
// and the spare itself defective. Expected triple-error miscorrections: 2604 of 9880
// with the spare free, 5500 of 9139 with it used. Every mechanism (extra bit stored,
// shift repair, defective spare, correction, double detection, miscorrection, extra
// bit catching a triple the base code misses) must occur at least once.
module tb_ecc_spare_mem;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done;
  int   checks, failures, n_store, n_shift, n_sdef, n_corr, n_dbl, n_mis, n_resc;
  int   total_checks, total_failures;

  always #5 clk = ~clk;

  ecc_mem_harness #(.USE_DEFAULTS(1'b1)) u_h (
    .clk(clk), .rst_n(rst_n), .done(done), .checks(checks), .failures(failures),
    .n_spare_store(n_store), .n_repair_shift(n_shift), .n_spare_defect(n_sdef),
    .n_corrected(n_corr), .n_double(n_dbl), .n_adjacent(), .n_miscorrect(n_mis), .n_rescued(n_resc));

  task automatic finish(input int extra_fail);
    total_checks   = checks + 7;
    total_failures = failures + extra_fail;
    total_failures += int'(n_store == 0) + int'(n_shift == 0) + int'(n_sdef == 0) + int'(n_corr == 0) +
                      int'(n_dbl == 0) + int'(n_mis == 0) + int'(n_resc == 0);
    $display("mechanisms: spare_store=%0d repair_shift=%0d spare_defect=%0d corrected=%0d double=%0d miscorrected=%0d rescued=%0d",
             n_store, n_shift, n_sdef, n_corr, n_dbl, n_mis, n_resc);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    finish(0);
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    finish(1);
  end
endmodule
