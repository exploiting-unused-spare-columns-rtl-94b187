// tb_ecc_spare_mem_table3: memories of 16, 18 and 20 data bits (6 base check bits)
// with one spare column, whose extra rows were chosen by exhaustive search. Each is
// taken through the spare free, a repaired column and a defective spare; all
// triple-bit errors are injected and the miscorrected ones counted. Expected
// (spare free / spare used): 16 bits 476 / 1036, 18 bits 668 / 1468,
// 20 bits 948 / 2060.
module tb_ecc_spare_mem_table3;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [2:0] done;
  int   checks [3], failures [3], n_store [3], n_shift [3], n_sdef [3];
  int   n_corr [3], n_dbl [3], n_mis [3], n_resc [3];
  int   tc, tf;

  always #5 clk = ~clk;

  ecc_mem_harness #(.USE_DEFAULTS(1'b0), .DATA_W(16), .SPARES(1), .DEPTH(64),
                    .EXP_MIS('{476, 1036, 0, 0})) u_h16 (
    .clk(clk), .rst_n(rst_n), .done(done[0]), .checks(checks[0]), .failures(failures[0]),
    .n_spare_store(n_store[0]), .n_repair_shift(n_shift[0]), .n_spare_defect(n_sdef[0]),
    .n_corrected(n_corr[0]), .n_double(n_dbl[0]), .n_adjacent(), .n_miscorrect(n_mis[0]), .n_rescued(n_resc[0]));

  ecc_mem_harness #(.USE_DEFAULTS(1'b0), .DATA_W(18), .SPARES(1), .DEPTH(64),
                    .EXP_MIS('{668, 1468, 0, 0})) u_h32 (
    .clk(clk), .rst_n(rst_n), .done(done[1]), .checks(checks[1]), .failures(failures[1]),
    .n_spare_store(n_store[1]), .n_repair_shift(n_shift[1]), .n_spare_defect(n_sdef[1]),
    .n_corrected(n_corr[1]), .n_double(n_dbl[1]), .n_adjacent(), .n_miscorrect(n_mis[1]), .n_rescued(n_resc[1]));

  ecc_mem_harness #(.USE_DEFAULTS(1'b0), .DATA_W(20), .SPARES(1), .DEPTH(64),
                    .EXP_MIS('{948, 2060, 0, 0})) u_h64 (
    .clk(clk), .rst_n(rst_n), .done(done[2]), .checks(checks[2]), .failures(failures[2]),
    .n_spare_store(n_store[2]), .n_repair_shift(n_shift[2]), .n_spare_defect(n_sdef[2]),
    .n_corrected(n_corr[2]), .n_double(n_dbl[2]), .n_adjacent(), .n_miscorrect(n_mis[2]), .n_rescued(n_resc[2]));

  task automatic finish(input int extra_fail);
    tc = 0; tf = extra_fail;
    for (int k = 0; k < 3; k++) begin
      tc += checks[k] + 7;
      tf += failures[k];
      tf += int'(n_store[k] == 0) + int'(n_shift[k] == 0) + int'(n_sdef[k] == 0) +
            int'(n_corr[k] == 0) + int'(n_dbl[k] == 0) + int'(n_mis[k] == 0) + int'(n_resc[k] == 0);
      $display("width %0d: spare_store=%0d repair_shift=%0d spare_defect=%0d corrected=%0d double=%0d miscorrected=%0d rescued=%0d",
               16 + 2 * k, n_store[k], n_shift[k], n_sdef[k], n_corr[k], n_dbl[k], n_mis[k], n_resc[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    finish(0);
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    finish(1);
  end
endmodule
