// tb_ecc_error_detect: exhaustive test of error detection with 7 base check bits and
// two spares: every syndrome, every spare_used pattern and both single_err values.
// Expected: detected = any base bit set, or an extra bit set whose spare is free;
// uncorrectable = detected and not a single error.
module tb_ecc_error_detect;
  logic [8:0] syn;
  logic [1:0] used;
  logic       single, det, unc, edet;
  int         checks = 0, failures = 0;

  ecc_error_detect #(.CHECK_W(7), .SPARES(2)) dut (
    .syndrome_i(syn), .spare_used_i(used), .correctable_i(single),
    .err_detected_o(det), .err_uncorrectable_o(unc));

  initial begin
    for (int v = 0; v < 512; v++)
      for (int u = 0; u < 4; u++)
        for (int e = 0; e < 2; e++) begin
          syn = 9'(v); used = 2'(u); single = e[0];
          #1;
          edet = (syn[6:0] != 0) || (syn[7] && !used[0]) || (syn[8] && !used[1]);
          checks++;
          if (det != edet || unc != (edet && !single)) begin
            failures++;
            if (failures < 10) $display("FAIL syn=%b used=%b single=%b", syn, used, single);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
