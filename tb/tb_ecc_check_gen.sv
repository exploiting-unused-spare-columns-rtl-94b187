// tb_ecc_check_gen: tests the check bit generator.
// 1) The small (7,3) Hsiao example with one added row: data columns (rows 0..4)
//    d0 = 1,0,1,1,0   d1 = 1,1,0,1,1   d2 = 0,1,1,1,0, so the check bits are
//    c0=d0^d1, c1=d1^d2, c2=d0^d2, c3=d0^d1^d2 and the extra bit e=d1; all 8 words.
// 2) The default 32-bit generator with three spares: a one-hot data word must give
//    that data bit's H column, whose base part is the i-th odd-weight 7-bit vector of
//    weight >= 3 (enumerated here) and whose extra part is bit i of the three searched
//    rows 3e8514c7, 4e4d8e94, 253cfd1f; random words must obey linearity.
module tb_ecc_check_gen;
  import ecc_pkg::*;

  localparam h_mat_t HEX = h_mat_t'({12'b0_1110, 12'b1_1011, 12'b0_1101});

  logic [2:0]  ex_d;
  logic [4:0]  ex_c;
  logic [31:0] d32, a32, b32;
  logic [9:0]  c32, ca, cb;
  int          checks = 0, failures = 0;

  ecc_check_gen #(.DATA_W(3), .CHECK_W(4), .SPARES(1), .H(HEX)) u_ex (.data_i(ex_d), .check_o(ex_c));
  ecc_check_gen #(.DATA_W(32), .CHECK_W(7), .SPARES(3)) u_32 (.data_i(d32), .check_o(c32));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  logic [6:0]  base_cols [32];
  logic [31:0] rows [3] = '{32'h3e8514c7, 32'h4e4d8e94, 32'h253cfd1f};
  logic [4:0]  exp5;
  int          k;

  initial begin
    for (int v = 0; v < 8; v++) begin
      ex_d = 3'(v);
      #1;
      exp5 = {ex_d[1], ex_d[0]^ex_d[1]^ex_d[2], ex_d[0]^ex_d[2], ex_d[1]^ex_d[2], ex_d[0]^ex_d[1]};
      check(ex_c == exp5, $sformatf("example code word for data %0d", v));
    end
    k = 0;
    for (int w = 3; w <= 7; w += 2)
      for (int v = 0; v < 128; v++)
        if ($countones(v) == w && k < 32) begin base_cols[k] = 7'(v); k++; end
    for (int i = 0; i < 32; i++) begin
      d32 = 32'd1 << i;
      #1;
      check(c32 == {rows[2][i], rows[1][i], rows[0][i], base_cols[i]}, $sformatf("column of data bit %0d", i));
    end
    for (int t = 0; t < 200; t++) begin
      a32 = $urandom; b32 = $urandom;
      d32 = a32; #1; ca = c32;
      d32 = b32; #1; cb = c32;
      d32 = a32 ^ b32; #1;
      check(c32 == (ca ^ cb), "linearity");
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
