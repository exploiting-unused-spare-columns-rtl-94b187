// tb_ecc_syndrome_gen: tests the syndrome generator at 32 data bits, 7 base check
// bits and one spare. Codewords come from a reference encoder written here from H.
// A clean codeword must give S = 0, a flipped data bit i the column h_i, a flipped
// check bit b the unit vector b, and any pattern of flips the XOR of those vectors.
module tb_ecc_syndrome_gen;
  import ecc_pkg::*;

  localparam int     K = 32, R = 7, S = 1, ROWS = R + S;
  localparam h_mat_t H = default_h(K, R, S);

  logic [K-1:0]    d;
  logic [ROWS-1:0] c, syn, expv;
  int              checks = 0, failures = 0;

  ecc_syndrome_gen #(.DATA_W(K), .CHECK_W(R), .SPARES(S)) dut (.data_i(d), .check_i(c), .syndrome_o(syn));

  function automatic logic [ROWS-1:0] enc(input logic [K-1:0] x);
    logic [ROWS-1:0] r;
    for (int b = 0; b < ROWS; b++) begin
      r[b] = 1'b0;
      for (int i = 0; i < K; i++) if (H[i][b]) r[b] ^= x[i];
    end
    return r;
  endfunction

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endfunction

  logic [K-1:0]    d0, ed;
  logic [ROWS-1:0] c0, ec;

  initial begin
    for (int t = 0; t < 100; t++) begin
      d0 = $urandom; c0 = enc(d0);
      d = d0; c = c0; #1;
      check(syn == '0, "clean codeword");
      for (int i = 0; i < K; i++) begin
        d = d0 ^ (K'(1) << i); c = c0; #1;
        check(syn == H[i][ROWS-1:0], "single data error gives its column");
      end
      for (int b = 0; b < ROWS; b++) begin
        d = d0; c = c0 ^ (ROWS'(1) << b); #1;
        check(syn == (ROWS'(1) << b), "single check error gives unit vector");
      end
      ed = $urandom; ec = ROWS'($urandom);
      expv = ec;
      for (int i = 0; i < K; i++) if (ed[i]) expv ^= H[i][ROWS-1:0];
      d = d0 ^ ed; c = c0 ^ ec; #1;
      check(syn == expv, "random error pattern");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
