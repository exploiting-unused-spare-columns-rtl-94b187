// tb_ecc_correct: tests the correction logic.
// 1) The (7,3) example with one added row (data columns 1,0,1,1,0 / 1,1,0,1,1 /
//    0,1,1,1,0, rows 0..4). Syndromes of all triple errors are formed here as the XOR
//    of three columns. With the extra bit in use 12 of the 56 triples of the 8-bit
//    word must be taken as single errors; with the spare used for repair, 28 of the
//    35 triples of the 7-bit word (the base code alone).
// 2) The default 32-bit, one-spare logic: every single data error is corrected with
//    the spare free and with it used; a syndrome that differs from h_i only in the
//    extra bit is corrected only when the spare is used; check-bit syndromes flip no
//    data but count as single errors; a zero syndrome changes nothing.
// 3) The 32-bit SEC-DAEC logic with one spare: the syndrome of each adjacent pair
//    (data/data, last data bit/check bit 0, check/check, last check bit/extra bit)
//    is formed here from H and must flip exactly the data bits of the pair and be
//    reported correctable; the pair with the extra bit only while the spare is free.
// 4) The single bit slice of the document's correction figure: five base syndrome
//    bits and one extra, h_i = [1 0 1 0 1 1] for s0..s5. Over all 64 syndromes the
//    bit must flip exactly when S = h_i with the spare free, and when s0..s4 match
//    whatever s5 is with the spare used.
module tb_ecc_correct;
  import ecc_pkg::*;

  localparam h_mat_t HEX = h_mat_t'({12'b0_1110, 12'b1_1011, 12'b0_1101});
  localparam h_mat_t H32 = default_h(32, 7, 1);
  localparam h_mat_t HDA = default_h(32, 7, 1, 1'b1);

  logic [2:0]  ex_d, ex_q;
  logic [4:0]  ex_s;
  logic        ex_used, ex_single;
  logic [31:0] d, q;
  logic [7:0]  s;
  logic        used, single;
  int          checks = 0, failures = 0;

  ecc_correct #(.DATA_W(3), .CHECK_W(4), .SPARES(1), .H(HEX)) u_ex (
    .data_i(ex_d), .syndrome_i(ex_s), .spare_used_i(ex_used), .data_o(ex_q), .correctable_o(ex_single));
  logic [31:0] dq;
  logic [7:0]  ds;
  logic        dused, dcorr;
  logic [39:0] flips;

  ecc_correct #(.DATA_W(32), .CHECK_W(7), .SPARES(1), .DAEC(1'b1)) u_da (
    .data_i(d), .syndrome_i(ds), .spare_used_i(dused), .data_o(dq), .correctable_o(dcorr));

  logic       f_d, f_q, f_used, f_corr;
  logic [5:0] f_s;

  ecc_correct #(.DATA_W(1), .CHECK_W(5), .SPARES(1), .H(h_mat_t'(12'b11_0101))) u_fig (
    .data_i(f_d), .syndrome_i(f_s), .spare_used_i(f_used), .data_o(f_q), .correctable_o(f_corr));

  function automatic logic [7:0] dacol(input int l);
    return (l < 32) ? HDA[l][7:0] : 8'(1 << (l - 32));
  endfunction

  ecc_correct #(.DATA_W(32), .CHECK_W(7), .SPARES(1)) u_32 (
    .data_i(d), .syndrome_i(s), .spare_used_i(used), .data_o(q), .correctable_o(single));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endfunction

  function automatic logic [4:0] excol(input int l);
    return (l < 3) ? HEX[l][4:0] : 5'(1 << (l - 3));
  endfunction

  int mis;

  initial begin
    // Example code: triple errors.
    ex_d = 3'b101;
    for (int u = 0; u < 2; u++) begin
      ex_used = u[0];
      mis = 0;
      for (int x = 0; x < 8 - u; x++)
        for (int y = x + 1; y < 8 - u; y++)
          for (int z = y + 1; z < 8 - u; z++) begin
            ex_s = excol(x) ^ excol(y) ^ excol(z);
            if (u == 1) ex_s[4] = 1'b0;
            #1;
            if (ex_single) mis++;
          end
      check(mis == (u == 1 ? 28 : 12), $sformatf("example triple miscorrections %0d (spare used %0d)", mis, u));
    end
    // Example code: single data errors.
    for (int i = 0; i < 3; i++) begin
      ex_used = 1'b0; ex_s = excol(i); #1;
      check(ex_q == (ex_d ^ 3'(1 << i)) && ex_single, "example single error corrected");
    end

    // 32-bit code.
    for (int t = 0; t < 20; t++) begin
      d = $urandom;
      for (int u = 0; u < 2; u++) begin
        used = u[0];
        s = '0; #1;
        check(q == d && !single, "zero syndrome leaves data");
        for (int i = 0; i < 32; i++) begin
          s = H32[i][7:0]; #1;
          check(q == (d ^ (32'd1 << i)) && single, "single data error corrected");
          s = H32[i][7:0] ^ 8'h80; #1;
          if (u == 1) check(q == (d ^ (32'd1 << i)) && single, "extra bit ignored when spare used");
          else        check(q == d && !single, "extra bit mismatch blocks correction");
        end
        for (int b = 0; b < 8; b++) begin
          s = 8'(1 << b); #1;
          if (b == 7 && u == 1) check(q == d && !single, "dropped extra bit alone is no error");
          else                  check(q == d && single, "check bit error flips no data");
        end
      end
    end
    // Bit slice with h_i = 101011 (s0 first).
    for (int u = 0; u < 2; u++)
      for (int v = 0; v < 64; v++) begin
        f_used = u[0]; f_s = 6'(v); f_d = v[0] ^ v[3];
        #1;
        check(f_q == (f_d ^ ((u == 1) ? (f_s[4:0] == 5'b10101) : (f_s == 6'b110101))),
              $sformatf("figure bit slice, S=%b spare used %0d", f_s, u));
      end

    // SEC-DAEC adjacent pairs.
    for (int u = 0; u < 2; u++) begin
      dused = u[0]; d = $urandom;
      for (int l = 0; l + 1 < 40 - u; l++) begin
        ds = dacol(l) ^ dacol(l + 1);
        flips = 40'(3) << l;
        #1;
        check(dq == (d ^ flips[31:0]) && dcorr, $sformatf("adjacent pair %0d corrected (spare used %0d)", l, u));
      end
      for (int i = 0; i < 32; i++) begin
        ds = dacol(i); #1;
        check(dq == (d ^ (32'd1 << i)) && dcorr, "DAEC single data error corrected");
      end
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
