// tb_spare_write_mux: tests the write-side shift MUXes with 40 columns and one spare
// and with 42 columns and three spares. For random flagged columns the shift selects
// are derived here (a column's shift is the number of flagged columns to its left);
// every unflagged column p must then hold logical bit rank(p), where rank counts the
// unflagged columns left of p.
module tb_spare_write_mux;
  localparam int N1 = 40, N3 = 42;

  logic [N1-1:0]      w1, ph1, def1;
  logic [N1-1:0][0:0] sh1;
  logic [N3-1:0]      w3, ph3, def3;
  logic [N3-1:0][1:0] sh3;
  int                 checks = 0, failures = 0;

  spare_write_mux #(.N(N1), .SPARES(1)) u1 (.word_i(w1), .wshift_i(sh1), .phys_o(ph1));
  spare_write_mux #(.N(N3), .SPARES(3)) u3 (.word_i(w3), .wshift_i(sh3), .phys_o(ph3));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endfunction

  int cnt, rank, placed, p;

  initial begin
    for (int t = 0; t < 400; t++) begin
      def1 = (t % 2 == 0) ? '0 : (N1'(1) << $urandom_range(N1 - 1));
      def3 = '0; placed = 0;
      while (placed < (t % 4)) begin
        p = int'($urandom_range(N3 - 1));
        if (!def3[p]) begin def3[p] = 1'b1; placed++; end
      end
      cnt = 0;
      for (int q = 0; q < N1; q++) begin sh1[q] = 1'(cnt); cnt += int'(def1[q]); end
      cnt = 0;
      for (int q = 0; q < N3; q++) begin sh3[q] = 2'(cnt); cnt += int'(def3[q]); end
      w1 = N1'({$urandom, $urandom});
      w3 = N3'({$urandom, $urandom});
      #1;
      rank = 0;
      for (int q = 0; q < N1; q++) if (!def1[q]) begin
        check(ph1[q] == w1[rank], "1-spare column content"); rank++;
      end
      rank = 0;
      for (int q = 0; q < N3; q++) if (!def3[q]) begin
        check(ph3[q] == w3[rank], "3-spare column content"); rank++;
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
