// tb_spare_read_mux: tests the read-side shift MUXes with 40 columns and one spare and
// with 42 columns and three spares. For random flagged columns the read selects are
// derived here (logical bit l reads the l-th unflagged column p, shift p - l); every
// logical bit that is stored must come out equal to its physical column.
module tb_spare_read_mux;
  localparam int N1 = 40, N3 = 42;

  logic [N1-1:0]      ph1, w1, def1;
  logic [N1-1:0][0:0] sh1;
  logic [N3-1:0]      ph3, w3, def3;
  logic [N3-1:0][1:0] sh3;
  int                 checks = 0, failures = 0;
  int                 pos1 [N1], pos3 [N3];
  int                 n1, n3, placed, p;

  spare_read_mux #(.N(N1), .SPARES(1)) u1 (.phys_i(ph1), .rshift_i(sh1), .word_o(w1));
  spare_read_mux #(.N(N3), .SPARES(3)) u3 (.phys_i(ph3), .rshift_i(sh3), .word_o(w3));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      def1 = (t % 2 == 0) ? '0 : (N1'(1) << $urandom_range(N1 - 1));
      def3 = '0; placed = 0;
      while (placed < (t % 4)) begin
        p = int'($urandom_range(N3 - 1));
        if (!def3[p]) begin def3[p] = 1'b1; placed++; end
      end
      sh1 = '0; sh3 = '0; n1 = 0; n3 = 0;
      for (int q = 0; q < N1; q++) if (!def1[q]) begin pos1[n1] = q; sh1[n1] = 1'(q - n1); n1++; end
      for (int q = 0; q < N3; q++) if (!def3[q]) begin pos3[n3] = q; sh3[n3] = 2'(q - n3); n3++; end
      ph1 = N1'({$urandom, $urandom});
      ph3 = N3'({$urandom, $urandom});
      #1;
      for (int l = 0; l < n1; l++) check(w1[l] == ph1[pos1[l]], "1-spare logical bit");
      for (int l = 0; l < n3; l++) check(w3[l] == ph3[pos3[l]], "3-spare logical bit");
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
