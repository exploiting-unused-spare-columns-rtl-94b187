// tb_spare_repair_ctrl: tests repair control for 39 codeword columns with one spare
// (all single flags, spare flag included) and with three spares (random sets of up
// to three flags). The reference lays logical bits over the unflagged columns from
// left to right: logical bit l goes to the l-th unflagged column p, so the write
// shift of p and the read shift of l are both p - l, and spare j is used for repair
// when j >= SPARES - (number of flags).
module tb_spare_repair_ctrl;
  localparam int COLS = 39;
  localparam int N1 = COLS + 1, N3 = COLS + 3;

  logic [N1-1:0]       def1;
  logic [N1-1:0][0:0]  ws1, rs1;
  logic [0:0]          used1;
  logic [N3-1:0]       def3;
  logic [N3-1:0][1:0]  ws3, rs3;
  logic [2:0]          used3;
  int                  checks = 0, failures = 0;

  spare_repair_ctrl #(.COLS(COLS), .SPARES(1)) u1 (.defect_i(def1), .wshift_o(ws1), .rshift_o(rs1), .spare_used_o(used1));
  spare_repair_ctrl #(.COLS(COLS), .SPARES(3)) u3 (.defect_i(def3), .wshift_o(ws3), .rshift_o(rs3), .spare_used_o(used3));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endfunction

  task automatic verify1();
    int l, nd;
    l = 0; nd = $countones(def1);
    for (int p = 0; p < N1; p++) if (!def1[p]) begin
      check(int'(ws1[p]) == p - l, "1-spare write shift");
      check(int'(rs1[l]) == p - l, "1-spare read shift");
      l++;
    end
    check(used1[0] == (nd >= 1), "1-spare used flag");
  endtask

  task automatic verify3();
    int l, nd;
    l = 0; nd = $countones(def3);
    for (int p = 0; p < N3; p++) if (!def3[p]) begin
      check(int'(ws3[p]) == p - l, "3-spare write shift");
      check(int'(rs3[l]) == p - l, "3-spare read shift");
      l++;
    end
    for (int j = 0; j < 3; j++) check(used3[j] == (j >= 3 - nd), "3-spare used flags");
  endtask

  int placed, p;

  initial begin
    def1 = '0; #1; verify1();
    for (int q = 0; q < N1; q++) begin def1 = N1'(1) << q; #1; verify1(); end
    def3 = '0; #1; verify3();
    for (int t = 0; t < 500; t++) begin
      def3 = '0; placed = 0;
      while (placed < (t % 4)) begin
        p = int'($urandom_range(N3 - 1));
        if (!def3[p]) begin def3[p] = 1'b1; placed++; end
      end
      #1; verify3();
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
