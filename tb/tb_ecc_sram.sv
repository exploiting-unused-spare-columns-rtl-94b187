// tb_ecc_sram: tests the array at its default size (1024 words of 40 bits). Fills
// every word with a pattern kept in a reference array here, then does random reads
// and writes, checking that each read returns the word one clock later and that the
// output holds between reads.
module tb_ecc_sram;
  localparam int DEPTH = 1024, W = 40, AW = 10;

  logic          clk = 1'b0;
  logic          en, we;
  logic [AW-1:0] addr;
  logic [W-1:0]  wdata, rdata, ref_mem [DEPTH], last;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_sram #(.DEPTH(DEPTH), .WIDTH(W)) dut (.clk(clk), .en_i(en), .we_i(we), .addr_i(addr), .wdata_i(wdata), .rdata_o(rdata));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endfunction

  initial begin
    en = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = AW'(a); wdata = W'({$urandom, $urandom}); ref_mem[a] = wdata;
    end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      addr = AW'($urandom_range(DEPTH - 1));
      en = 1'b1; we = ($urandom_range(3) == 0);
      if (we) begin
        wdata = W'({$urandom, $urandom}); ref_mem[addr] = wdata;
        @(negedge clk); en = 1'b0;
      end else begin
        last = ref_mem[addr];
        @(negedge clk); en = 1'b0;
        check(rdata == last, "read data one cycle after request");
        @(negedge clk);
        check(rdata == last, "read data held while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
