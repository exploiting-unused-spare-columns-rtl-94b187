// ecc_sram: storage array of the spare-column ECC memory.
//
// A single-port array of DEPTH words, each WIDTH physical columns wide, spare
// columns included (they are simply the top SPARES bits of a word). A write stores
// wdata_i at addr_i; a read returns the word one clock later on rdata_o, which holds
// its value until the next read. The array is an ordinary register array standing
// in for an SRAM macro; the document gives no size or timing for it, so the depth,
// the single port and the one-cycle read are this design's choices.
module ecc_sram #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 40,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en_i,
  input  logic             we_i,
  input  logic [AW-1:0]    addr_i,
  input  logic [WIDTH-1:0] wdata_i,
  output logic [WIDTH-1:0] rdata_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en_i) begin
      if (we_i) mem[addr_i] <= wdata_i;
      else      rdata_o     <= mem[addr_i];
    end
  end

endmodule
