// ecc_check_gen: check bit generator of the spare-column ECC memory.
//
// Computes the CHECK_W base check bits of a systematic SEC-DED code and one extra
// check bit per spare column. Each check bit is an XOR tree over the data bits whose
// H-matrix entry in that row is 1 (the check-bit columns of H are the identity, so
// check bit b is simply the parity of the data bits selected by row b). The extra
// trees are the only addition the scheme makes to a conventional generator; their
// outputs are stored only when the spare they belong to is free, which is decided
// by the write-side shift MUXes, not here.
//
// Interface: data_i in, check_o out; bits [CHECK_W-1:0] are the base check bits,
// bit CHECK_W+j is the extra check bit for spare j. Purely combinational.
// One extra XOR tree per spare is what the paper's scheme adds here; the default H
// (see ecc_pkg) is this design's own and may be overridden.
module ecc_check_gen
  import ecc_pkg::*;
#(
  parameter int     DATA_W  = 32,
  parameter int     CHECK_W = secded_check_bits(DATA_W),
  parameter int     SPARES  = 1,
  parameter h_mat_t H       = default_h(DATA_W, CHECK_W, SPARES)
) (
  input  logic [DATA_W-1:0]         data_i,
  output logic [CHECK_W+SPARES-1:0] check_o
);

  localparam int ROWS = CHECK_W + SPARES;

  always_comb begin
    for (int b = 0; b < ROWS; b++) begin
      check_o[b] = 1'b0;
      for (int i = 0; i < DATA_W; i++) check_o[b] = check_o[b] ^ (data_i[i] & H[i][b]);
    end
  end

endmodule
