// ecc_syndrome_gen: syndrome generator of the spare-column ECC memory.
//
// Recomputes every check bit (base and extra) from the data read out of the array
// and XORs it with the check bit that was read, giving S = H * V. S is zero for an
// error-free word; for a single error in data bit i it equals column h_i of H.
// Extra syndrome bits whose spare column was used for repair carry no information;
// they are computed anyway and masked downstream (error detection and correction).
//
// Interface: data_i and check_i (as read, after the read-side shift MUXes) in,
// syndrome_o out, bit b for row b of H. Purely combinational. The structure (one
// extra XOR tree per spare) follows the paper; the default H is this design's.
module ecc_syndrome_gen
  import ecc_pkg::*;
#(
  parameter int     DATA_W  = 32,
  parameter int     CHECK_W = secded_check_bits(DATA_W),
  parameter int     SPARES  = 1,
  parameter h_mat_t H       = default_h(DATA_W, CHECK_W, SPARES)
) (
  input  logic [DATA_W-1:0]         data_i,
  input  logic [CHECK_W+SPARES-1:0] check_i,
  output logic [CHECK_W+SPARES-1:0] syndrome_o
);

  localparam int ROWS = CHECK_W + SPARES;

  always_comb begin
    for (int b = 0; b < ROWS; b++) begin
      syndrome_o[b] = check_i[b];
      for (int i = 0; i < DATA_W; i++) syndrome_o[b] = syndrome_o[b] ^ (data_i[i] & H[i][b]);
    end
  end

endmodule
