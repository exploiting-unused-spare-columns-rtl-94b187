// ecc_correct: correction logic of the spare-column ECC memory.
//
// One bit slice per data bit i. The slice is an AND over all syndrome bits, each
// taken true where h_i has a 1 and inverted where h_i has a 0, so it fires exactly
// when S = h_i; its output flips data bit i with an XOR. For every extra syndrome bit
// the term entering the AND is first ORed with that spare's "spare used for repair"
// signal, so a spare taken for repair drops out of the comparison and the slice
// behaves as in the plain SEC-DED code. This follows the document's bit-slice
// figure; the OR is the only gate the scheme adds per data bit and per spare.
//
// With DAEC = 1 the code is SEC-DAEC (single error, double adjacent error
// correcting) and each slice also fires when S equals the syndrome of bit i together
// with its left or right neighbour (h_(i-1)^h_i, h_i^h_(i+1)); the right neighbour
// of the last data bit is check bit 0. Both slices of an adjacent pair fire, so both
// bits are flipped. The extra syndrome bits are masked in the same way. The
// document applies the spare-column scheme to SEC-DAEC codes but draws only the
// SEC-DED slice; this extension of the slice is this design's.
//
// correctable_o is this design's addition: 1 when the active part of the syndrome
// names a correctable pattern, a data bit pattern (some slice fired) or check bits
// only (one active syndrome bit set, or with DAEC two adjacent active ones). The
// error-detection block uses it to tell corrected errors from uncorrectable ones.
//
// Interface: data_i, syndrome_i, spare_used_i in; data_o, correctable_o out.
// Purely combinational.
module ecc_correct
  import ecc_pkg::*;
#(
  parameter int     DATA_W  = 32,
  parameter int     CHECK_W = secded_check_bits(DATA_W),
  parameter int     SPARES  = 1,
  parameter bit     DAEC    = 1'b0,
  parameter h_mat_t H       = default_h(DATA_W, CHECK_W, SPARES, DAEC)
) (
  input  logic [DATA_W-1:0]         data_i,
  input  logic [CHECK_W+SPARES-1:0] syndrome_i,
  input  logic [SPARES-1:0]         spare_used_i,
  output logic [DATA_W-1:0]         data_o,
  output logic                      correctable_o
);

  localparam int ROWS = CHECK_W + SPARES;

  // Column of logical bit l (data bits, then check bits), restricted to the rows.
  function automatic logic [ROWS-1:0] col(input int l);
    if (l < DATA_W) return H[l][ROWS-1:0];
    return ROWS'(1) << (l - DATA_W);
  endfunction

  // One comparator: S equals v on every base row and on every extra row of a free spare.
  function automatic logic syn_eq(input logic [ROWS-1:0] s, input logic [ROWS-1:0] v,
                                  input logic [SPARES-1:0] used);
    logic eq;
    eq = 1'b1;
    for (int b = 0; b < CHECK_W; b++) eq = eq & ~(s[b] ^ v[b]);
    for (int j = 0; j < SPARES; j++)  eq = eq & (~(s[CHECK_W+j] ^ v[CHECK_W+j]) | used[j]);
    return eq;
  endfunction

  logic [DATA_W-1:0] hit;
  logic [ROWS-1:0]   active, active_syn;
  logic              check_only;

  always_comb begin
    for (int i = 0; i < DATA_W; i++) begin
      hit[i] = syn_eq(syndrome_i, col(i), spare_used_i);
      if (DAEC) begin
        if (i > 0) hit[i] = hit[i] | syn_eq(syndrome_i, col(i - 1) ^ col(i), spare_used_i);
        hit[i] = hit[i] | syn_eq(syndrome_i, col(i) ^ col(i + 1), spare_used_i);
      end
    end
    data_o = data_i ^ hit;
  end

  assign active     = {~spare_used_i, {CHECK_W{1'b1}}};
  assign active_syn = syndrome_i & active;

  always_comb begin
    check_only = ($countones(active_syn) == 1);
    if (DAEC)
      for (int b = 0; b < ROWS - 1; b++)
        if (active[b] && active[b+1] && active_syn == (ROWS'(3) << b)) check_only = 1'b1;
  end

  assign correctable_o = (|hit) | check_only;

endmodule
