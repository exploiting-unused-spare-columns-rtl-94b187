// spare_read_mux: read-side column shift MUXes of the spare-column ECC memory.
//
// Logical bit l is taken from physical column l + rshift_i[l], which undoes the
// shift of the write side so that flagged columns are bypassed. Extra check bits
// whose spare was used for repair come out with no meaning; the syndrome logic
// masks them. With one spare every MUX is 2:1, as in the document's block diagram.
//
// Interface: phys_i from the array, word_o the logical stream, same layout as
// spare_write_mux's input. Purely combinational.
module spare_read_mux #(
  parameter int N      = 40,
  parameter int SPARES = 1,
  parameter int SW     = $clog2(SPARES + 1)
) (
  input  logic [N-1:0]         phys_i,
  input  logic [N-1:0][SW-1:0] rshift_i,
  output logic [N-1:0]         word_o
);

  always_comb begin
    for (int l = 0; l < N; l++) begin
      word_o[l] = 1'b0;
      for (int s = 0; s <= SPARES; s++)
        if (int'(rshift_i[l]) == s && l + s < N) word_o[l] = phys_i[l + s];
    end
  end

endmodule
