// spare_write_mux: write-side column shift MUXes of the spare-column ECC memory.
//
// Physical column p receives logical bit p - wshift_i[p]. With no repair every
// column takes its own bit and the spare columns take the extra check bits. When a
// column is flagged, every column right of it takes its left neighbour's bit, the
// flagged column is skipped, and the rightmost spare takes the last base check bit
// in place of an extra check bit, which is then simply not stored. With one spare
// every MUX is 2:1, as in the document's block diagram.
//
// Interface: word_i is the logical stream {extra check, base check, data} with data
// bit 0 at bit 0; phys_o goes to the array. Purely combinational.
module spare_write_mux #(
  parameter int N      = 40,  // physical columns, spares included
  parameter int SPARES = 1,
  parameter int SW     = $clog2(SPARES + 1)
) (
  input  logic [N-1:0]         word_i,
  input  logic [N-1:0][SW-1:0] wshift_i,
  output logic [N-1:0]         phys_o
);

  always_comb begin
    for (int p = 0; p < N; p++) begin
      phys_o[p] = 1'b0;
      for (int s = 0; s <= SPARES; s++)
        if (int'(wshift_i[p]) == s && p >= s) phys_o[p] = word_i[p - s];
    end
  end

endmodule
