// spare_repair_ctrl: column repair control of the spare-column ECC memory.
//
// Input is the outcome of memory test and repair: one flag per physical column,
// set for each column that is defective and must be bypassed (a spare column may
// be flagged too). Repair is by shifting: the logical bit stream (data bits, base
// check bits, then one extra check bit per spare) is laid over the non-defective
// physical columns from left to right. With d flagged columns the stream is pushed
// d places to the right and its last d bits, the extra check bits of the last
// spares, fall off the end. Hence:
//   wshift_o[p]   how far physical column p's write MUX reaches left, the number of
//                 flagged columns left of p (capped at SPARES);
//   rshift_o[l]   how far the read MUX of logical bit l reaches right (always 0 for
//                 the last logical bit, which can only sit in the last column: with
//                 one spare that is the plain wire from the spare column);
//   spare_used_o[j]  1 when spare j is "used for repair" in the document's sense: its
//                 extra check bit is not stored. True when d > SPARES-1-j, so a
//                 defective spare itself also counts, as the document requires.
// Extra check bit 0 (the first, most effective row of H) is the last to be lost.
// With one spare this reduces to the document's figure: every MUX is 2:1 and its
// select is "a flagged column lies to my left".
//
// The flag format and the shifting order for more than one spare are this design's
// choices; the document says only that the control logic is replicated per spare.
// More flags than spares cannot be repaired; the outputs are then meaningless.
// Purely combinational; the flags are static after repair.
module spare_repair_ctrl #(
  parameter int COLS   = 39,               // codeword columns without spares
  parameter int SPARES = 1,
  parameter int SW     = $clog2(SPARES + 1) // width of a shift select
) (
  input  logic [COLS+SPARES-1:0]         defect_i,
  output logic [COLS+SPARES-1:0][SW-1:0] wshift_o,
  output logic [COLS+SPARES-1:0][SW-1:0] rshift_o,
  output logic [SPARES-1:0]              spare_used_o
);

  localparam int N = COLS + SPARES;

  int cnt;

  always_comb begin
    cnt      = 0;
    wshift_o = '0;
    rshift_o = '0;
    for (int p = 0; p < N; p++) begin
      wshift_o[p] = SW'((cnt > SPARES) ? SPARES : cnt);
      if (!defect_i[p] && cnt <= SPARES && p >= cnt) rshift_o[p - cnt] = SW'(cnt);
      if (defect_i[p]) cnt = cnt + 1;
    end
    for (int j = 0; j < SPARES; j++) spare_used_o[j] = (cnt > SPARES - 1 - j);
  end

endmodule
