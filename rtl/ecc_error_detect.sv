// ecc_error_detect: error detection of the spare-column ECC memory.
//
// Error Detected is the OR of all syndrome bits, where each extra syndrome bit first
// passes a 2-input AND whose other input is the inverted "spare used for repair" of
// its spare: a spare taken for repair cannot raise an error. This is the one AND gate
// per spare that the document's scheme adds.
//
// err_uncorrectable_o is this design's addition: an error was detected but the
// correction logic found no correctable pattern for the syndrome (correctable_i),
// as for any double error of an SEC-DED code. A triple error that aliases with a
// single-bit syndrome is miscorrected and reported as detected but not
// uncorrectable; reducing how often that happens is the purpose of the extra check
// bits.
//
// Interface: syndrome_i, spare_used_i, correctable_i in; err_detected_o,
// err_uncorrectable_o out. Purely combinational.
module ecc_error_detect #(
  parameter int CHECK_W = 7,
  parameter int SPARES  = 1
) (
  input  logic [CHECK_W+SPARES-1:0] syndrome_i,
  input  logic [SPARES-1:0]         spare_used_i,
  input  logic                      correctable_i,
  output logic                      err_detected_o,
  output logic                      err_uncorrectable_o
);

  logic [SPARES-1:0] extra_active;

  assign extra_active        = syndrome_i[CHECK_W +: SPARES] & ~spare_used_i;
  assign err_detected_o      = (|syndrome_i[CHECK_W-1:0]) | (|extra_active);
  assign err_uncorrectable_o = err_detected_o & ~correctable_i;

endmodule
