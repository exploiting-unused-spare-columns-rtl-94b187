// ecc_spare_mem: SEC-DED protected memory that stores extra check bits in the spare
// columns left unused by repair.
//
// Write path: the check bit generator produces CHECK_W base check bits and SPARES
// extra check bits; the logical word {extra, check, data} passes the write-side
// shift MUXes, which bypass repaired columns and let each free spare column hold an
// extra check bit, and is written to the array. Read path: the read-side shift MUXes
// restore the logical word, the syndrome generator forms the syndrome, the
// correction logic flips a data bit whose H column matches the syndrome and the
// error detection ORs the syndrome bits. Extra syndrome bits of spares used for
// repair are ignored in both, so with all spares used the memory behaves exactly
// like its base SEC-DED code, and with spares free more multi-bit errors are
// detected instead of miscorrected. DAEC = 1 selects the SEC-DAEC variant, which
// also corrects two adjacent bits; its extra check bits then reduce miscorrection
// of non-adjacent double errors.
//
// Interface: defect_i is the repair result, one flag per physical column (data,
// check, then spare columns), static in operation. A request is en_i with we_i=1
// (write wdata_i) or we_i=0 (read). A read answers one clock later with rvalid_o=1
// and rdata_o (corrected), err_detected_o and err_uncorrectable_o (detected but not
// correctable: not a single-bit error, nor with DAEC an adjacent pair).
// spare_used_o shows which extra check bits are in use (0) or dropped (1).
//
// The structure follows the document's block diagram; the array size, the port
// protocol, the one-cycle read, the flag format and the uncorrectable flag are this
// design's choices.
module ecc_spare_mem
  import ecc_pkg::*;
#(
  parameter int     DATA_W  = 32,
  parameter int     CHECK_W = secded_check_bits(DATA_W),
  parameter int     SPARES  = 1,
  parameter int     DEPTH   = 1024,
  parameter bit     DAEC    = 1'b0,
  parameter h_mat_t H       = default_h(DATA_W, CHECK_W, SPARES, DAEC),
  parameter int     AW      = $clog2(DEPTH),
  parameter int     N       = DATA_W + CHECK_W + SPARES  // physical columns
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      defect_i,
  input  logic              en_i,
  input  logic              we_i,
  input  logic [AW-1:0]     addr_i,
  input  logic [DATA_W-1:0] wdata_i,
  output logic              rvalid_o,
  output logic [DATA_W-1:0] rdata_o,
  output logic              err_detected_o,
  output logic              err_uncorrectable_o,
  output logic [SPARES-1:0] spare_used_o
);

  localparam int COLS = DATA_W + CHECK_W;
  localparam int ROWS = CHECK_W + SPARES;
  localparam int SW   = $clog2(SPARES + 1);

  logic [N-1:0][SW-1:0] wshift, rshift;
  logic [SPARES-1:0]    spare_used;
  logic [ROWS-1:0]      wcheck, syndrome;
  logic [N-1:0]         wword, wphys, rphys, rword;
  logic [DATA_W-1:0]    corr_data;
  logic                 correctable;

  spare_repair_ctrl #(.COLS(COLS), .SPARES(SPARES)) u_repair (
    .defect_i    (defect_i),
    .wshift_o    (wshift),
    .rshift_o    (rshift),
    .spare_used_o(spare_used)
  );

  ecc_check_gen #(.DATA_W(DATA_W), .CHECK_W(CHECK_W), .SPARES(SPARES), .H(H)) u_checkgen (
    .data_i (wdata_i),
    .check_o(wcheck)
  );

  // Logical word: data, base check bits, extra check bits (left to right in the diagram).
  assign wword = {wcheck, wdata_i};

  spare_write_mux #(.N(N), .SPARES(SPARES)) u_wmux (
    .word_i  (wword),
    .wshift_i(wshift),
    .phys_o  (wphys)
  );

  ecc_sram #(.DEPTH(DEPTH), .WIDTH(N)) u_sram (
    .clk    (clk),
    .en_i   (en_i),
    .we_i   (we_i),
    .addr_i (addr_i),
    .wdata_i(wphys),
    .rdata_o(rphys)
  );

  spare_read_mux #(.N(N), .SPARES(SPARES)) u_rmux (
    .phys_i  (rphys),
    .rshift_i(rshift),
    .word_o  (rword)
  );

  ecc_syndrome_gen #(.DATA_W(DATA_W), .CHECK_W(CHECK_W), .SPARES(SPARES), .H(H)) u_syngen (
    .data_i    (rword[DATA_W-1:0]),
    .check_i   (rword[N-1:DATA_W]),
    .syndrome_o(syndrome)
  );

  ecc_correct #(.DATA_W(DATA_W), .CHECK_W(CHECK_W), .SPARES(SPARES), .DAEC(DAEC), .H(H)) u_correct (
    .data_i      (rword[DATA_W-1:0]),
    .syndrome_i  (syndrome),
    .spare_used_i(spare_used),
    .data_o      (corr_data),
    .correctable_o(correctable)
  );

  ecc_error_detect #(.CHECK_W(CHECK_W), .SPARES(SPARES)) u_detect (
    .syndrome_i         (syndrome),
    .spare_used_i       (spare_used),
    .correctable_i      (correctable),
    .err_detected_o     (err_detected_o),
    .err_uncorrectable_o(err_uncorrectable_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid_o <= 1'b0;
    else        rvalid_o <= en_i & ~we_i;
  end

  assign rdata_o      = corr_data;
  assign spare_used_o = spare_used;

  // Repair must not flag more columns than there are spares.
  a_repairable: assert property (@(posedge clk) en_i |-> $countones(defect_i) <= SPARES)
    else $error("more columns flagged than spare columns");

endmodule
