// pattern_matching_top: the two reconfigurable pattern scanners side by side.
//
// * CES (ces_* ports): exact regexp matching of CCR-based rules with the
//   MIN-MAX algorithm, eight rules of up to 25 concatenated CCR terms,
//   scanned at one byte per clock; loaded and queried through a packet
//   stream (see ces_controller).
// * Melody scanner (mel_* ports): approximate matching of a hummed query,
//   three MMEs of 100 ACCR engines computing elastic edit distances against
//   a database of pitch strings that arrives in its own clock domain.
// The two share nothing but the main clock and reset; in the document they
// are separate systems, each the only design on its FPGA. The host link and
// the external memory with its controller are outside this RTL: their
// streams are the ports.
module pattern_matching_top
  import ces_pkg::*;
  import mme_pkg::*;
#(
  parameter int unsigned CES_ROWS    = 8,
  parameter int unsigned CES_COLS    = 25,
  parameter int unsigned CES_GROUP_W = 1,
  parameter int unsigned MEL_T       = 100,
  parameter int unsigned MEL_N_MME   = 3,
  parameter int unsigned MEL_OUT_AW  = 13,
  parameter int unsigned MEL_AW      = $clog2(MEL_T + 1),
  parameter int unsigned MEL_SEL_W   = $clog2(MEL_N_MME + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // CES host link
  input  logic                      ces_in_valid,
  output logic                      ces_in_ready,
  input  logic [7:0]                ces_in_data,
  input  logic                      ces_in_last,
  input  pkt_kind_e                 ces_in_kind,
  output logic                      ces_out_valid,
  output logic [7:0]                ces_out_data,
  output logic                      ces_out_last,
  output logic                      ces_busy,
  // melody scanner: database stream (memory clock domain)
  input  logic                      mem_clk,
  input  logic                      mem_rst_n,
  input  logic                      mel_db_valid,
  output logic                      mel_db_ready,
  input  logic [7:0]                mel_db_data,
  input  logic                      mel_db_last,
  // melody scanner: parameter buffer, control, output buffer
  input  logic                      mel_prm_we,
  input  logic [MEL_SEL_W-1:0]      mel_prm_mme,
  input  logic [MEL_AW-1:0]         mel_prm_addr,
  input  accr_param_t               mel_prm_wdata,
  input  logic                      mel_start,
  output logic                      mel_busy,
  output logic                      mel_done,
  output logic [MEL_OUT_AW:0]       mel_songs,
  input  logic                      mel_res_re,
  input  logic [MEL_OUT_AW-1:0]     mel_res_raddr,
  output logic [MEL_N_MME*ED_W-1:0] mel_res_rdata
);

  ces_scanner #(.ROWS(CES_ROWS), .COLS(CES_COLS), .GROUP_W(CES_GROUP_W)) u_ces (
    .clk, .rst_n,
    .in_valid (ces_in_valid), .in_ready (ces_in_ready), .in_data (ces_in_data),
    .in_last  (ces_in_last),  .in_kind  (ces_in_kind),
    .out_valid(ces_out_valid), .out_data(ces_out_data), .out_last(ces_out_last),
    .busy     (ces_busy)
  );

  melody_scanner #(.T(MEL_T), .N_MME(MEL_N_MME), .OUT_AW(MEL_OUT_AW)) u_mel (
    .clk, .rst_n, .mem_clk, .mem_rst_n,
    .db_valid (mel_db_valid), .db_ready (mel_db_ready), .db_data (mel_db_data),
    .db_last  (mel_db_last),
    .prm_we   (mel_prm_we), .prm_mme (mel_prm_mme), .prm_addr (mel_prm_addr),
    .prm_wdata(mel_prm_wdata),
    .start    (mel_start), .busy (mel_busy), .done (mel_done), .songs (mel_songs),
    .res_re   (mel_res_re), .res_raddr (mel_res_raddr), .res_rdata (mel_res_rdata)
  );

endmodule
