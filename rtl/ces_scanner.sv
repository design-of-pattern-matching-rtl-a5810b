// ces_scanner: the complete CCR-based regexp scanner (CES) of one FPGA:
// packet controller plus the ROWS x COLS engine fabric.
//
// A rule set is loaded with configuration packets (character-class words and
// per-engine bounds/flags); string packets are then scanned at one symbol per
// clock (for ROWS <= 8) and answered with the packet header followed by one
// match vector per symbol, bit r set when the rule ending in row r matches
// at that symbol. The default size, rows of 25 linearly concatenated engines
// and eight rules answered in one byte per symbol, is the configuration of
// the document's live experiment; GROUP_W = 2 gives the two-way OR topology.
// Reconfiguration is purely by memory writes: the fabric never changes.
module ces_scanner
  import ces_pkg::*;
#(
  parameter int unsigned ROWS    = 8,
  parameter int unsigned COLS    = 25,
  parameter int unsigned GROUP_W = 1,
  parameter int unsigned N_ENG   = ROWS * COLS,
  parameter int unsigned N_BRAM  = (N_ENG + CC_WIDTH - 1) / CC_WIDTH,
  parameter int unsigned IDX_W   = $clog2(N_ENG + 1),
  parameter int unsigned BSEL_W  = $clog2(N_BRAM + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  input  logic       in_last,
  input  pkt_kind_e  in_kind,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_last,
  output logic       busy
);

  logic                cfg_we, cc_we, clear, sym_valid, match_valid;
  logic [IDX_W-1:0]    cfg_idx;
  ccr_cfg_t            cfg_data;
  logic [BSEL_W-1:0]   cc_bram;
  logic [7:0]          cc_sym, sym;
  logic [CC_WIDTH-1:0] cc_word;
  logic [ROWS-1:0]     match;

  ces_controller #(.ROWS(ROWS), .IDX_W(IDX_W), .BSEL_W(BSEL_W)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_last, .in_kind,
    .out_valid, .out_data, .out_last,
    .cfg_we, .cfg_idx, .cfg_data, .cc_we, .cc_bram, .cc_sym, .cc_word,
    .clear, .sym_valid, .sym, .match_valid, .match, .busy
  );

  ces_array #(.ROWS(ROWS), .COLS(COLS), .GROUP_W(GROUP_W)) u_array (
    .clk, .rst_n, .clear,
    .cfg_we, .cfg_idx, .cfg_data, .cc_we, .cc_bram, .cc_sym, .cc_word,
    .sym_valid, .sym, .match_valid, .match
  );

endmodule
