// accr_engine: one ACCR engine of the melody matching engine, computing the
// elastic matching (substitution-only edit distance) for a term p{1,4}.
//
// Sub-state j (j = 1..4) holds ed_j, the least cost of aligning the query up
// to this term with a substring of the database that ends at the current
// frame and spends exactly j frames in this term. Per frame c:
//   ed_1 <- ed_0 + |c - p|,   ed_j <- ed_(j-1) + |c - p|  (j = 2..4)
// where ed_0 is what the predecessor passed on: the minimum of its four
// sub-states after the previous frame. All four sub-states qualify ({1,4}),
// so curr_min = min(ed_1..ed_4) is computed by a comparator tree in the same
// cycle and handed to the successor, and overall_min keeps the smallest
// curr_min seen since the string began. The first engine (i = 1) uses a
// constant ed_0 = 0, which lets a match start at any frame (overlapped
// matching). A newline frame restarts all registers at SYS_MAX.
//
// Interface: the parameters p, i, n are written through cfg_we/cfg.
// to_succ is the combinational next-cycle curr_min (the successor's ed_0
// input register latches it); result is the registered value this engine
// reports: overall_min when i == n, else curr_min (the output multiplexer
// of the engine). Adders saturate at SYS_MAX. The structure (ed_0..ed_4
// registers, subtractor, four adders, MIN tree, curr_min and overall_min
// registers, i == n selection) follows the document; the newline reset is
// as described there, the saturation and the ed_0 input timing are this
// design's own choices.
module accr_engine
  import mme_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  accr_param_t cfg,
  input  logic        sym_valid,
  input  logic [7:0]  sym,
  input  ed_t         ed0_in,     // predecessor's curr_min (next-cycle value)
  output ed_t         to_succ,
  output ed_t         result,
  output accr_param_t param
);

  accr_param_t par_q;
  ed_t         ed0_q;
  ed_t         ed_q [1:4];
  ed_t         ed_d [1:4];
  ed_t         curr_min_q, overall_min_q, curr_min_d, overall_min_d;
  logic [7:0]  cost;
  logic        restart;
  ed_t         ed0_eff;

  assign restart = sym_valid && (sym == DELIM);
  assign cost    = (sym > par_q.p) ? sym - par_q.p : par_q.p - sym;
  assign ed0_eff = (par_q.idx == IDX_W'(1)) ? '0 : ed0_q;

  always_comb begin
    ed_d[1] = ed_add(ed0_eff, cost);
    for (int j = 2; j <= 4; j++) ed_d[j] = ed_add(ed_q[j-1], cost);
    curr_min_d    = ed_min(ed_min(ed_d[1], ed_d[2]), ed_min(ed_d[3], ed_d[4]));
    overall_min_d = ed_min(overall_min_q, curr_min_d);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      par_q <= '0;
    end else if (cfg_we) begin
      par_q <= cfg;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      ed0_q         <= SYS_MAX;
      for (int j = 1; j <= 4; j++) ed_q[j] <= SYS_MAX;
      curr_min_q    <= SYS_MAX;
      overall_min_q <= SYS_MAX;
    end else if (sym_valid) begin
      ed0_q         <= ed0_in;
      for (int j = 1; j <= 4; j++) ed_q[j] <= ed_d[j];
      curr_min_q    <= curr_min_d;
      overall_min_q <= overall_min_d;
    end
  end

  assign to_succ = restart ? SYS_MAX : (sym_valid ? curr_min_d : curr_min_q);
  assign result  = (par_q.idx == par_q.n) ? overall_min_q : curr_min_q;
  assign param   = par_q;

endmodule
