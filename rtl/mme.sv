// mme: melody matching engine, a chain of T identical ACCR engines.
//
// Every database frame is broadcast to all engines through one repeater
// register; engine k passes its curr_min to engine k+1 as that engine's
// ed_0, and engine 1 starts a new alignment at every frame. A query of n <= T
// terms occupies engines 1..n; the engines beyond n run but are ignored.
// The result multiplexer picks the reported value of engine n, i.e. its
// overall minimum: the edit distance between the query and the MIDI string
// read so far. Because the result is only needed once per string, the
// multiplexer is pipelined in two register stages (groups of MUX_GROUP
// engines, then the group), which is the timing fix the document describes.
//
// Timing: a frame given with sym_valid reaches the engines one cycle later.
// When a newline frame reaches them they restart; the result of the string
// it closes appears on result with result_valid two cycles after that.
// Parameters are written one engine at a time (cfg_we, cfg_addr = engine
// position 0..T-1). The default T = 100 is the document's MME size.
module mme
  import mme_pkg::*;
#(
  parameter int unsigned T         = 100,
  parameter int unsigned MUX_GROUP = 10,
  parameter int unsigned N_GROUP   = (T + MUX_GROUP - 1) / MUX_GROUP,
  parameter int unsigned AW        = $clog2(T + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [AW-1:0] cfg_addr,
  input  accr_param_t   cfg,
  input  logic          sym_valid,
  input  logic [7:0]    sym,
  output logic          result_valid,
  output ed_t           result
);

  // Broadcast repeater.
  logic       rep_valid;
  logic [7:0] rep_sym;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rep_valid <= 1'b0;
      rep_sym   <= '0;
    end else begin
      rep_valid <= sym_valid;
      rep_sym   <= sym;
    end
  end

  ed_t         chain [T+1];
  ed_t         res   [T];
  accr_param_t par   [T];
  assign chain[0] = '0;

  for (genvar k = 0; k < T; k++) begin : g_accr
    accr_engine u_accr (
      .clk, .rst_n,
      .cfg_we    (cfg_we && cfg_addr == AW'(k)),
      .cfg       (cfg),
      .sym_valid (rep_valid),
      .sym       (rep_sym),
      .ed0_in    (chain[k]),
      .to_succ   (chain[k+1]),
      .result    (res[k]),
      .param     (par[k])
    );
  end

  // Selection index: engine n sits at position n-1. Every engine holds n;
  // engine 0's copy drives the multiplexer.
  logic [IDX_W-1:0] sel;
  assign sel = (par[0].n == '0) ? '0 : par[0].n - 1'b1;

  // Two-stage pipelined multiplexer.
  ed_t  grp_q [N_GROUP];
  ed_t  res_q;
  logic [1:0] nl_q;

  always_ff @(posedge clk) begin
    for (int g = 0; g < N_GROUP; g++) begin
      grp_q[g] <= SYS_MAX;
      for (int m = 0; m < MUX_GROUP; m++)
        if (g * MUX_GROUP + m < T && 32'(sel) % MUX_GROUP == m)
          grp_q[g] <= res[g * MUX_GROUP + m];
    end
    res_q <= SYS_MAX;
    for (int g = 0; g < N_GROUP; g++)
      if (32'(sel) / MUX_GROUP == g) res_q <= grp_q[g];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) nl_q <= '0;
    else        nl_q <= {nl_q[0], rep_valid && rep_sym == DELIM};
  end

  // nl_q[0] rises with the restart edge, grp_q holds the pre-restart
  // values from that same edge, res_q one edge later.
  assign result_valid = nl_q[1];
  assign result       = res_q;

endmodule
