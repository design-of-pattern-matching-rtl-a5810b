// ces_array: the CES scanner fabric, ROWS x COLS CCR engines plus the
// block RAMs that hold their character classes.
//
// Engine (r,c) has index e = r*COLS + c; its accept bit is bit e%72 of block
// RAM e/72, read with the input symbol as address. Rows are grouped in
// GROUP_W-row groups: engine (r,c) may activate every engine of its group in
// column c+1 through its ENABLE bits, and an engine ORs the activations it
// receives (fan-out / fan-in of Fig. 5 and Fig. 7). GROUP_W = 1 is the linear
// topology (rows of concatenated CCRs, one rule per row); GROUP_W = 2 the
// topology for rules with two-way ORs. Column 0 engines have no predecessor
// and start rules; unused engines are set to bypass so that each rule's
// result appears at the last engine of its row. match[r] is the activation
// output of engine (r, COLS-1).
//
// Pipeline: a symbol presented with sym_valid is looked up in the block RAMs
// at the next clock edge and updates the engines one edge later; match and
// match_valid then hold for the cycle after that edge (two cycles from input
// to result). Configuration writes (cfg_we for an engine's bounds and flags,
// cc_we for one 72-bit class word) are expected while no symbol is in
// flight. clear restarts all engines.
//
// Columns whose bit is set in SIMPLE_COLS use simple CCR engines (terms
// {1,1}, +, ?, *; the quantifier is read from the bounds) instead of full
// ones; the default builds every engine in full, as in the configuration the
// design was measured in.
//
// Lint notes: each column declares the same vectors (fas, fhold, as_o), but
// the last column's gated outputs have no successor and only the last
// column's as_o drives match, so those bits are left unread on purpose.
module ces_array
  import ces_pkg::*;
#(
  parameter int unsigned ROWS    = 8,
  parameter int unsigned COLS    = 25,
  parameter int unsigned GROUP_W = 1,
  parameter int unsigned N_ENG   = ROWS * COLS,
  parameter int unsigned N_BRAM  = (N_ENG + CC_WIDTH - 1) / CC_WIDTH,
  parameter int unsigned IDX_W   = $clog2(N_ENG + 1),
  parameter int unsigned BSEL_W  = $clog2(N_BRAM + 1),
  // bit c set: column c is built from simple CCR engines
  parameter logic [COLS-1:0] SIMPLE_COLS = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  // configuration
  input  logic                cfg_we,
  input  logic [IDX_W-1:0]    cfg_idx,
  input  ccr_cfg_t            cfg_data,
  input  logic                cc_we,
  input  logic [BSEL_W-1:0]   cc_bram,
  input  logic [7:0]          cc_sym,
  input  logic [CC_WIDTH-1:0] cc_word,
  // symbol stream
  input  logic                sym_valid,
  input  logic [7:0]          sym,
  output logic                match_valid,
  output logic [ROWS-1:0]     match
);

  ccr_cfg_t cfg_q [N_ENG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int e = 0; e < N_ENG; e++) cfg_q[e] <= '0;
    end else if (cfg_we && cfg_idx < IDX_W'(N_ENG)) begin
      cfg_q[cfg_idx] <= cfg_data;
    end
  end

  // Character matching: block RAM lookup, one cycle.
  logic [N_BRAM*CC_WIDTH-1:0] acc_all;
  logic                       sym_valid_q;

  for (genvar b = 0; b < N_BRAM; b++) begin : g_bram
    cc_bram #(.WIDTH(CC_WIDTH), .DEPTH(CC_DEPTH)) u_cc (
      .clk   (clk),
      .we    (cc_we && cc_bram == BSEL_W'(b)),
      .waddr (cc_sym),
      .wdata (cc_word),
      .re    (sym_valid),
      .raddr (sym),
      .rdata (acc_all[b*CC_WIDTH +: CC_WIDTH])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) sym_valid_q <= 1'b0;
    else        sym_valid_q <= sym_valid;
  end

  // Engine grid, column by column. Each column publishes the gated
  // activation and hold bits of all its engines; column c reads those of
  // column c-1.
  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic [ROWS*GROUP_W-1:0] fas, fhold;
    logic [ROWS-1:0]         as_o;

    for (genvar r = 0; r < ROWS; r++) begin : g_row
      localparam int unsigned E    = r * COLS + c;
      localparam int unsigned BASE = (r / GROUP_W) * GROUP_W;
      logic as_in, hold_in;

      if (c == 0) begin : g_first
        assign as_in   = 1'b0;
        assign hold_in = 1'b0;
      end else begin : g_next
        always_comb begin
          as_in   = 1'b0;
          hold_in = 1'b0;
          for (int p = 0; p < GROUP_W; p++) begin
            if (BASE + p < ROWS) begin
              as_in   |= g_col[c-1].fas  [(BASE + p) * GROUP_W + (r - BASE)];
              hold_in |= g_col[c-1].fhold[(BASE + p) * GROUP_W + (r - BASE)];
            end
          end
        end
      end

      if (SIMPLE_COLS[c]) begin : g_simple
        // Simple engine: quantifier from the bounds, {1,1} one, {1,bU>1} +,
        // {0,1} ?, {0,bU>1} *; bypass and ENABLE handled here.
        scc_mode_e mode;
        logic      s_as, s_hold, as_eff, hold_eff;
        always_comb begin
          if (cfg_q[E].b_lo == '0) mode = (cfg_q[E].b_hi == cnt_t'(1)) ? SCC_OPT : SCC_STAR;
          else                     mode = (cfg_q[E].b_hi == cnt_t'(1)) ? SCC_ONE : SCC_PLUS;
          as_eff   = cfg_q[E].bypass ? as_in   : s_as;
          hold_eff = cfg_q[E].bypass ? hold_in : s_hold;
        end
        simple_ccr_engine u_scc (
          .clk       (clk),
          .rst_n     (rst_n),
          .clear     (clear || cfg_q[E].bypass),
          .mode      (mode),
          .start     (cfg_q[E].start),
          .sym_valid (sym_valid_q),
          .acc       (acc_all[E]),
          .as_in     (as_in),
          .as_out    (s_as),
          .hold_out  (s_hold)
        );
        assign as_o[r] = as_eff;
        assign fas  [r*GROUP_W +: GROUP_W] = {GROUP_W{as_eff}}   & cfg_q[E].enable[GROUP_W-1:0];
        assign fhold[r*GROUP_W +: GROUP_W] = {GROUP_W{hold_eff}} & cfg_q[E].enable[GROUP_W-1:0];
      end else begin : g_full
        logic unused_active, unused_hold;
        cnt_t unused_min, unused_max;
        ccr_engine #(.FANOUT(GROUP_W)) u_ccr (
          .clk       (clk),
          .rst_n     (rst_n),
          .clear     (clear),
          .cfg       (cfg_q[E]),
          .sym_valid (sym_valid_q),
          .acc       (acc_all[E]),
          .as_in     (as_in),
          .hold_in   (hold_in),
          .as_out    (as_o[r]),
          .hold_out  (unused_hold),
          .fan_as    (fas  [r*GROUP_W +: GROUP_W]),
          .fan_hold  (fhold[r*GROUP_W +: GROUP_W]),
          .active    (unused_active),
          .min_cnt   (unused_min),
          .max_cnt   (unused_max)
        );
      end
    end
  end

  assign match = g_col[COLS-1].as_o;

  always_ff @(posedge clk) begin
    if (!rst_n) match_valid <= 1'b0;
    else        match_valid <= sym_valid_q;
  end

endmodule
