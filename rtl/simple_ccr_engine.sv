// simple_ccr_engine: reduced CCR engine for the terms that need no counter,
// a character class that appears once ({1,1}) or carries a wildcard
// quantifier ('+', '*', '?').
//
// One state bit says "the rule, up to and including this term, has matched
// the input up to the current symbol". Per symbol (sym_valid):
//   ONE  : state <= as_in & acc
//   PLUS : state <= (as_in | state) & acc
//   OPT  : state <= as_in & acc,            and the term may be skipped
//   STAR : state <= (as_in | state) & acc,  and the term may be skipped
// as_in has the same meaning and timing as for the full CCR engine: the
// predecessor's activation for the current symbol. as_out is the state bit,
// ORed with as_in for the skippable quantifiers so that a skipped term hands
// the predecessor's activation straight on. A start engine (first term of a
// rule) sees a permanent activation. The document states only that such a
// lighter engine exists for these terms and what it costs (a handful of
// registers and LUTs); the one-bit NFA-style state and the mode encoding are
// this design's own. It uses the same class-memory accept bit (acc) and can
// replace a ccr_engine wherever a term has one of these four forms.
//
// hold_out (the term took the current symbol) serves a full CCR engine that
// follows, for its CR-2 rule, exactly like a full engine's hold_out.
//
// Timing: state changes at the clock edge when sym_valid is high; as_out of
// a non-skippable term depends only on the register. clear restarts the
// engine; rst_n is a synchronous active-low reset.
module simple_ccr_engine
  import ces_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  scc_mode_e mode,
  input  logic    start,
  input  logic    sym_valid,
  input  logic    acc,
  input  logic    as_in,
  output logic    as_out,
  output logic    hold_out
);

  logic state_q, state_d, act, loop_en, skip_en;

  always_comb begin
    act      = as_in || start;
    loop_en  = (mode == SCC_PLUS) || (mode == SCC_STAR);
    skip_en  = (mode == SCC_OPT)  || (mode == SCC_STAR);
    state_d  = (act || (loop_en && state_q)) && acc;
    as_out   = state_q || (skip_en && act);
    hold_out = sym_valid && state_d;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear)  state_q <= 1'b0;
    else if (sym_valid)   state_q <= state_d;
  end

endmodule
