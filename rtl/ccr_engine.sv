// ccr_engine: one CCR engine of the CES regexp scanner, running the MIN-MAX
// algorithm for a term CC{bL,bU}.
//
// Two counters bound the feasibility zone of all match counts that the
// overlapping matching processes may have reached in this term: MAX is the
// longest and MIN the shortest run still open. Per symbol (sym_valid):
//   * the engine works on the symbol if it is a start engine, has an open
//     run (busy) or an activation (as_in) arrived for this symbol;
//   * MAX counts up on every acceptable symbol (CR-1) and wraps back to bL
//     when it would reach MAX_INT (CR-4);
//   * an activation restarts MIN at 0 (IR-3); a zero MIN becomes 1 only when
//     no predecessor can keep the symbol (CR-2), a non-zero MIN counts every
//     acceptable symbol (CR-3);
//   * an unacceptable symbol, or MIN above bU without a new activation,
//     ends every open run and clears both counters (IR-4). An activation
//     still sets the ACTIVE flag for that symbol (the polling state of the
//     state diagram), but it does not carry over: only the next activation
//     can start a new run.
// The activation output AS = busy & MAX >= bL & MIN <= bU (IR-2) is a
// function of the registers, so a successor sees it one cycle later, as the
// algorithm requires. A start engine (first term of a rule) is permanently
// active with MIN = 0 (IR-1). A bypass engine forwards as_in/hold_in
// combinationally and consumes nothing, so rules shorter than a row end at
// the row's last engine. ENABLE gates the activation towards each successor
// of the next column; the successor ORs what it receives.
//
// hold_out tells successors that this engine is active after the current
// symbol and accepts it, i.e. the matching tail may stay here; CR-2 uses it
// for "accepted by CC(i-1) with ACTIVE(i-1) = 1". With a fan-in of several
// predecessors the successor ORs their hold signals. These fan-in rules, the
// split of the document's ACTIVE flag into a visible flag (active) and the
// open-run flag (busy) that decides what happens on the next symbol, and
// the saturation of MIN at MAX_INT are this design's own reading of the
// algorithm; with them the engine reproduces the document's worked tables
// cell for cell.
//
// Timing: acc and hold_in belong to the symbol of the current cycle; state
// changes at the clock edge when sym_valid is high. clear restarts the
// engine (new string); rst_n is a synchronous active-low reset.
module ccr_engine
  import ces_pkg::*;
#(
  parameter int unsigned FANOUT = 1          // ENABLE bits used (<= MAX_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  ccr_cfg_t          cfg,
  input  logic              sym_valid,
  input  logic              acc,             // symbol accepted by this CC
  input  logic              as_in,           // OR of enabled predecessor activations
  input  logic              hold_in,         // OR of enabled predecessor hold signals
  output logic              as_out,          // AS of this engine (or forwarded in bypass)
  output logic              hold_out,
  output logic [FANOUT-1:0] fan_as,          // as_out gated by ENABLE
  output logic [FANOUT-1:0] fan_hold,        // hold_out gated by ENABLE
  output logic              active,          // ACTIVE flag
  output cnt_t              min_cnt,
  output cnt_t              max_cnt
);

  logic busy_q, busy_d, active_q, active_d;
  cnt_t min_q, min_d, max_q, max_d;
  logic act_eff, exceeded;
  cnt_t min_base, max_inc, min_inc;

  always_comb begin
    act_eff  = cfg.start || busy_q || as_in;
    min_base = (as_in || cfg.start) ? '0 : min_q;
    max_inc  = (max_q == MAX_INT - cnt_t'(1)) ? cfg.b_lo : max_q + cnt_t'(1);
    if (min_base != '0)
      min_inc = (min_base == MAX_INT) ? MAX_INT : min_base + cnt_t'(1);
    else
      min_inc = hold_in ? '0 : cnt_t'(1);
    if (cfg.start) min_inc = '0;
    exceeded = (min_inc > cfg.b_hi);

    busy_d   = busy_q;
    active_d = active_q;
    min_d    = min_q;
    max_d    = max_q;
    if (cfg.bypass) begin
      busy_d   = 1'b0;
      active_d = 1'b0;
      min_d    = '0;
      max_d    = '0;
    end else if (sym_valid) begin
      if (!act_eff) begin
        active_d = 1'b0;
      end else if (cfg.start) begin
        busy_d   = acc;
        active_d = 1'b1;
        min_d    = '0;
        max_d    = acc ? max_inc : '0;
      end else if (acc && (as_in || !exceeded)) begin
        busy_d   = 1'b1;
        active_d = 1'b1;
        min_d    = min_inc;
        max_d    = max_inc;
      end else begin
        // Rejected symbol, or MIN beyond bU: every open run ends here.
        // An activation keeps the ACTIVE flag (polling), but only the
        // next activation can start a new run.
        busy_d   = 1'b0;
        active_d = as_in;
        min_d    = '0;
        max_d    = '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      busy_q   <= 1'b0;
      active_q <= 1'b0;
      min_q    <= '0;
      max_q    <= '0;
    end else begin
      busy_q   <= busy_d;
      active_q <= active_d;
      min_q    <= min_d;
      max_q    <= max_d;
    end
  end

  always_comb begin
    if (cfg.bypass) begin
      as_out   = as_in;
      hold_out = hold_in;
    end else begin
      as_out   = (cfg.start || busy_q) && (max_q >= cfg.b_lo) && (min_q <= cfg.b_hi);
      hold_out = sym_valid && busy_d && acc;
    end
    fan_as   = {FANOUT{as_out}}   & cfg.enable[FANOUT-1:0];
    fan_hold = {FANOUT{hold_out}} & cfg.enable[FANOUT-1:0];
  end

  assign active  = cfg.start || active_q;
  assign min_cnt = min_q;
  assign max_cnt = max_q;

  initial assert (FANOUT >= 1 && FANOUT <= MAX_W)
    else $error("ccr_engine: FANOUT must be 1..%0d", MAX_W);

endmodule
