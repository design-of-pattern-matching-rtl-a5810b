// tb_accr_engine: three ACCR engines chained by hand (i = 1, 2, 3, n = 3)
// are fed random pitch frames; after every frame engine 3's result (its
// overall minimum) is compared with the segment-based reference distance of
// the frames seen so far, and engine 1's result (its curr_min, since
// i != n) with the cheapest run of 1..4 frames ending at the current frame.
// A newline frame must restart everything.
module tb_accr_engine;
  import mme_pkg::*;
  import ema_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cfg_we = 1'b0;
  accr_param_t cfg0, cfg1, cfg2;
  logic sym_valid = 1'b0;
  logic [7:0] sym = 8'd0;
  ed_t c1, c2, c3, r1, r2, r3;
  accr_param_t q1, q2, q3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  accr_engine u1 (.clk, .rst_n, .cfg_we, .cfg(cfg0), .sym_valid, .sym,
                  .ed0_in(ed_t'(0)), .to_succ(c1), .result(r1), .param(q1));
  accr_engine u2 (.clk, .rst_n, .cfg_we, .cfg(cfg1), .sym_valid, .sym,
                  .ed0_in(c1), .to_succ(c2), .result(r2), .param(q2));
  accr_engine u3 (.clk, .rst_n, .cfg_we, .cfg(cfg2), .sym_valid, .sym,
                  .ed0_in(c2), .to_succ(c3), .result(r3), .param(q3));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int run_min(int unsigned p, byte unsigned s[$]);
    int best = 1 << 28, seg = 0;
    for (int len = 1; len <= 4 && len <= s.size(); len++) begin
      int c = int'(s[s.size() - len]);
      seg += (c > int'(p)) ? c - int'(p) : int'(p) - c;
      if (seg < best) best = seg;
    end
    return (best > 255) ? 255 : best;
  endfunction

  initial begin
    int unsigned q[$];
    byte unsigned s[$];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int trial = 0; trial < 6; trial++) begin
      q = {};
      for (int i = 0; i < 3; i++) q.push_back(55 + $urandom_range(0, 10));
      cfg0 = '{p: 8'(q[0]), idx: 8'd1, n: 8'd3};
      cfg1 = '{p: 8'(q[1]), idx: 8'd2, n: 8'd3};
      cfg2 = '{p: 8'(q[2]), idx: 8'd3, n: 8'd3};
      @(negedge clk) cfg_we = 1'b1;
      @(negedge clk) cfg_we = 1'b0;
      // newline: start a fresh string
      sym = DELIM; sym_valid = 1'b1;
      @(negedge clk) sym_valid = 1'b0;
      check("restart overall", int'(r3), 255);
      s = {};
      for (int k = 0; k < 30; k++) begin
        byte unsigned f;
        f = 8'(52 + $urandom_range(0, 16));
        // Occasionally copy the query so that small distances occur.
        if (trial % 2 == 0 && k >= 10 && k < 16) f = 8'(q[(k - 10) / 2]);
        s.push_back(f);
        sym = f; sym_valid = 1'b1;
        @(negedge clk) sym_valid = 1'b0;
        check($sformatf("t%0d f%0d overall_min", trial, k), int'(r3), ema_distance(q, s));
        check($sformatf("t%0d f%0d curr_min1", trial, k), int'(r1), run_min(q[0], s));
        // An idle cycle changes nothing.
        @(negedge clk);
        check($sformatf("t%0d f%0d hold", trial, k), int'(r3), ema_distance(q, s));
      end
      if (trial % 2 == 0)
        check($sformatf("t%0d exact copy found", trial), int'(r3), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
