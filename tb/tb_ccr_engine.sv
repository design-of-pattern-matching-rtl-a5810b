// tb_ccr_engine: three CCR engines chained by hand as
//   R2 = [a-z0-9]{2,4} [-_a-z0-9]{3,4} [a-z0-9]{2,5}
// and fed the strings "abc-1-_3d" (a true match at symbol 9) and
// "ab_def_44" (the collision case, which MIN-MAX reports as a match at
// symbol 9 because MIN2 is restarted by an overlapping burst). After each
// symbol the ACTIVE, MIN, MAX and activation values are compared with the
// worked tables of the MIN-MAX algorithm, written out below by hand.
module tb_ccr_engine;
  import ces_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic sym_valid = 1'b0;
  logic [7:0] ch = 8'h00;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  function automatic logic in_cc1(logic [7:0] c);
    return (c >= "a" && c <= "z") || (c >= "0" && c <= "9");
  endfunction
  function automatic logic in_cc2(logic [7:0] c);
    return in_cc1(c) || c == "-" || c == "_";
  endfunction

  ccr_cfg_t cfg1, cfg2, cfg3;
  logic as1, as2, as3, h1, h2, h3;
  logic [0:0] f_as1, f_as2, f_as3, f_h1, f_h2, f_h3;
  logic act1, act2, act3;
  cnt_t mn1, mn2, mn3, mx1, mx2, mx3;

  initial begin
    cfg1 = '{b_lo: 11'd2, b_hi: 11'd4, enable: 4'b0001, start: 1'b1, bypass: 1'b0};
    cfg2 = '{b_lo: 11'd3, b_hi: 11'd4, enable: 4'b0001, start: 1'b0, bypass: 1'b0};
    cfg3 = '{b_lo: 11'd2, b_hi: 11'd5, enable: 4'b0001, start: 1'b0, bypass: 1'b0};
  end

  ccr_engine u1 (.clk, .rst_n, .clear, .cfg(cfg1), .sym_valid, .acc(in_cc1(ch)),
                 .as_in(1'b0), .hold_in(1'b0), .as_out(as1), .hold_out(h1),
                 .fan_as(f_as1), .fan_hold(f_h1), .active(act1), .min_cnt(mn1), .max_cnt(mx1));
  ccr_engine u2 (.clk, .rst_n, .clear, .cfg(cfg2), .sym_valid, .acc(in_cc2(ch)),
                 .as_in(f_as1[0]), .hold_in(f_h1[0]), .as_out(as2), .hold_out(h2),
                 .fan_as(f_as2), .fan_hold(f_h2), .active(act2), .min_cnt(mn2), .max_cnt(mx2));
  ccr_engine u3 (.clk, .rst_n, .clear, .cfg(cfg3), .sym_valid, .acc(in_cc1(ch)),
                 .as_in(f_as2[0]), .hold_in(f_h2[0]), .as_out(as3), .hold_out(h3),
                 .fan_as(f_as3), .fan_hold(f_h3), .active(act3), .min_cnt(mn3), .max_cnt(mx3));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Expected values after each of the nine symbols.
  typedef int row_t [9];
  task automatic run(string s, row_t mx1_e, row_t act2_e, row_t mn2_e, row_t mx2_e,
                     row_t act3_e, row_t mn3_e, row_t mx3_e, row_t as1_e, row_t as2_e,
                     row_t as3_e);
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    for (int k = 0; k < 9; k++) begin
      ch = s[k];
      sym_valid = 1'b1;
      @(posedge clk);
      #1;
      check($sformatf("%s[%0d] MAX1", s, k+1), int'(mx1), mx1_e[k]);
      check($sformatf("%s[%0d] MIN1", s, k+1), int'(mn1), 0);
      check($sformatf("%s[%0d] ACTIVE2", s, k+1), int'(act2), act2_e[k]);
      check($sformatf("%s[%0d] MIN2", s, k+1), int'(mn2), mn2_e[k]);
      check($sformatf("%s[%0d] MAX2", s, k+1), int'(mx2), mx2_e[k]);
      check($sformatf("%s[%0d] ACTIVE3", s, k+1), int'(act3), act3_e[k]);
      check($sformatf("%s[%0d] MIN3", s, k+1), int'(mn3), mn3_e[k]);
      check($sformatf("%s[%0d] MAX3", s, k+1), int'(mx3), mx3_e[k]);
      check($sformatf("%s[%0d] AS1", s, k+1), int'(as1), as1_e[k]);
      check($sformatf("%s[%0d] AS2", s, k+1), int'(as2), as2_e[k]);
      check($sformatf("%s[%0d] AS3", s, k+1), int'(as3), as3_e[k]);
      @(negedge clk);
      sym_valid = 1'b0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run("abc-1-_3d",
        '{1,2,3,0,1,0,0,1,2},
        '{0,0,1,1,1,1,1,0,0}, '{0,0,0,1,2,3,4,0,0}, '{0,0,1,2,3,4,5,0,0},
        '{0,0,0,0,0,1,1,1,1}, '{0,0,0,0,0,0,0,1,2}, '{0,0,0,0,0,0,0,1,2},
        '{0,1,1,0,0,0,0,0,1}, '{0,0,0,0,1,1,1,0,0}, '{0,0,0,0,0,0,0,0,1});
    run("ab_def_44",
        '{1,2,0,1,2,3,0,1,2},
        '{0,0,1,1,1,1,1,1,1}, '{0,0,1,2,3,0,1,2,3}, '{0,0,1,2,3,4,5,6,7},
        '{0,0,0,0,0,1,1,1,1}, '{0,0,0,0,0,0,0,0,0}, '{0,0,0,0,0,1,0,1,2},
        '{0,1,0,0,1,1,0,0,1}, '{0,0,0,0,1,1,1,1,1}, '{0,0,0,0,0,0,0,0,1});
    // Idle symbols (sym_valid low) must not change anything.
    repeat (3) @(posedge clk);
    #1 check("hold MAX2", int'(mx2), 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
