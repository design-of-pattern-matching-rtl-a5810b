// tb_ces_array: CES fabric against an independent reference.
//
// Part 1, linear topology (4 rows x 6 columns): each row gets a random rule
// of 1..6 CCR terms, character classes drawn from {a,b,c,d} with adjacent
// classes disjoint (which keeps every rule free of collisions, so MIN-MAX is
// exact), lower bounds 1..3 and upper bounds up to 4 or unbounded; unused
// engines are set to bypass. Random strings over {a..e} are streamed
// back-to-back and every match vector is compared with a set-of-states
// automaton run in the testbench (all reachable (term, count) pairs).
// Odd columns only get {1,1} and {1,} terms so that a second array with
// those columns built from simple engines (SIMPLE_COLS) can share the same
// configuration and stimulus; its vectors are checked against the same model.
// Part 2, two-row OR topology (GROUP_W = 2): the rule a(bc|d)e laid out as in
// the document's example, with the shorter branch padded by a bypass engine;
// matches must appear exactly on the 'e' that completes abce or ade.
module tb_ces_array;
  import ces_pkg::*;

  localparam int R1 = 4, C1 = 6;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- DUT 1: linear ----------------
  logic cfg_we1 = 0, cc_we1 = 0, clear1 = 0, sv1 = 0;
  logic [$clog2(R1*C1+1)-1:0] idx1;
  ccr_cfg_t cd1;
  logic [1:0] bsel1;
  logic [7:0] ccs1, sym1;
  logic [CC_WIDTH-1:0] ccw1;
  logic mv1;
  logic [R1-1:0] m1;

  ces_array #(.ROWS(R1), .COLS(C1), .GROUP_W(1)) dut1 (
    .clk, .rst_n, .clear(clear1), .cfg_we(cfg_we1), .cfg_idx(idx1), .cfg_data(cd1),
    .cc_we(cc_we1), .cc_bram(bsel1), .cc_sym(ccs1), .cc_word(ccw1),
    .sym_valid(sv1), .sym(sym1), .match_valid(mv1), .match(m1));

  // Same array with the odd columns built from simple CCR engines; it gets
  // the same configuration and symbols and must give the same answers (odd
  // columns are then restricted to {1,1} and {1,} terms).
  logic mv3;
  logic [R1-1:0] m3;
  ces_array #(.ROWS(R1), .COLS(C1), .GROUP_W(1), .SIMPLE_COLS(6'b101010)) dut3 (
    .clk, .rst_n, .clear(clear1), .cfg_we(cfg_we1), .cfg_idx(idx1), .cfg_data(cd1),
    .cc_we(cc_we1), .cc_bram(bsel1), .cc_sym(ccs1), .cc_word(ccw1),
    .sym_valid(sv1), .sym(sym1), .match_valid(mv3), .match(m3));

  // Rule description used by the reference model.
  int          nterm [R1];
  logic [3:0]  cls   [R1][C1];     // subset of {a,b,c,d}
  int          blo   [R1][C1];
  int          bhi   [R1][C1];     // -1 = unbounded

  function automatic logic in_cls(logic [3:0] c, byte unsigned s);
    return (s >= "a" && s <= "d") ? c[s - "a"] : 1'b0;
  endfunction

  // Reference: reachable (term, count) states, count capped at 5.
  int st [R1][C1][6];
  function automatic logic ref_step(int r, byte unsigned s);
    int nx [C1][6];
    logic hit = 1'b0;
    for (int i = 0; i < C1; i++) for (int j = 0; j < 6; j++) nx[i][j] = 0;
    for (int i = 0; i < nterm[r]; i++) begin
      if (!in_cls(cls[r][i], s)) continue;
      // start or continue term i
      if (i == 0) nx[0][1] = 1;
      else for (int j = 0; j < 6; j++)
        if (st[r][i-1][j] && j >= blo[r][i-1]) nx[i][1] = 1;
      for (int j = 1; j < 6; j++)
        if (st[r][i][j] && (bhi[r][i] < 0 || j + 1 <= bhi[r][i]))
          nx[i][(j + 1 > 5) ? 5 : j + 1] = 1;
    end
    for (int i = 0; i < C1; i++) for (int j = 0; j < 6; j++) st[r][i][j] = nx[i][j];
    for (int j = 1; j < 6; j++)
      if (nx[nterm[r]-1][j] && j >= blo[r][nterm[r]-1] &&
          (bhi[r][nterm[r]-1] < 0 || j <= bhi[r][nterm[r]-1])) hit = 1'b1;
    return hit;
  endfunction

  task automatic config1();
    for (int r = 0; r < R1; r++) begin
      nterm[r] = $urandom_range(1, C1);
      for (int i = 0; i < C1; i++) begin
        if (i < nterm[r]) begin
          // never all four letters, so a disjoint successor class exists
          cls[r][i] = 4'($urandom_range(1, 14));
          if (i > 0) begin
            cls[r][i] &= ~cls[r][i-1];
            if (cls[r][i] == '0) cls[r][i] = ~cls[r][i-1];
            if (cls[r][i] == 4'hF) cls[r][i] = 4'h1;
          end
          blo[r][i] = $urandom_range(1, 3);
          bhi[r][i] = ($urandom_range(0, 3) == 0) ? -1 : blo[r][i] + $urandom_range(0, 4 - blo[r][i]);
          if (i % 2 == 1) begin
            blo[r][i] = 1;
            bhi[r][i] = ($urandom_range(0, 1) == 0) ? -1 : 1;
          end
        end else begin
          cls[r][i] = '0; blo[r][i] = 0; bhi[r][i] = 0;
        end
      end
    end
    // engine registers
    for (int r = 0; r < R1; r++) for (int i = 0; i < C1; i++) begin
      @(negedge clk);
      cfg_we1 = 1'b1;
      idx1 = $bits(idx1)'(r * C1 + i);
      cd1.b_lo   = cnt_t'(blo[r][i]);
      cd1.b_hi   = (bhi[r][i] < 0) ? MAX_INT : cnt_t'(bhi[r][i]);
      cd1.enable = 4'b0001;
      cd1.start  = (i == 0);
      cd1.bypass = (i >= nterm[r]);
    end
    @(negedge clk) cfg_we1 = 1'b0;
    // class words: symbol s, bit e
    for (int s = 0; s < 256; s++) begin
      @(negedge clk);
      cc_we1 = 1'b1; bsel1 = 2'd0; ccs1 = 8'(s);
      ccw1 = '0;
      for (int r = 0; r < R1; r++) for (int i = 0; i < C1; i++)
        ccw1[r * C1 + i] = (i < nterm[r]) && in_cls(cls[r][i], byte'(s));
    end
    @(negedge clk) cc_we1 = 1'b0;
  endtask

  logic [R1-1:0] exp_q1 [$];
  int n_match1 = 0;
  always @(posedge clk) if (mv1) begin
    logic [R1-1:0] e;
    if (exp_q1.size() == 0) begin
      failures++; $display("FAIL unexpected match vector");
    end else begin
      e = exp_q1.pop_front();
      checks++;
      if (m1 !== e) begin
        failures++;
        $display("FAIL linear match vector %b expected %b", m1, e);
      end
      if (m1 != '0) n_match1++;
      checks++;
      if (!mv3 || m3 !== e) begin
        failures++;
        $display("FAIL simple-column array vector %b expected %b", m3, e);
      end
    end
  end

  // ---------------- DUT 2: two-row OR topology ----------------
  logic cfg_we2 = 0, cc_we2 = 0, clear2 = 0, sv2 = 0;
  logic [$clog2(2*4+1)-1:0] idx2;
  ccr_cfg_t cd2;
  logic [1:0] bsel2;
  logic [7:0] ccs2, sym2;
  logic [CC_WIDTH-1:0] ccw2;
  logic mv2;
  logic [1:0] m2;

  ces_array #(.ROWS(2), .COLS(4), .GROUP_W(2)) dut2 (
    .clk, .rst_n, .clear(clear2), .cfg_we(cfg_we2), .cfg_idx(idx2), .cfg_data(cd2),
    .cc_we(cc_we2), .cc_bram(bsel2), .cc_sym(ccs2), .cc_word(ccw2),
    .sym_valid(sv2), .sym(sym2), .match_valid(mv2), .match(m2));

  // engine e = r*4 + c; class letter per engine (0 = none)
  byte unsigned letter2 [8] = '{"a", "b", "c", "e", 0, "d", 0, 0};
  int hits2 [$];
  int sym_no2 = 0;
  always @(posedge clk) if (mv2) begin
    if (m2[0]) hits2.push_back(sym_no2);
    sym_no2++;
  end

  task automatic write2(int e, int lo, int hi, logic [3:0] en, logic st, logic byp);
    @(negedge clk);
    cfg_we2 = 1'b1; idx2 = $bits(idx2)'(e);
    cd2 = '{b_lo: cnt_t'(lo), b_hi: cnt_t'(hi), enable: en, start: st, bypass: byp};
    @(negedge clk) cfg_we2 = 1'b0;
  endtask

  initial begin
    byte unsigned s;
    string str2;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Part 1
    for (int round = 0; round < 6; round++) begin
      config1();
      @(negedge clk) clear1 = 1'b1;
      @(negedge clk) clear1 = 1'b0;
      for (int r = 0; r < R1; r++) for (int i = 0; i < C1; i++) for (int j = 0; j < 6; j++) st[r][i][j] = 0;
      for (int k = 0; k < 200; k++) begin
        logic [R1-1:0] e;
        s = 8'("a" + $urandom_range(0, 4));
        for (int r = 0; r < R1; r++) e[r] = ref_step(r, s);
        exp_q1.push_back(e);
        sym1 = s; sv1 = 1'b1;
        @(negedge clk);
        if (k % 7 == 3) begin sv1 = 1'b0; @(negedge clk); end  // idle bubbles
      end
      sv1 = 1'b0;
      repeat (4) @(negedge clk);
    end
    check("linear: all vectors returned", exp_q1.size(), 0);
    checks++;
    if (n_match1 == 0) begin failures++; $display("FAIL no linear match ever"); end

    // Part 2: a ( b c | d ) e
    write2(0, 1, 1, 4'b0011, 1'b1, 1'b0);  // CCR11 a -> CCR12, CCR22
    write2(1, 1, 1, 4'b0001, 1'b0, 1'b0);  // CCR12 b -> CCR13
    write2(2, 1, 1, 4'b0001, 1'b0, 1'b0);  // CCR13 c -> CCR14
    write2(3, 1, 1, 4'b0000, 1'b0, 1'b0);  // CCR14 e (result)
    write2(4, 1, 1, 4'b0000, 1'b0, 1'b0);  // CCR21 unused
    write2(5, 1, 1, 4'b0010, 1'b0, 1'b0);  // CCR22 d -> CCR23 (enable bit j = row j of the group)
    write2(6, 0, 0, 4'b0001, 1'b0, 1'b1);  // CCR23 bypass -> CCR14
    write2(7, 1, 1, 4'b0000, 1'b0, 1'b0);  // CCR24 unused
    for (int sv = 0; sv < 256; sv++) begin
      @(negedge clk);
      cc_we2 = 1'b1; bsel2 = 2'd0; ccs2 = 8'(sv); ccw2 = '0;
      for (int e = 0; e < 8; e++) ccw2[e] = (letter2[e] != 0) && (letter2[e] == sv);
    end
    @(negedge clk) cc_we2 = 1'b0;
    @(negedge clk) clear2 = 1'b1;
    @(negedge clk) clear2 = 1'b0;
    str2 = "xabcexadeyabdeaace";
    for (int k = 0; k < str2.len(); k++) begin
      sym2 = str2[k]; sv2 = 1'b1;
      @(negedge clk);
    end
    sv2 = 1'b0;
    repeat (4) @(negedge clk);
    // 'e' completing abce is symbol 4, completing ade symbol 8; abde and aace do not match
    check("or: number of matches", hits2.size(), 2);
    if (hits2.size() == 2) begin
      check("or: abce at symbol 4", hits2[0], 4);
      check("or: ade at symbol 8", hits2[1], 8);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
