// tb_pattern_matching_top: end-to-end test of both scanners at full size
// (no parameter overrides: 8 x 25 CCR engines, 3 MMEs of 100 ACCR engines,
// 8192-entry output buffer), with both running at the same time.
//
// CES: one configuration packet loads eight rules, one per row:
//   row 0  G E T                          (three single-symbol terms)
//   row 1  [0-9]{4,11}
//   row 2  [a-z0-9]{2,4}[-_a-z0-9]{3,4}[a-z0-9]{2,5}   (the document's R2)
//   row 3  [a-z]{2,3}[0-9]{1,2}[a-z]
//   row 4  25 single-symbol terms alternating [a-m] / [n-z] (all columns)
//   row 5  x[0-9]{2}y
//   row 6  [A-Z]{3}
//   row 7  -{2,4}_
// unused columns are bypassed. The document's live-experiment string and
// its false-positive string are sent first (answer 00 x8 then 04), then
// random strings whose answers are compared with an exact regexp model for
// every row but row 2 (for R2 the engine's answer is allowed to be a
// superset, which the document itself shows). In rows other than 2
// neighbouring terms have disjoint classes, where the MIN-MAX algorithm is
// exact.
// Melody: three query rounds of 3 pitch-shifted variants, the database
// streamed from a 13 ns memory clock, every result compared with the
// reference edit distance.
// At the end the testbench prints how often each mechanism was exercised
// and fails if any count is zero.
module tb_pattern_matching_top;
  import ces_pkg::*;
  import mme_pkg::*;
  import ema_ref_pkg::*;

  localparam int unsigned ROWS  = 8;
  localparam int unsigned COLS  = 25;
  localparam int unsigned T     = 100;
  localparam int unsigned N_MME = 3;
  localparam int unsigned AW    = $clog2(T + 1);
  localparam int unsigned SEL_W = $clog2(N_MME + 1);

  logic clk = 1'b0, mem_clk = 1'b0;
  logic rst_n = 1'b0, mem_rst_n = 1'b0;

  logic ces_in_valid = 1'b0, ces_in_ready, ces_in_last = 1'b0;
  logic [7:0] ces_in_data = '0;
  pkt_kind_e ces_in_kind = PKT_STRING;
  logic ces_out_valid, ces_out_last, ces_busy;
  logic [7:0] ces_out_data;

  logic mel_db_valid = 1'b0, mel_db_ready, mel_db_last = 1'b0;
  logic [7:0] mel_db_data = '0;
  logic mel_prm_we = 1'b0;
  logic [SEL_W-1:0] mel_prm_mme = '0;
  logic [AW-1:0] mel_prm_addr = '0;
  accr_param_t mel_prm_wdata = '0;
  logic mel_start = 1'b0, mel_busy, mel_done;
  logic [13:0] mel_songs;
  logic mel_res_re = 1'b0;
  logic [12:0] mel_res_raddr = '0;
  logic [N_MME*ED_W-1:0] mel_res_rdata;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;
  always #6.5 mem_clk = ~mem_clk;

  pattern_matching_top dut (
    .clk, .rst_n,
    .ces_in_valid, .ces_in_ready, .ces_in_data, .ces_in_last, .ces_in_kind,
    .ces_out_valid, .ces_out_data, .ces_out_last, .ces_busy,
    .mem_clk, .mem_rst_n,
    .mel_db_valid, .mel_db_ready, .mel_db_data, .mel_db_last,
    .mel_prm_we, .mel_prm_mme, .mel_prm_addr, .mel_prm_wdata,
    .mel_start, .mel_busy, .mel_done, .mel_songs,
    .mel_res_re, .mel_res_raddr, .mel_res_rdata);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- counters
  int n_cfg_records = 0, n_cc_words = 0, n_symbols = 0, n_strings = 0;
  int n_row_hits [ROWS];
  int n_prm_writes = 0, n_engine_loads = 0, n_db_words = 0, n_restarts = 0;
  int n_results = 0, n_done = 0, n_throttled = 0;
  logic done_q = 1'b0;

  always @(posedge clk) begin
    if (dut.u_ces.cfg_we) n_cfg_records++;
    if (dut.u_ces.cc_we) n_cc_words++;
    if (dut.u_ces.sym_valid) n_symbols++;
    if (ces_in_valid && !ces_in_ready) n_throttled++;
    if (mel_prm_we) n_prm_writes++;
    if (dut.u_mel.cfg_we) n_engine_loads++;
    if (dut.u_mel.fifo_rd && !dut.u_mel.fifo_empty) n_db_words++;
    if (dut.u_mel.sym_valid && dut.u_mel.sym == DELIM) n_restarts++;
    if (dut.u_mel.out_we) n_results++;
    if (mel_done && !done_q) n_done++;
    done_q <= mel_done;
  end

  // ---------------------------------------------------------------- CES side
  byte unsigned ces_got [$];
  int ces_lasts = 0;
  always @(posedge clk) if (ces_out_valid) begin
    ces_got.push_back(ces_out_data);
    if (ces_out_last) ces_lasts++;
  end

  typedef struct {
    int cls [COLS];
    int lo [COLS];
    int hi [COLS];
    int n;
  } rule_t;
  rule_t rules [ROWS];

  // class ids
  localparam int C_G = 0, C_E = 1, C_T = 2, C_DIG = 3, C_AN = 4, C_ANP = 5, C_LOW = 6,
                 C_AM = 7, C_NZ = 8, C_X = 9, C_Y = 10, C_CAP = 11, C_DASH = 12, C_US = 13;

  function automatic logic in_cls(int c, byte unsigned s);
    case (c)
      C_G:    return s == "G";
      C_E:    return s == "E";
      C_T:    return s == "T";
      C_DIG:  return s >= "0" && s <= "9";
      C_AN:   return (s >= "a" && s <= "z") || (s >= "0" && s <= "9");
      C_ANP:  return (s >= "a" && s <= "z") || (s >= "0" && s <= "9") || s == "-" || s == "_";
      C_LOW:  return s >= "a" && s <= "z";
      C_AM:   return s >= "a" && s <= "m";
      C_NZ:   return s >= "n" && s <= "z";
      C_X:    return s == "x";
      C_Y:    return s == "y";
      C_CAP:  return s >= "A" && s <= "Z";
      C_DASH: return s == "-";
      C_US:   return s == "_";
      default: return 1'b0;
    endcase
  endfunction

  function automatic void add_term(int r, int c, int lo, int hi);
    rules[r].cls[rules[r].n] = c;
    rules[r].lo[rules[r].n] = lo;
    rules[r].hi[rules[r].n] = hi;
    rules[r].n++;
  endfunction

  function automatic void build_rules();
    foreach (rules[r]) rules[r].n = 0;
    add_term(0, C_G, 1, 1); add_term(0, C_E, 1, 1); add_term(0, C_T, 1, 1);
    add_term(1, C_DIG, 4, 11);
    add_term(2, C_AN, 2, 4); add_term(2, C_ANP, 3, 4); add_term(2, C_AN, 2, 5);
    add_term(3, C_LOW, 2, 3); add_term(3, C_DIG, 1, 2); add_term(3, C_LOW, 1, 1);
    for (int c = 0; c < COLS; c++) add_term(4, (c % 2 == 0) ? C_AM : C_NZ, 1, 1);
    add_term(5, C_X, 1, 1); add_term(5, C_DIG, 2, 2); add_term(5, C_Y, 1, 1);
    add_term(6, C_CAP, 3, 3);
    add_term(7, C_DASH, 2, 4); add_term(7, C_US, 1, 1);
  endfunction

  // exact regexp model: per symbol, does a match of rule r end here?
  function automatic void ref_vectors(byte unsigned s [$], ref logic [ROWS-1:0] v [$]);
    v.delete();
    foreach (s[k]) v.push_back('0);
    for (int r = 0; r < ROWS; r++) begin
      logic st [COLS][12];
      foreach (st[i, c]) st[i][c] = 1'b0;
      foreach (s[k]) begin
        logic nx [COLS][12];
        foreach (nx[i, c]) nx[i][c] = 1'b0;
        if (in_cls(rules[r].cls[0], s[k])) nx[0][1] = 1'b1;
        for (int i = 0; i < rules[r].n; i++) for (int c = 1; c <= rules[r].hi[i]; c++) begin
          if (!st[i][c]) continue;
          if (c < rules[r].hi[i] && in_cls(rules[r].cls[i], s[k])) nx[i][c+1] = 1'b1;
          if (c >= rules[r].lo[i] && i + 1 < rules[r].n && in_cls(rules[r].cls[i+1], s[k]))
            nx[i+1][1] = 1'b1;
        end
        st = nx;
        for (int c = rules[r].lo[rules[r].n-1]; c <= rules[r].hi[rules[r].n-1]; c++)
          if (st[rules[r].n-1][c]) v[k][r] = 1'b1;
      end
    end
  endfunction

  task automatic ces_send(pkt_kind_e kind, byte unsigned b [$]);
    foreach (b[i]) begin
      @(negedge clk);
      ces_in_valid = 1'b1; ces_in_data = b[i]; ces_in_last = (i == b.size() - 1);
      ces_in_kind = kind;
      @(posedge clk);
      while (!ces_in_ready) @(posedge clk);
      @(negedge clk) ces_in_valid = 1'b0;
      if ($urandom_range(0, 4) == 0) @(negedge clk);
    end
  endtask

  task automatic ces_config();
    byte unsigned p [$];
    p = '{8'h00, 8'h00, 8'h00, 8'h01};
    for (int sv = 0; sv < 256; sv++) begin
      logic [3*CC_WIDTH-1:0] acc;
      acc = '0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < rules[r].n; c++) acc[r*COLS + c] = in_cls(rules[r].cls[c], 8'(sv));
      if (acc == '0) continue;
      for (int b = 0; b < 3; b++) begin
        p.push_back(OP_CC_WORD); p.push_back(8'(b)); p.push_back(8'(sv));
        for (int i = 0; i < 9; i++) p.push_back(acc[b*CC_WIDTH + 8*i +: 8]);
      end
    end
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      int e, lo, hi;
      logic byp;
      e = r * COLS + c;
      byp = (c >= rules[r].n);
      lo = byp ? 0 : rules[r].lo[c];
      hi = byp ? 0 : rules[r].hi[c];
      p.push_back(OP_ENGINE);
      p.push_back(8'(e >> 8)); p.push_back(8'(e));
      p.push_back(8'(lo >> 8)); p.push_back(8'(lo));
      p.push_back(8'(hi >> 8)); p.push_back(8'(hi));
      p.push_back({4'b0001, 2'b00, byp, c == 0});
    end
    ces_send(PKT_CONFIG, p);
  endtask

  // send one string packet, return the match vectors
  task automatic ces_string(byte unsigned hdr [4], byte unsigned s [$], ref logic [7:0] vec [$]);
    byte unsigned p [$];
    int n_before;
    n_before = ces_lasts;
    ces_got.delete();
    foreach (hdr[i]) p.push_back(hdr[i]);
    foreach (s[i]) p.push_back(s[i]);
    ces_send(PKT_STRING, p);
    while (ces_lasts == n_before) @(posedge clk);
    repeat (3) @(posedge clk);
    n_strings++;
    check("CES answer length", ces_got.size(), 4 + s.size());
    for (int i = 0; i < 4; i++) check("CES header echo", ces_got[i], hdr[i]);
    vec.delete();
    for (int i = 4; i < ces_got.size(); i++) vec.push_back(ces_got[i]);
  endtask

  task automatic ces_side();
    byte unsigned hdr [4];
    byte unsigned s [$];
    logic [7:0] vec [$];
    logic [ROWS-1:0] ref_v [$];
    string str;
    build_rules();
    ces_config();
    // the document's two example strings
    hdr = '{8'h01, 8'h23, 8'h45, 8'h67};
    str = "abc-1-_3d";
    s.delete(); foreach (str[i]) s.push_back(str[i]);
    ces_string(hdr, s, vec);
    for (int i = 0; i < vec.size(); i++) check("live experiment vector", vec[i], i == 8 ? 8'h04 : 8'h00);
    str = "ab_def_44";
    s.delete(); foreach (str[i]) s.push_back(str[i]);
    ces_string(hdr, s, vec);
    for (int i = 0; i < vec.size(); i++) check("false positive vector", vec[i], i == 8 ? 8'h04 : 8'h00);
    // two packets back to back: the second must wait for the first answer
    begin
      byte unsigned p [$];
      int n_before;
      n_before = ces_lasts;
      ces_got.delete();
      p = '{8'haa, 8'hbb, 8'hcc, 8'hdd, "G", "E", "T"};
      ces_send(PKT_STRING, p);
      p = '{8'h11, 8'h22, 8'h33, 8'h44, "1", "2", "3", "4", "5"};
      ces_send(PKT_STRING, p);
      while (ces_lasts < n_before + 2) @(posedge clk);
      repeat (3) @(posedge clk);
      n_strings += 2;
      check("back-to-back answers length", ces_got.size(), 16);
      if (ces_got.size() == 16) begin
        check("back-to-back first header", ces_got[0], 8'haa);
        check("back-to-back GET match (rows 0 and 6)", ces_got[6], 8'h41);
        check("back-to-back second header", ces_got[7], 8'h11);
        check("back-to-back digits", ces_got[14], 8'h02);
        check("back-to-back digits", ces_got[15], 8'h02);
      end
    end
    // random strings
    for (int t = 0; t < 12; t++) begin
      string alpha;
      int len;
      alpha = "GET0123456789abcmnoxyz-_AB  ";
      len = $urandom_range(20, 120);
      s.delete();
      if (t == 3) for (int i = 0; i < 27; i++) s.push_back((i % 2 == 0) ? 8'("a" + i % 13) : 8'("n" + i % 13));
      if (t % 4 == 1) begin
        str = "GET x42y ---_ ";
        foreach (str[i]) s.push_back(str[i]);
      end
      for (int i = 0; i < len; i++) s.push_back(alpha[$urandom_range(0, alpha.len() - 1)]);
      hdr = '{8'(t), 8'(len), 8'h00, 8'hff};
      ces_string(hdr, s, vec);
      ref_vectors(s, ref_v);
      foreach (vec[i]) begin
        for (int r = 0; r < ROWS; r++) begin
          if (vec[i][r]) n_row_hits[r]++;
          if (r == 2) begin
            if (ref_v[i][r]) check($sformatf("string %0d sym %0d R2 hit", t, i), vec[i][r], 1);
          end else begin
            check($sformatf("string %0d sym %0d row %0d", t, i, r), vec[i][r], ref_v[i][r]);
          end
        end
      end
    end
  endtask

  // ------------------------------------------------------------- melody side
  task automatic mel_side();
    int unsigned q [$];
    int unsigned v [$];
    byte unsigned s [$];
    byte unsigned db [$];
    int exp_d [$];
    for (int round = 0; round < 3; round++) begin
      int n, n_songs;
      n = (round == 0) ? T : $urandom_range(10, T);
      n_songs = $urandom_range(5, 12);
      q.delete();
      for (int i = 0; i < n; i++) q.push_back($urandom_range(55, 75));
      for (int m = 0; m < N_MME; m++) for (int k = 0; k < T; k++) begin
        @(negedge clk);
        mel_prm_we = 1'b1; mel_prm_mme = SEL_W'(m); mel_prm_addr = AW'(k);
        mel_prm_wdata = '{p: 8'(k < n ? q[k] + m - 1 : 0), idx: IDX_W'(k + 1), n: IDX_W'(n)};
      end
      @(negedge clk) mel_prm_we = 1'b0;
      db.delete();
      exp_d.delete();
      for (int sg = 0; sg < n_songs; sg++) begin
        int len;
        len = $urandom_range(0, 2 * n);
        s.delete();
        if (sg == 2) foreach (q[i]) s.push_back(8'(q[i]));
        else for (int f = 0; f < len; f++) s.push_back(8'($urandom_range(53, 77)));
        for (int m = 0; m < N_MME; m++) begin
          v.delete();
          foreach (q[i]) v.push_back(q[i] + m - 1);
          exp_d.push_back(ema_distance(v, s));
        end
        foreach (s[i]) db.push_back(s[i]);
        db.push_back(DELIM);
      end
      @(negedge clk) mel_start = 1'b1;
      @(negedge clk) mel_start = 1'b0;
      foreach (db[i]) begin
        @(negedge mem_clk);
        mel_db_valid = 1'b1; mel_db_data = db[i]; mel_db_last = (i == db.size() - 1);
        @(posedge mem_clk);
        while (!mel_db_ready) @(posedge mem_clk);
        @(negedge mem_clk) mel_db_valid = 1'b0;
      end
      mel_db_last = 1'b0;
      while (!mel_done) @(negedge clk);
      check("melody songs", int'(mel_songs), n_songs);
      for (int sg = 0; sg < n_songs; sg++) begin
        @(negedge clk);
        mel_res_re = 1'b1; mel_res_raddr = 13'(sg);
        @(negedge clk);
        mel_res_re = 1'b0;
        for (int m = 0; m < N_MME; m++)
          check($sformatf("melody round %0d string %0d variant %0d", round, sg, m),
                int'(mel_res_rdata[m*ED_W +: ED_W]), exp_d[sg * N_MME + m]);
      end
    end
  endtask

  task automatic need(string what, int count);
    $display("  %-34s %0d", what, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    foreach (n_row_hits[r]) n_row_hits[r] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    mem_rst_n = 1'b1;
    fork
      ces_side();
      mel_side();
    join
    $display("mechanisms exercised:");
    need("CES engine configuration writes", n_cfg_records);
    need("CES class-memory writes", n_cc_words);
    need("CES string packets", n_strings);
    need("CES symbols scanned", n_symbols);
    need("CES input held off (drain between packets)", n_throttled);
    for (int r = 0; r < ROWS; r++) need($sformatf("CES matches in row %0d", r), n_row_hits[r]);
    need("melody parameter-buffer writes", n_prm_writes);
    need("melody engine loads", n_engine_loads);
    need("melody frames through the FIFO", n_db_words);
    need("melody newline restarts", n_restarts);
    need("melody results written", n_results);
    need("melody rounds done", n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
