// tb_ces_scanner: packet-level test of the CES scanner at its default size
// (8 rows of 25 engines), reproducing the document's live experiment.
//
// A configuration packet loads eight one-row rules. Row 2 holds
//   R2 = [a-z0-9]{2,4} [-_a-z0-9]{3,4} [a-z0-9]{2,5}
// in engines 0..2 with every later engine of the row set to bypass; the
// other rows hold rules that the test strings never satisfy (a run of
// three capital letters). Then string packets are sent:
//   * header 01 23 45 67 + "abc-1-_3d": the answer must be the echoed
//     header, eight zero match vectors and 04 (R2 matches at the last
//     symbol), the output of the document's experiment figure;
//   * "ab_def_44": the false positive of the document's second table, again
//     04 on the last symbol only;
//   * "QRS" + "abc-1-_3d" again, checking that a capital run hits the
//     other rows and that the scanner is cleared between packets;
//   * a packet of random bytes compared against a software model of R2.
// Bytes are offered with random gaps on the input.
module tb_ces_scanner;
  import ces_pkg::*;

  localparam int unsigned ROWS = 8;
  localparam int unsigned COLS = 25;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  logic [7:0] in_data = '0;
  logic in_last = 1'b0;
  pkt_kind_e in_kind = PKT_STRING;
  logic out_valid, out_last, busy;
  logic [7:0] out_data;

  int checks = 0;
  int failures = 0;
  byte unsigned got_q [$];
  int lasts = 0;

  always #5 clk = ~clk;

  ces_scanner dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last, .in_kind,
    .out_valid, .out_data, .out_last, .busy);

  always @(posedge clk) if (out_valid) begin
    got_q.push_back(out_data);
    if (out_last) lasts++;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic send(pkt_kind_e kind, byte unsigned b [$]);
    foreach (b[i]) begin
      @(negedge clk);
      in_valid = 1'b1; in_data = b[i]; in_last = (i == b.size() - 1); in_kind = kind;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk) in_valid = 1'b0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask

  // class membership used by the rules
  function automatic logic is_an(byte unsigned c);
    return (c >= "a" && c <= "z") || (c >= "0" && c <= "9");
  endfunction
  function automatic logic is_cap(byte unsigned c);
    return c >= "A" && c <= "Z";
  endfunction

  // software model of R2: does some substring ending at position e match?
  function automatic logic r2_ends(byte unsigned s [$], int e);
    for (int l1 = 2; l1 <= 4; l1++) for (int l2 = 3; l2 <= 4; l2++) for (int l3 = 2; l3 <= 5; l3++) begin
      int b = e - (l1 + l2 + l3) + 1;
      logic ok = 1'b1;
      if (b < 0) continue;
      for (int i = 0; i < l1 + l2 + l3; i++) begin
        byte unsigned c = s[b + i];
        if (i < l1 || i >= l1 + l2) ok &= is_an(c);
        else ok &= is_an(c) || c == "-" || c == "_";
      end
      if (ok) return 1'b1;
    end
    return 1'b0;
  endfunction

  function automatic void add_engine(ref byte unsigned p [$], input int e, int lo, int hi,
                                     logic st, logic byp);
    p.push_back(OP_ENGINE);
    p.push_back(8'(e >> 8)); p.push_back(8'(e));
    p.push_back(8'(lo >> 8)); p.push_back(8'(lo));
    p.push_back(8'(hi >> 8)); p.push_back(8'(hi));
    p.push_back({4'b0001, 2'b00, byp, st});
  endfunction

  // expected answer for one string packet
  function automatic void expect_answer(ref byte unsigned exp [$], input byte unsigned hdr [4],
                                        byte unsigned s [$]);
    foreach (hdr[i]) exp.push_back(hdr[i]);
    foreach (s[k]) begin
      logic [7:0] v = '0;
      v[2] = r2_ends(s, k);
      if (k >= 2 && is_cap(s[k]) && is_cap(s[k-1]) && is_cap(s[k-2])) v = v | 8'hFB;
      exp.push_back(v);
    end
  endfunction

  task automatic run_string(string name, byte unsigned hdr [4], byte unsigned s [$],
                            byte unsigned expected [$]);
    byte unsigned p [$];
    int n_before = lasts;
    got_q.delete();
    foreach (hdr[i]) p.push_back(hdr[i]);
    foreach (s[i]) p.push_back(s[i]);
    send(PKT_STRING, p);
    while (lasts == n_before) @(posedge clk);
    repeat (3) @(posedge clk);
    check({name, ": answer length"}, got_q.size(), expected.size());
    foreach (expected[i])
      if (i < got_q.size()) check($sformatf("%s: byte %0d", name, i), got_q[i], expected[i]);
  endtask

  initial begin
    byte unsigned cfgp [$];
    byte unsigned s [$];
    byte unsigned exp [$];
    byte unsigned hdr [4];
    string str;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // configuration packet
    cfgp = '{8'h00, 8'h00, 8'h00, 8'h01};
    for (int sv = 0; sv < 256; sv++) begin
      logic [3*CC_WIDTH-1:0] acc = '0;
      for (int r = 0; r < ROWS; r++) begin
        if (r == 2) begin
          acc[r*COLS + 0] = is_an(8'(sv));
          acc[r*COLS + 1] = is_an(8'(sv)) || sv == "-" || sv == "_";
          acc[r*COLS + 2] = is_an(8'(sv));
        end else begin
          acc[r*COLS + 0] = is_cap(8'(sv));
        end
      end
      if (acc == '0) continue;
      for (int b = 0; b < 3; b++) begin
        cfgp.push_back(OP_CC_WORD); cfgp.push_back(8'(b)); cfgp.push_back(8'(sv));
        for (int i = 0; i < 9; i++) cfgp.push_back(acc[b*CC_WIDTH + 8*i +: 8]);
      end
    end
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        int e, lo, hi;
        e = r * int'(COLS) + c;
        lo = (c == 1) ? 3 : 2;
        hi = (c == 2) ? 5 : 4;
        if (r == 2 && c < 3)      add_engine(cfgp, e, lo, hi, c == 0, 1'b0);
        else if (r != 2 && c == 0) add_engine(cfgp, e, 3, 3, 1'b1, 1'b0);
        else                       add_engine(cfgp, e, 0, 0, 1'b0, 1'b1);
      end
    end
    send(PKT_CONFIG, cfgp);
    repeat (10) @(posedge clk);
    check("configuration produces no output", got_q.size(), 0);

    // the document's live experiment
    hdr = '{8'h01, 8'h23, 8'h45, 8'h67};
    str = "abc-1-_3d";
    s.delete(); foreach (str[i]) s.push_back(str[i]);
    exp = '{8'h01, 8'h23, 8'h45, 8'h67, 0, 0, 0, 0, 0, 0, 0, 0, 8'h04};
    run_string("figure", hdr, s, exp);

    str = "ab_def_44";
    s.delete(); foreach (str[i]) s.push_back(str[i]);
    exp = '{8'h01, 8'h23, 8'h45, 8'h67, 0, 0, 0, 0, 0, 0, 0, 0, 8'h04};
    run_string("false positive", hdr, s, exp);

    hdr = '{8'hde, 8'had, 8'hbe, 8'hef};
    str = "QRSabc-1-_3d";
    s.delete(); foreach (str[i]) s.push_back(str[i]);
    exp.delete(); expect_answer(exp, hdr, s);
    run_string("capitals", hdr, s, exp);

    for (int t = 0; t < 3; t++) begin
      s.delete();
      for (int i = 0; i < 60; i++) begin
        int k;
        k = $urandom_range(0, 9);
        s.push_back(k < 6 ? 8'("a" + $urandom_range(0, 3)) : k < 7 ? 8'("-") : k < 8 ? 8'("_")
                    : k < 9 ? 8'("A") : 8'(" "));
      end
      hdr = '{8'(t), 8'h10, 8'h20, 8'h30};
      exp.delete(); expect_answer(exp, hdr, s);
      run_string($sformatf("random %0d", t), hdr, s, exp);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
