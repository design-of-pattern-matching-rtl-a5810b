// tb_ces_controller: self-checking test of the CES packet front end on its
// own, with a stand-in for the engine array.
//
// The controller is built for 12 rows, so every match vector takes two
// output bytes. The stand-in array answers every symbol two cycles later
// with match = {sym[3:0], sym}, which lets the test predict each output
// byte. Checked: configuration packets turn OP_CC_WORD and OP_ENGINE
// records into the right class-memory and engine-register writes and
// produce no output; a string packet pulses clear before its first symbol,
// echoes the header, returns two bytes per symbol least significant first
// and marks the final byte with out_last; symbols are accepted no faster
// than one per two cycles; busy falls once the answer has left. Bytes are
// offered with random gaps.
module tb_ces_controller;
  import ces_pkg::*;

  localparam int unsigned ROWS   = 12;
  localparam int unsigned IDX_W  = 8;
  localparam int unsigned BSEL_W = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  logic [7:0] in_data = '0;
  logic in_last = 1'b0;
  pkt_kind_e in_kind = PKT_STRING;
  logic out_valid, out_last;
  logic [7:0] out_data;
  logic cfg_we, cc_we, clear, sym_valid, busy;
  logic [IDX_W-1:0] cfg_idx;
  ccr_cfg_t cfg_data;
  logic [BSEL_W-1:0] cc_bram;
  logic [7:0] cc_sym, sym;
  logic [CC_WIDTH-1:0] cc_word;
  logic [1:0] mv_q = '0;
  logic [7:0] ms_q [2];
  logic match_valid;
  logic [ROWS-1:0] match;

  int checks = 0;
  int failures = 0;
  int n_clear = 0, n_sym = 0, last_sym_cycle = -10, cycle = 0;
  byte unsigned got_q [$];
  int lasts = 0;
  logic [IDX_W+$bits(ccr_cfg_t)-1:0] exp_cfg [$];
  logic [BSEL_W+8+CC_WIDTH-1:0] exp_cc [$];

  always #5 clk = ~clk;

  ces_controller #(.ROWS(ROWS), .IDX_W(IDX_W), .BSEL_W(BSEL_W)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last, .in_kind,
    .out_valid, .out_data, .out_last,
    .cfg_we, .cfg_idx, .cfg_data, .cc_we, .cc_bram, .cc_sym, .cc_word,
    .clear, .sym_valid, .sym, .match_valid, .match, .busy);

  // stand-in array: two cycles of latency
  always_ff @(posedge clk) begin
    mv_q  <= {mv_q[0], sym_valid};
    ms_q[0] <= sym;
    ms_q[1] <= ms_q[0];
  end
  assign match_valid = mv_q[1];
  assign match = {ms_q[1][3:0], ms_q[1]};

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    if (out_valid) begin
      got_q.push_back(out_data);
      if (out_last) lasts++;
    end
    if (clear) n_clear++;
    if (sym_valid) begin
      checks++;
      if (cycle - last_sym_cycle < 2) begin
        failures++;
        $display("FAIL symbols closer than two cycles");
      end
      last_sym_cycle = cycle;
      n_sym++;
    end
    if (cfg_we) begin
      if (exp_cfg.size() == 0) check("unexpected engine write", 1, 0);
      else check("engine write", {cfg_idx, cfg_data}, exp_cfg.pop_front());
    end
    if (cc_we) begin
      if (exp_cc.size() == 0) check("unexpected class write", 1, 0);
      else begin
        logic [BSEL_W+8+CC_WIDTH-1:0] e;
        e = exp_cc.pop_front();
        check("class write bram/symbol", {cc_bram, cc_sym}, e[CC_WIDTH +: BSEL_W+8]);
        check("class write word low", cc_word[63:0], e[63:0]);
        check("class write word high", cc_word[71:64], e[71:64]);
      end
    end
    cycle++;
  end

  task automatic send(pkt_kind_e kind, byte unsigned b [$]);
    foreach (b[i]) begin
      @(negedge clk);
      in_valid = 1'b1; in_data = b[i]; in_last = (i == b.size() - 1); in_kind = kind;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk) in_valid = 1'b0;
      if ($urandom_range(0, 2) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
  endtask

  initial begin
    byte unsigned p [$];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int round = 0; round < 4; round++) begin
      // configuration packet with random records
      p = '{8'hc0, 8'hff, 8'hee, 8'h01};
      for (int r = 0; r < 12; r++) begin
        if ($urandom_range(0, 1) == 0) begin
          logic [CC_WIDTH-1:0] w;
          logic [1:0] b;
          logic [7:0] s;
          for (int i = 0; i < CC_WIDTH; i++) w[i] = 1'($urandom);
          b = 2'($urandom); s = 8'($urandom);
          p.push_back(OP_CC_WORD); p.push_back(8'(b)); p.push_back(s);
          for (int i = 0; i < 9; i++) p.push_back(w[8*i +: 8]);
          exp_cc.push_back({b, s, w});
        end else begin
          ccr_cfg_t c;
          logic [7:0] idx;
          idx = 8'($urandom);
          c.b_lo = cnt_t'($urandom); c.b_hi = cnt_t'($urandom);
          c.enable = 4'($urandom); c.start = 1'($urandom); c.bypass = 1'($urandom);
          p.push_back(OP_ENGINE);
          p.push_back(8'h00); p.push_back(idx);
          p.push_back(8'(c.b_lo >> 8)); p.push_back(8'(c.b_lo));
          p.push_back(8'(c.b_hi >> 8)); p.push_back(8'(c.b_hi));
          p.push_back({c.enable, 2'b00, c.bypass, c.start});
          exp_cfg.push_back({idx, c});
        end
      end
      got_q.delete();
      send(PKT_CONFIG, p);
      repeat (10) @(posedge clk);
      check("configuration answered nothing", got_q.size(), 0);
      check("all engine writes seen", exp_cfg.size(), 0);
      check("all class writes seen", exp_cc.size(), 0);

      // string packet
      begin
        int n, n_before, clears_before, syms_before;
        n = $urandom_range(1, 40);
        p = '{8'(round), 8'h5a, 8'ha5, 8'h0f};
        for (int i = 0; i < n; i++) p.push_back(8'($urandom));
        n_before = lasts; clears_before = n_clear; syms_before = n_sym;
        got_q.delete();
        send(PKT_STRING, p);
        while (lasts == n_before) @(posedge clk);
        repeat (2) @(posedge clk);
        check("one clear per string packet", n_clear - clears_before, 1);
        check("symbols fed", n_sym - syms_before, n);
        check("answer length", got_q.size(), 4 + 2 * n);
        for (int i = 0; i < 4; i++) check("header echo", got_q[i], p[i]);
        for (int i = 0; i < n; i++) begin
          check("vector low byte", got_q[4 + 2*i], p[4 + i]);
          check("vector high byte", got_q[5 + 2*i], {4'h0, p[4 + i][3:0]});
        end
        check("busy falls", int'(busy), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
