// tb_mme: self-checking test of the melody matching engine.
//
// A 14-engine MME (four engines per multiplexer group, so the last group is
// only partly filled) is loaded with random queries of 1..14 terms and fed
// random MIDI strings, each closed by a newline frame. Every result is
// compared with the segment-based reference in ema_ref_pkg, and the result
// must appear exactly three cycles after the newline is presented (one
// repeater stage plus the two multiplexer stages). Frames are given with
// occasional idle cycles in between. The very first newline only flushes the
// power-up state; its result is checked to be the "no match" value.
module tb_mme;
  import mme_pkg::*;
  import ema_ref_pkg::*;

  localparam int unsigned T  = 14;
  localparam int unsigned AW = $clog2(T + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [AW-1:0] cfg_addr = '0;
  accr_param_t cfg = '0;
  logic sym_valid = 1'b0;
  logic [7:0] sym = '0;
  logic result_valid;
  ed_t result;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int exp_q [$];
  int due_q [$];

  always #5 clk = ~clk;

  mme #(.T(T), .MUX_GROUP(4)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg, .sym_valid, .sym, .result_valid, .result);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    if (result_valid) begin
      if (exp_q.size() == 0) begin
        checks++; failures++;
        $display("FAIL unexpected result %0d", result);
      end else begin
        check("edit distance", int'(result), exp_q.pop_front());
        check("result latency", cycle, due_q.pop_front());
      end
    end
    cycle++;
  end

  task automatic send(byte unsigned b);
    @(negedge clk);
    sym_valid = 1'b1; sym = b;
    if (b == DELIM) due_q.push_back(cycle + 3);
    @(negedge clk);
    sym_valid = 1'b0;
    if ($urandom_range(0, 5) == 0) @(negedge clk);
  endtask

  initial begin
    int unsigned q [$];
    byte unsigned s [$];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int trial = 0; trial < 12; trial++) begin
      int n;
      n = $urandom_range(1, T);
      q.delete();
      for (int i = 0; i < n; i++) q.push_back($urandom_range(60, 72));
      for (int k = 0; k < T; k++) begin
        @(negedge clk);
        cfg_we = 1'b1; cfg_addr = AW'(k);
        cfg = '{p: 8'(k < n ? q[k] : 0), idx: IDX_W'(k + 1), n: IDX_W'(n)};
      end
      @(negedge clk) cfg_we = 1'b0;
      exp_q.push_back(int'(SYS_MAX));   // flush: nothing seen yet
      send(DELIM);
      for (int song = 0; song < 6; song++) begin
        int len;
        len = $urandom_range(0, 3 * n + 4);
        s.delete();
        for (int f = 0; f < len; f++) begin
          // mostly near the query, sometimes an exact copy
          if (song == 0 && f < n) s.push_back(8'(q[f]));
          else s.push_back(8'($urandom_range(58, 74)));
        end
        exp_q.push_back(ema_distance(q, s));
        foreach (s[f]) send(s[f]);
        send(DELIM);
      end
      repeat (6) @(negedge clk);
    end
    check("all results returned", exp_q.size(), 0);
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
