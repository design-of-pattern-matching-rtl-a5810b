// tb_melody_scanner: self-checking test of the query-by-humming scanner.
//
// A reduced instance (T = 10 engines per MME, three MMEs, 16-word FIFO,
// 32-entry output buffer) runs query rounds the way the host would: write
// three pitch-shifted variants of a random query (shifts -1, 0, +1) into the
// parameter buffers, pulse start, stream a database of random MIDI strings
// (each closed by a newline, db_last on the final newline) from a separate
// 13 ns memory clock with random gaps, wait for done and read back every
// output entry. Each of the three distances in an entry must equal the
// reference edit distance of that variant against that string, and songs
// must equal the number of strings. One string per round is an exact copy
// of the unshifted query, so the middle distance of that entry is 0.
module tb_melody_scanner;
  import mme_pkg::*;
  import ema_ref_pkg::*;

  localparam int unsigned T      = 10;
  localparam int unsigned N_MME  = 3;
  localparam int unsigned OUT_AW = 5;
  localparam int unsigned AW     = $clog2(T + 1);
  localparam int unsigned SEL_W  = $clog2(N_MME + 1);

  logic clk = 1'b0, mem_clk = 1'b0;
  logic rst_n = 1'b0, mem_rst_n = 1'b0;
  logic db_valid = 1'b0, db_ready, db_last = 1'b0;
  logic [7:0] db_data = '0;
  logic prm_we = 1'b0;
  logic [SEL_W-1:0] prm_mme = '0;
  logic [AW-1:0] prm_addr = '0;
  accr_param_t prm_wdata = '0;
  logic start = 1'b0, busy, done;
  logic [OUT_AW:0] songs;
  logic res_re = 1'b0;
  logic [OUT_AW-1:0] res_raddr = '0;
  logic [N_MME*ED_W-1:0] res_rdata;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;
  always #6.5 mem_clk = ~mem_clk;

  melody_scanner #(.T(T), .N_MME(N_MME), .FIFO_DEPTH(16), .OUT_AW(OUT_AW)) dut (
    .clk, .rst_n, .mem_clk, .mem_rst_n, .db_valid, .db_ready, .db_data, .db_last,
    .prm_we, .prm_mme, .prm_addr, .prm_wdata, .start, .busy, .done, .songs,
    .res_re, .res_raddr, .res_rdata);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  byte unsigned db [$];

  task automatic stream_db();
    foreach (db[i]) begin
      @(negedge mem_clk);
      db_valid = 1'b1; db_data = db[i]; db_last = (i == db.size() - 1);
      @(posedge mem_clk);
      while (!db_ready) @(posedge mem_clk);
      @(negedge mem_clk) db_valid = 1'b0;
      if ($urandom_range(0, 3) == 0) @(negedge mem_clk);
    end
    db_last = 1'b0;
  endtask

  initial begin
    int unsigned q [$];
    int unsigned v [$];
    byte unsigned s [$];
    int exp_d [$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    mem_rst_n = 1'b1;
    for (int round = 0; round < 3; round++) begin
      int n, n_songs;
      n = $urandom_range(2, T);
      n_songs = $urandom_range(3, 20);
      q.delete();
      for (int i = 0; i < n; i++) q.push_back($urandom_range(55, 75));
      // parameter buffers: variant m is the query shifted by m-1 semitones
      for (int m = 0; m < N_MME; m++) for (int k = 0; k < T; k++) begin
        @(negedge clk);
        prm_we = 1'b1; prm_mme = SEL_W'(m); prm_addr = AW'(k);
        prm_wdata = '{p: 8'(k < n ? q[k] + m - 1 : 0), idx: IDX_W'(k + 1), n: IDX_W'(n)};
      end
      @(negedge clk) prm_we = 1'b0;
      // database and expected distances
      db.delete();
      exp_d.delete();
      for (int sg = 0; sg < n_songs; sg++) begin
        int len;
        len = $urandom_range(0, 3 * n);
        s.delete();
        if (sg == 1) foreach (q[i]) s.push_back(8'(q[i]));
        else for (int f = 0; f < len; f++) s.push_back(8'($urandom_range(53, 77)));
        for (int m = 0; m < N_MME; m++) begin
          v.delete();
          foreach (q[i]) v.push_back(q[i] + m - 1);
          exp_d.push_back(ema_distance(v, s));
        end
        foreach (s[i]) db.push_back(s[i]);
        db.push_back(DELIM);
      end
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      stream_db();
      while (!done) @(negedge clk);
      check("songs", int'(songs), n_songs);
      for (int sg = 0; sg < n_songs; sg++) begin
        @(negedge clk);
        res_re = 1'b1; res_raddr = OUT_AW'(sg);
        @(negedge clk);
        res_re = 1'b0;
        for (int m = 0; m < N_MME; m++)
          check($sformatf("round %0d string %0d variant %0d", round, sg, m),
                int'(res_rdata[m*ED_W +: ED_W]), exp_d[sg * N_MME + m]);
      end
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
