// tb_mme_controller: self-checking test of the query-round sequencer, with
// stand-ins for the parameter buffers, the FIFO and the engines.
//
// Small instance: T = 6 engine positions, N_MME = 2, 4-bit output address.
// The parameter buffers answer one cycle after a read with a value derived
// from the address and the MME number; the FIFO is a first-word-fall-through
// queue that goes empty at random; the stand-in MMEs report, three cycles
// after each newline frame, the number of frames since the previous newline
// (plus the MME number). Checked: all T positions are written to every MME
// with the right parameters, the power-up flush result is dropped, every
// later newline writes one output entry at consecutive addresses with the
// stand-in values side by side, done rises only after the last result and
// holds, songs counts the entries, and a second start runs a fresh round.
module tb_mme_controller;
  import mme_pkg::*;

  localparam int unsigned T      = 6;
  localparam int unsigned N_MME  = 2;
  localparam int unsigned AW     = $clog2(T + 1);
  localparam int unsigned OUT_AW = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic busy, done, prm_re, cfg_we, fifo_rd, sym_valid, out_we;
  logic [OUT_AW:0] songs;
  logic [AW-1:0] prm_raddr, cfg_addr;
  accr_param_t prm_rdata [N_MME];
  accr_param_t cfg [N_MME];
  logic fifo_empty;
  logic [8:0] fifo_data;
  logic [7:0] sym;
  logic result_valid;
  ed_t result [N_MME];
  logic [OUT_AW-1:0] out_addr;
  logic [N_MME*ED_W-1:0] out_wdata;

  int checks = 0;
  int failures = 0;
  logic [8:0] fifo_q [$];
  logic fifo_hide = 1'b0;
  int cfg_seen [T];
  int frames = 0;
  int nl_cnt [$];
  logic [2:0] nl_pipe = '0;
  int exp_out [$];
  int n_out = 0;

  always #5 clk = ~clk;

  mme_controller #(.T(T), .N_MME(N_MME), .OUT_AW(OUT_AW)) dut (
    .clk, .rst_n, .start, .busy, .done, .songs,
    .prm_re, .prm_raddr, .prm_rdata, .cfg_we, .cfg_addr, .cfg,
    .fifo_empty, .fifo_data, .fifo_rd, .sym_valid, .sym,
    .result_valid, .result, .out_we, .out_addr, .out_wdata);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic accr_param_t prm_of(int m, int a);
    return '{p: 8'(40 + 7 * a + m), idx: IDX_W'(a + 1), n: IDX_W'(T - m)};
  endfunction

  // parameter buffers
  always_ff @(posedge clk)
    if (prm_re) for (int m = 0; m < N_MME; m++) prm_rdata[m] <= prm_of(m, int'(prm_raddr));

  // FIFO stand-in
  assign fifo_empty = (fifo_q.size() == 0) || fifo_hide;
  assign fifo_data  = (fifo_q.size() == 0) ? '0 : fifo_q[0];
  always @(negedge clk) fifo_hide <= ($urandom_range(0, 3) == 0);

  // engine stand-in and monitors
  always @(posedge clk) begin
    if (fifo_rd && !fifo_empty) void'(fifo_q.pop_front());
    if (cfg_we) begin
      for (int m = 0; m < N_MME; m++)
        check("engine parameters", int'(cfg[m]), int'(prm_of(m, int'(cfg_addr))));
      cfg_seen[cfg_addr]++;
    end
    result_valid <= nl_pipe[2];
    for (int m = 0; m < N_MME; m++) result[m] <= ed_t'(nl_pipe[2] ? nl_cnt[0] + m : 0);
    if (nl_pipe[2]) void'(nl_cnt.pop_front());
    nl_pipe <= {nl_pipe[1:0], sym_valid && sym == DELIM};
    if (sym_valid) begin
      if (sym == DELIM) begin nl_cnt.push_back(frames); frames = 0; end
      else frames++;
    end
    if (out_we) begin
      if (exp_out.size() == 0) check("unexpected output write", 1, 0);
      else begin
        int e;
        e = exp_out.pop_front();
        check("output address", int'(out_addr), n_out);
        for (int m = 0; m < N_MME; m++) check("output value", int'(out_wdata[m*ED_W +: ED_W]), e + m);
      end
      n_out++;
    end
  end

  initial begin
    result_valid = 1'b0;
    foreach (result[m]) result[m] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int round = 0; round < 3; round++) begin
      int n_songs;
      n_songs = $urandom_range(1, 12);
      foreach (cfg_seen[a]) cfg_seen[a] = 0;
      n_out = 0;
      for (int s = 0; s < n_songs; s++) begin
        int len;
        len = $urandom_range(0, 9);
        for (int f = 0; f < len; f++) fifo_q.push_back({1'b0, 8'($urandom_range(48, 90))});
        fifo_q.push_back({s == n_songs - 1, DELIM});
        exp_out.push_back(len);
      end
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      check("busy after start", int'(busy), 1);
      while (!done) @(negedge clk);
      foreach (cfg_seen[a]) check("position loaded once", cfg_seen[a], 1);
      check("all results written", exp_out.size(), 0);
      check("songs", int'(songs), n_songs);
      check("entries", n_out, n_songs);
      repeat (5) @(negedge clk);
      check("done holds", int'(done), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
