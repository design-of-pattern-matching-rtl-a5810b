// tb_async_fifo: self-checking test of the dual-clock FIFO that carries the
// melody database from the memory clock domain to the matching engines.
//
// The FIFO (16 words here, to reach the full state often) is written at a
// 7 ns clock and read at a 10 ns clock, then with the clocks swapped in
// speed by a slower writer phase. Writes and reads are attempted at random;
// a write counts only when wr_full is low and a read only when rd_empty is
// low. Every word read must be the next word written, in order, and the
// first-word-fall-through data must be valid whenever rd_empty is low. With
// the reader stalled the writer must be able to store exactly DEPTH words
// before wr_full rises, and after the reader drains the FIFO rd_empty must
// rise again.
module tb_async_fifo;
  localparam int unsigned W     = 9;
  localparam int unsigned DEPTH = 16;

  logic wr_clk = 1'b0, rd_clk = 1'b0;
  logic wr_rst_n = 1'b0, rd_rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0;
  logic [W-1:0] rd_data;
  logic wr_full, rd_empty;

  int checks = 0;
  int failures = 0;
  int wr_pct = 70, rd_pct = 70;
  int n_written = 0, n_read = 0;
  logic [W-1:0] model [$];
  logic stall_rd = 1'b1;
  int unsigned wr_half = 3, rd_half = 5;

  always #(wr_half * 1ns) wr_clk = ~wr_clk;
  always #(rd_half * 1ns) rd_clk = ~rd_clk;

  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (
    .wr_clk, .wr_rst_n, .wr_en, .wr_data, .wr_full,
    .rd_clk, .rd_rst_n, .rd_en, .rd_data, .rd_empty);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // writer
  always @(posedge wr_clk) begin
    if (wr_rst_n && wr_en && !wr_full) begin
      model.push_back(wr_data);
      n_written++;
    end
  end
  always @(negedge wr_clk) begin
    wr_en   <= wr_rst_n && ($urandom_range(1, 100) <= wr_pct);
    wr_data <= W'($urandom);
  end

  // reader
  always @(posedge rd_clk) begin
    if (rd_rst_n && rd_en && !rd_empty) begin
      if (model.size() == 0) begin
        checks++; failures++;
        $display("FAIL read from a FIFO that should be empty");
      end else begin
        check("read data in order", int'(rd_data), int'(model.pop_front()));
      end
      n_read++;
    end
  end
  always @(negedge rd_clk) rd_en <= rd_rst_n && !stall_rd && ($urandom_range(1, 100) <= rd_pct);

  initial begin
    repeat (3) @(posedge rd_clk);
    wr_rst_n = 1'b1;
    rd_rst_n = 1'b1;
    // fill with the reader stalled
    wr_pct = 100;
    repeat (DEPTH + 20) @(posedge wr_clk);
    check("words stored before full", n_written, DEPTH);
    check("full flag", int'(wr_full), 1);
    wr_pct = 0;
    // drain
    stall_rd = 1'b0;
    rd_pct = 100;
    repeat (DEPTH + 20) @(posedge rd_clk);
    check("words drained", n_read, DEPTH);
    check("empty flag", int'(rd_empty), 1);
    // random traffic, faster writer
    wr_pct = 60; rd_pct = 60;
    repeat (4000) @(posedge rd_clk);
    // random traffic, slower writer
    wr_half = 11;
    repeat (4000) @(posedge rd_clk);
    wr_pct = 0;
    repeat (200) @(posedge rd_clk);
    check("all written words read", n_read, n_written);
    check("empty at the end", int'(rd_empty), 1);
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
