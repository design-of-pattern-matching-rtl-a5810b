// async_fifo: dual-clock FIFO between the memory side (database reads) and
// the engine clock domain of the melody scanner.
//
// The classic Gray-code scheme: each side keeps a binary pointer one bit
// wider than the address, publishes it in Gray code, and the other side
// samples it through two flip-flops. The writer is full when the
// synchronised read pointer equals its own with the two top bits inverted;
// the reader is empty when the synchronised write pointer equals its own.
// Both flags are therefore conservative (they clear a few cycles late),
// never wrong. Storage is a DEPTH x W array with an asynchronous read port. Reads are
// first-word-fall-through: rd_data shows the head entry while rd_empty is
// low, and rd_en pops it. The document only says a FIFO crosses the two
// clock domains; its depth and this implementation are this design's.
module async_fifo #(
  parameter int unsigned W     = 9,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic         wr_clk,
  input  logic         wr_rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         wr_full,
  input  logic         rd_clk,
  input  logic         rd_rst_n,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_empty
);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]  wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write side.
  assign wbin_n  = wbin + (AW+1)'(wr_en && !wr_full);
  assign wr_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // Read side.
  assign rd_empty = (rgray == wgray_r2);
  assign rbin_n   = rbin + (AW+1)'(rd_en && !rd_empty);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  initial assert (DEPTH == (1 << AW) && AW >= 2)
    else $error("async_fifo: DEPTH must be a power of two, at least 4");

endmodule
