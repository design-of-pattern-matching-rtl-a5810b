// melody_scanner: FPGA end of the query-by-humming system.
//
// N_MME melody matching engines of T ACCR engines each run in lockstep on
// the same database stream, each holding one pitch-shifted variant of the
// hummed query, so one pass over the database scores N_MME variants. The
// database arrives from the memory side (in the document a DDR2 memory read
// in sequence; here a byte stream in its own clock domain) through a
// dual-clock FIFO. The host writes each engine's parameters into the
// parameter buffer (one buffer per MME, addressed by engine position),
// pulses start, waits for done and reads the output buffer: entry s holds,
// for the s-th database string, the N_MME edit distances side by side
// (MME 0 in the low byte). Defaults: T = 100 and N_MME = 3 (300 engines),
// the configuration the document evaluates; FIFO depth and output-buffer
// size (8192 strings) are this design's choice.
module melody_scanner
  import mme_pkg::*;
#(
  parameter int unsigned T          = 100,
  parameter int unsigned N_MME      = 3,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned OUT_AW     = 13,
  parameter int unsigned AW         = $clog2(T + 1),
  parameter int unsigned SEL_W      = $clog2(N_MME + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // database stream, memory clock domain
  input  logic                  mem_clk,
  input  logic                  mem_rst_n,
  input  logic                  db_valid,
  output logic                  db_ready,
  input  logic [7:0]            db_data,
  input  logic                  db_last,
  // parameter buffer write port
  input  logic                  prm_we,
  input  logic [SEL_W-1:0]      prm_mme,
  input  logic [AW-1:0]         prm_addr,
  input  accr_param_t           prm_wdata,
  // control
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [OUT_AW:0]       songs,
  // output buffer read port (one cycle latency)
  input  logic                  res_re,
  input  logic [OUT_AW-1:0]     res_raddr,
  output logic [N_MME*ED_W-1:0] res_rdata
);

  // Clock-domain crossing.
  logic       fifo_full, fifo_empty, fifo_rd;
  logic [8:0] fifo_data;

  assign db_ready = !fifo_full;

  async_fifo #(.W(9), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk   (mem_clk),
    .wr_rst_n (mem_rst_n),
    .wr_en    (db_valid),
    .wr_data  ({db_last, db_data}),
    .wr_full  (fifo_full),
    .rd_clk   (clk),
    .rd_rst_n (rst_n),
    .rd_en    (fifo_rd),
    .rd_data  (fifo_data),
    .rd_empty (fifo_empty)
  );

  // Parameter buffers.
  logic          prm_re;
  logic [AW-1:0] prm_raddr;
  accr_param_t   prm_rdata [N_MME];

  for (genvar m = 0; m < N_MME; m++) begin : g_prm
    sdp_ram #(.W($bits(accr_param_t)), .DEPTH(T)) u_prm (
      .clk, .we(prm_we && prm_mme == SEL_W'(m)), .waddr(prm_addr), .wdata(prm_wdata),
      .re(prm_re), .raddr(prm_raddr), .rdata(prm_rdata[m])
    );
  end

  // Control.
  logic          cfg_we, sym_valid, out_we;
  logic [AW-1:0] cfg_addr;
  accr_param_t   cfg [N_MME];
  logic [7:0]    sym;
  logic          res_valid [N_MME];
  ed_t           result [N_MME];
  logic [OUT_AW-1:0]       out_addr;
  logic [N_MME*ED_W-1:0]   out_wdata;

  mme_controller #(.T(T), .N_MME(N_MME), .OUT_AW(OUT_AW)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .songs,
    .prm_re, .prm_raddr, .prm_rdata,
    .cfg_we, .cfg_addr, .cfg,
    .fifo_empty, .fifo_data, .fifo_rd,
    .sym_valid, .sym, .result_valid(res_valid[0]), .result,
    .out_we, .out_addr, .out_wdata
  );

  for (genvar m = 0; m < N_MME; m++) begin : g_mme
    mme #(.T(T)) u_mme (
      .clk, .rst_n,
      .cfg_we, .cfg_addr, .cfg(cfg[m]),
      .sym_valid, .sym,
      .result_valid (res_valid[m]),
      .result       (result[m])
    );
  end

  // Output buffer.
  sdp_ram #(.W(N_MME*ED_W), .DEPTH(1 << OUT_AW)) u_out (
    .clk, .we(out_we), .waddr(out_addr), .wdata(out_wdata),
    .re(res_re), .raddr(res_raddr), .rdata(res_rdata)
  );

endmodule
