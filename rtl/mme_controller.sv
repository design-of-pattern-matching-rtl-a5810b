// mme_controller: sequencing of one query round on the melody scanner.
//
// On start it (1) copies the query parameters of every engine position
// 0..T-1 from the parameter buffer into the N_MME engines (one position per
// cycle, all MMEs in parallel, one cycle of read latency), (2) sends one
// newline frame so every engine starts from a clean state, then (3) pops the
// database frames from the clock-crossing FIFO and broadcasts them to all
// MMEs, one per cycle while the FIFO has data. Every newline closes one MIDI
// string: when its result leaves the MMEs, the N_MME edit distances are
// written, side by side, to the output buffer at the string's number. The
// FIFO word carries a last flag on the final frame of the database (which
// must itself be a newline); once that string's result is written, done
// rises and stays high until the next start. songs tells how many results
// were written. The start/done handshake and the three buffers are the
// document's; the sequencing details are this design's own.
module mme_controller
  import mme_pkg::*;
#(
  parameter int unsigned T      = 100,
  parameter int unsigned N_MME  = 3,
  parameter int unsigned AW     = $clog2(T + 1),
  parameter int unsigned OUT_AW = 13
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic [OUT_AW:0]         songs,
  // parameter buffer read port (one cycle latency)
  output logic                    prm_re,
  output logic [AW-1:0]           prm_raddr,
  input  accr_param_t             prm_rdata [N_MME],
  // engine configuration
  output logic                    cfg_we,
  output logic [AW-1:0]           cfg_addr,
  output accr_param_t             cfg [N_MME],
  // database FIFO (first-word-fall-through), {last, frame}
  input  logic                    fifo_empty,
  input  logic [8:0]              fifo_data,
  output logic                    fifo_rd,
  // frame broadcast and results
  output logic                    sym_valid,
  output logic [7:0]              sym,
  input  logic                    result_valid,
  input  ed_t                     result [N_MME],
  // output buffer write port
  output logic                    out_we,
  output logic [OUT_AW-1:0]       out_addr,
  output logic [N_MME*ED_W-1:0]   out_wdata
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_FLUSH, S_RUN, S_WAIT, S_DONE} state_e;

  state_e        state;
  logic [AW:0]   load_cnt;
  logic          load_wr;
  logic [AW-1:0] load_addr_q;
  logic          skip_first;     // result of the flushing newline is dropped
  logic [3:0]    pending;        // newlines sent whose result is still in flight

  assign busy      = (state != S_IDLE) && (state != S_DONE);
  assign done      = (state == S_DONE);
  assign prm_re    = (state == S_LOAD) && (load_cnt < (AW+1)'(T));
  assign prm_raddr = load_cnt[AW-1:0];
  assign cfg_we    = load_wr;
  assign cfg_addr  = load_addr_q;
  assign cfg       = prm_rdata;
  assign fifo_rd   = (state == S_RUN) && !fifo_empty;

  logic sent_nl, got_res;
  assign sent_nl = sym_valid && sym == DELIM;
  assign got_res = result_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      load_cnt    <= '0;
      load_wr     <= 1'b0;
      load_addr_q <= '0;
      sym_valid   <= 1'b0;
      sym         <= '0;
      skip_first  <= 1'b0;
      pending     <= '0;
      songs       <= '0;
      out_we      <= 1'b0;
      out_addr    <= '0;
      out_wdata   <= '0;
    end else begin
      load_wr   <= prm_re;
      load_addr_q <= prm_raddr;
      sym_valid <= 1'b0;
      out_we    <= 1'b0;
      pending   <= pending + 4'(sent_nl) - 4'(got_res);

      if (got_res) begin
        if (skip_first) begin
          skip_first <= 1'b0;
        end else begin
          out_we   <= 1'b1;
          out_addr <= songs[OUT_AW-1:0];
          for (int m = 0; m < N_MME; m++) out_wdata[m*ED_W +: ED_W] <= result[m];
          songs    <= songs + 1'b1;
        end
      end

      case (state)
        S_IDLE, S_DONE: if (start) begin
          state    <= S_LOAD;
          load_cnt <= '0;
          songs    <= '0;
        end
        S_LOAD: begin
          if (load_cnt < (AW+1)'(T)) load_cnt <= load_cnt + 1'b1;
          else if (!load_wr)         state    <= S_FLUSH;
        end
        S_FLUSH: begin
          sym_valid  <= 1'b1;
          sym        <= DELIM;
          skip_first <= 1'b1;
          state      <= S_RUN;
        end
        S_RUN: if (!fifo_empty) begin
          sym_valid <= 1'b1;
          sym       <= fifo_data[7:0];
          if (fifo_data[8]) state <= S_WAIT;
        end
        S_WAIT: if (pending == '0 && !sent_nl && !got_res && !out_we) state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
