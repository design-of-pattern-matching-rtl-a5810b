// ces_controller: packet front end of the CES regexp scanner.
//
// The host link delivers packets as a byte stream (in_valid/in_ready, with
// in_last on the final byte and a packet-kind flag in_kind that is sampled
// with the first byte). Every packet starts with a 32-bit header.
//   * String packet: the header is echoed to the output, then every payload
//     byte is fed to the scanner as one symbol, and for every symbol one
//     match vector (one bit per CES row, row 0 in bit 0) is written to the
//     output, VEC_BYTES bytes, least significant byte first. out_last marks
//     the final byte of the answer. The scanner is cleared at the start of
//     each string packet so that every packet is an independent string.
//   * Configuration packet: after the header come records
//       OP_CC_WORD: bram, symbol, 9 bytes of accept bits (LSB first)
//       OP_ENGINE : index (2 bytes), bL (2), bU (2), flags
//                   (bit 0 start, bit 1 bypass, bits 7:4 ENABLE),
//     multi-byte numbers most significant byte first; each record becomes
//     one write into the class memories or an engine's configuration
//     register. Nothing is answered.
// The packet kinds, the header echo and the result layout follow the
// document's link description; the record format is this design's own.
// Symbols are accepted one every VEC_BYTES cycles so that the output never
// backs up; between packets the controller waits until the last match
// vector has left (three cycles from an accepted byte to its match vector). The output has no
// back-pressure: it is meant to be written into an output buffer.
module ces_controller
  import ces_pkg::*;
#(
  parameter int unsigned ROWS      = 8,
  parameter int unsigned IDX_W     = 8,
  parameter int unsigned BSEL_W    = 2,
  parameter int unsigned VEC_BYTES = (ROWS + 7) / 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // host input stream
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [7:0]          in_data,
  input  logic                in_last,
  input  pkt_kind_e           in_kind,
  // host output stream
  output logic                out_valid,
  output logic [7:0]          out_data,
  output logic                out_last,
  // scanner configuration
  output logic                cfg_we,
  output logic [IDX_W-1:0]    cfg_idx,
  output ccr_cfg_t            cfg_data,
  output logic                cc_we,
  output logic [BSEL_W-1:0]   cc_bram,
  output logic [7:0]          cc_sym,
  output logic [CC_WIDTH-1:0] cc_word,
  // scanner symbol stream
  output logic                clear,
  output logic                sym_valid,
  output logic [7:0]          sym,
  input  logic                match_valid,
  input  logic [ROWS-1:0]     match,
  // status
  output logic                busy
);

  typedef enum logic [2:0] {S_HDR, S_STR, S_OP, S_ARGS, S_SKIP, S_DRAIN} state_e;

  state_e         state;
  pkt_kind_e      kind_q;
  logic [1:0]     hdr_cnt;
  cfg_op_e        op_q;
  logic [3:0]     arg_cnt;
  logic [7:0]     args [11];
  logic [2:0]     pipe_last;          // last-symbol flag alongside the scanner pipeline
  logic [$clog2(VEC_BYTES+1)-1:0] gap;
  logic [ROWS-1:0]                vec_q;
  logic [$clog2(VEC_BYTES+1)-1:0] vec_idx;
  logic                           vec_last;
  logic                           ser_busy;

  logic take;
  pkt_kind_e hdr_kind;
  assign hdr_kind = (hdr_cnt == 2'd0) ? in_kind : kind_q;
  assign in_ready = (state != S_DRAIN) && !(state == S_STR && gap != '0);
  assign take     = in_valid && in_ready;
  assign busy     = (state != S_HDR) || (pipe_last != '0) || ser_busy;

  function automatic int unsigned arg_len(cfg_op_e op);
    case (op)
      OP_CC_WORD: return 11;
      OP_ENGINE:  return 7;
      default:    return 0;
    endcase
  endfunction

  // Header echo and record decoding.
  logic       hdr_out_v;
  logic [7:0] hdr_out_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_HDR;
      kind_q    <= PKT_STRING;
      hdr_cnt   <= '0;
      op_q      <= OP_CC_WORD;
      arg_cnt   <= '0;
      gap       <= '0;
      pipe_last <= '0;
      cfg_we    <= 1'b0;
      cc_we     <= 1'b0;
      clear     <= 1'b0;
      sym_valid <= 1'b0;
      hdr_out_v <= 1'b0;
      for (int b = 0; b < 11; b++) args[b] <= '0;
    end else begin
      cfg_we    <= 1'b0;
      cc_we     <= 1'b0;
      clear     <= 1'b0;
      sym_valid <= 1'b0;
      hdr_out_v <= 1'b0;
      pipe_last <= {pipe_last[1:0], 1'b0};
      if (gap != '0) gap <= gap - 1'b1;

      case (state)
        S_HDR: if (take) begin
          if (hdr_cnt == 2'd0) kind_q <= in_kind;
          if (hdr_kind == PKT_STRING) begin
            hdr_out_v <= 1'b1;
            hdr_out_d <= in_data;
          end
          hdr_cnt <= hdr_cnt + 1'b1;
          if (hdr_cnt == 2'd0 && hdr_kind == PKT_STRING) clear <= 1'b1;
          if (in_last)            begin hdr_cnt <= '0; state <= S_DRAIN; end
          else if (hdr_cnt == 2'd3) state <= (hdr_kind == PKT_STRING) ? S_STR : S_OP;
        end
        S_STR: if (take) begin
          sym_valid <= 1'b1;
          sym       <= in_data;
          gap       <= ($bits(gap))'(VEC_BYTES - 1);
          if (in_last) begin
            pipe_last[0] <= 1'b1;
            hdr_cnt      <= '0;
            state        <= S_DRAIN;
          end
        end
        S_OP: if (take) begin
          op_q    <= cfg_op_e'(in_data);
          arg_cnt <= '0;
          if (in_last) begin hdr_cnt <= '0; state <= S_DRAIN; end
          else if (arg_len(cfg_op_e'(in_data)) == 0) state <= S_SKIP;
          else state <= S_ARGS;
        end
        S_ARGS: if (take) begin
          args[arg_cnt] <= in_data;
          arg_cnt       <= arg_cnt + 1'b1;
          if (32'(arg_cnt) + 1 == arg_len(op_q)) begin
            if (op_q == OP_CC_WORD) cc_we  <= 1'b1;
            else                    cfg_we <= 1'b1;
          end
          if (in_last) begin hdr_cnt <= '0; state <= S_DRAIN; end
          else if (32'(arg_cnt) + 1 == arg_len(op_q)) state <= S_OP;
        end
        S_SKIP: if (take && in_last) begin   // unknown opcode: drop the rest
          hdr_cnt <= '0;
          state   <= S_DRAIN;
        end
        S_DRAIN: if (pipe_last == '0 && !ser_busy && !sym_valid && !match_valid)
          state <= S_HDR;
        default: state <= S_HDR;
      endcase
    end
  end

  // Record fields: the last argument byte is still in flight when the
  // write strobe rises, so the decoded word uses the registered bytes.
  always_comb begin
    cc_bram = BSEL_W'(args[0]);
    cc_sym  = args[1];
    for (int b = 0; b < 9; b++) cc_word[b*8 +: 8] = args[2 + b];
    cfg_idx            = IDX_W'({args[0], args[1]});
    cfg_data.b_lo      = cnt_t'({args[2], args[3]});
    cfg_data.b_hi      = cnt_t'({args[4], args[5]});
    cfg_data.start     = args[6][0];
    cfg_data.bypass    = args[6][1];
    cfg_data.enable    = args[6][7:4];
  end

  // Match-vector serialiser.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ser_busy <= 1'b0;
      vec_idx  <= '0;
      vec_last <= 1'b0;
      vec_q    <= '0;
    end else if (match_valid) begin
      vec_q    <= match;
      vec_idx  <= '0;
      vec_last <= pipe_last[2];
      ser_busy <= 1'b1;
    end else if (ser_busy) begin
      if (32'(vec_idx) + 1 == VEC_BYTES) ser_busy <= 1'b0;
      vec_idx <= vec_idx + 1'b1;
    end
  end

  always_comb begin
    logic [VEC_BYTES*8-1:0] wide;
    wide      = (VEC_BYTES*8)'(vec_q);
    out_valid = hdr_out_v || ser_busy;
    out_data  = ser_busy ? wide[32'(vec_idx)*8 +: 8] : hdr_out_d;
    out_last  = ser_busy && vec_last && (32'(vec_idx) + 1 == VEC_BYTES);
  end

endmodule
