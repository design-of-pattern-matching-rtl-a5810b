// ces_pkg: types and constants shared by the CCR-based regexp scanner (CES).
//
// A CCR (character class with constraint repetition) term CC{bL,bU} is held in
// one CCR engine. Its static configuration is the pair of repetition bounds,
// the ENABLE fan-out bits towards the engines of the next column, a start bit
// marking the first term of a rule (always active, MIN held at zero) and a
// bypass bit for unused engines that only forward activation. The counter
// width of 11 bits covers the largest repetition bound seen in the Snort rule
// set (1253); the all-ones value is MAX_INT and encodes an unbounded repetition.
package ces_pkg;

  parameter int unsigned CNT_W   = 11;                  // MIN/MAX and bound width
  parameter int unsigned MAX_W   = 4;                   // widest ENABLE vector supported
  parameter logic [CNT_W-1:0] MAX_INT = '1;             // largest counter value ("infinite")
  parameter int unsigned CC_WIDTH = 72;                 // accept bits per character-class BRAM
  parameter int unsigned CC_DEPTH = 256;                // one word per 8-bit symbol

  typedef logic [CNT_W-1:0] cnt_t;

  typedef struct packed {
    cnt_t             b_lo;    // lower repetition bound bL
    cnt_t             b_hi;    // upper repetition bound bU (MAX_INT = unbounded)
    logic [MAX_W-1:0] enable;  // fan-out: bit j drives row (group base + j) of the next column
    logic             start;   // first term of a rule: permanently active, MIN = 0
    logic             bypass;  // unused engine: forward activation, consume nothing
  } ccr_cfg_t;

  // Packet type flag of the host link.
  typedef enum logic [0:0] {PKT_STRING = 1'b0, PKT_CONFIG = 1'b1} pkt_kind_e;

  // Configuration record opcodes inside a configuration packet.
  typedef enum logic [7:0] {
    OP_CC_WORD = 8'h01,   // [bram][symbol][9 bytes of accept bits, LSB first]
    OP_ENGINE  = 8'h02    // [index hi][index lo][bL hi][bL lo][bU hi][bU lo][flags]
  } cfg_op_e;

  // Quantifier of a simple CCR term (simple_ccr_engine).
  typedef enum logic [1:0] {
    SCC_ONE  = 2'd0,      // CC{1,1}
    SCC_PLUS = 2'd1,      // CC+
    SCC_OPT  = 2'd2,      // CC?
    SCC_STAR = 2'd3       // CC*
  } scc_mode_e;

endpackage
