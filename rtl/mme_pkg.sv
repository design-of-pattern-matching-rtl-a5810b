// mme_pkg: types and constants of the melody matching engine (MME).
//
// A hummed query becomes a chain of ACCR terms p{1,4}: a pitch p (a MIDI
// note number, 0..127, carried as a byte) that may repeat one to four
// frames. Each ACCR engine holds p, its own position i in the chain and the
// chain length n; i == n marks the engine whose overall minimum is the
// answer. Edit distances are 8 bits wide and saturate at SYS_MAX, which also
// stands for "no alignment yet". The database is a byte stream of pitch
// frames, one MIDI string after another, each ended by a newline (8'h0A).
package mme_pkg;

  parameter int unsigned ED_W    = 8;            // edit-distance width
  parameter int unsigned IDX_W   = 8;            // width of the i and n registers
  parameter logic [ED_W-1:0] SYS_MAX = '1;       // saturation value
  parameter logic [7:0] DELIM   = 8'h0A;         // end of one database MIDI string

  typedef logic [ED_W-1:0] ed_t;

  typedef struct packed {
    logic [7:0]       p;     // acceptable pitch
    logic [IDX_W-1:0] idx;   // index i of this engine in the query (1-based)
    logic [IDX_W-1:0] n;     // index of the final engine
  } accr_param_t;

  // Saturating addition of a substitution cost.
  function automatic ed_t ed_add(ed_t a, logic [7:0] cost);
    logic [ED_W:0] s;
    s = {1'b0, a} + (ED_W+1)'(cost);
    return (s > (ED_W+1)'(SYS_MAX)) ? SYS_MAX : s[ED_W-1:0];
  endfunction

  function automatic ed_t ed_min(ed_t a, ed_t b);
    return (a < b) ? a : b;
  endfunction

endpackage
