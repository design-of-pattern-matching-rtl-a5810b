// cc_bram: character-class memory of the CES scanner.
//
// One word per 8-bit input symbol; bit k of the word says whether that symbol
// is in the character class of CCR engine k. One read therefore answers the
// accept/reject question for WIDTH engines at once (72 engines for a
// 256 x 72 block RAM). The read port is synchronous (one cycle latency), the
// write port is used only while the scanner is being configured. A
// write and a read of the same address in one cycle return the old word.
module cc_bram #(
  parameter int unsigned WIDTH = 72,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  // Power-up contents: every class empty until configured.
  initial for (int a = 0; a < DEPTH; a++) mem[a] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
