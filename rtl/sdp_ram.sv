// sdp_ram: simple dual-port block RAM, one write port and one synchronous
// read port (one cycle latency) on the same clock. Used for the parameter
// buffer, from which the ACCR engines load p, i and n by address, and for
// the output buffer that collects one edit-distance result per database
// string. Contents start at zero.
module sdp_ram #(
  parameter int unsigned W     = 24,
  parameter int unsigned DEPTH = 128,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0] wdata,
  input  logic         re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0] rdata
);

  logic [W-1:0] mem [DEPTH];

  initial for (int a = 0; a < DEPTH; a++) mem[a] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
