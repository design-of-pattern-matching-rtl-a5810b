// tb_sdp_ram: self-checking test of the simple dual-port RAM (128 words of 24 bits, the size of one parameter buffer entry set).
//
// The melody scanner uses this RAM for its parameter and output buffers.
// Random writes and reads are issued, often in the same cycle and to the
// same address, and compared with an array model: a read returns, one cycle
// later, the word stored before that clock edge (read-before-write), and the
// read register holds its value while re is low. The memory must start
// cleared.
module tb_sdp_ram;
  localparam int unsigned W     = 24;
  localparam int unsigned DEPTH = 128;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0;
  logic [W-1:0] rdata;
  logic [W-1:0] model [DEPTH];
  logic [W-1:0] exp_rd = '0;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  sdp_ram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] v;
    for (int i = 0; i < W; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  initial begin
    foreach (model[a]) model[a] = '0;
    @(negedge clk);
    for (int k = 0; k < 3000; k++) begin
      we = ($urandom_range(0, 2) != 0);
      re = ($urandom_range(0, 3) != 0);
      waddr = AW'($urandom_range(0, k < 1000 ? 15 : DEPTH - 1));
      raddr = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom_range(0, k < 1000 ? 15 : DEPTH - 1));
      wdata = rand_word();
      @(posedge clk);
      if (re) exp_rd = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp_rd) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: read %h expected %h", k, rdata, exp_rd);
      end
    end
    we = 1'b0;
    re = 1'b0;
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
