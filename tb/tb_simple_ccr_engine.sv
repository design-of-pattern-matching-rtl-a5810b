// tb_simple_ccr_engine: a chain of six simple CCR engines checked against a
// regular-expression model.
//
// Each trial draws a rule of six terms, each a class of one or two letters
// from {a,b,c,d} with a random quantifier ({1,1}, +, ?, *); the first engine
// is the start engine. The engines are chained by hand (as_out of term i to
// as_in of term i+1), fed random strings over {a..e} and the last engine's
// as_out is compared, symbol by symbol, with a model that tracks the set of
// rule positions reachable after each symbol (a textbook NFA simulation with
// skip closure for ? and *). The match reported after a symbol is the last
// engine's as_out in the following cycle, the same timing as the full CCR
// engine. Overlapping classes are allowed: this engine is exact.
module tb_simple_ccr_engine;
  import ces_pkg::*;

  localparam int N = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic sym_valid = 1'b0;
  logic [7:0] sym = '0;
  scc_mode_e mode [N];
  logic [3:0] cls [N];
  logic acc [N];
  logic as_c [N+1];

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  assign as_c[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_chain
    assign acc[i] = (sym >= "a" && sym <= "d") ? cls[i][sym - "a"] : 1'b0;
    simple_ccr_engine u_eng (
      .clk, .rst_n, .clear, .mode(mode[i]), .start(i == 0), .sym_valid,
      .acc(acc[i]), .as_in(as_c[i]), .as_out(as_c[i+1]));
  end

  // model: reach[i] = the first i terms have matched input ending at the
  // current symbol (reach[0] = a match may start anywhere)
  function automatic logic in_cls(int i, byte unsigned s);
    return (s >= "a" && s <= "d") ? cls[i][s - "a"] : 1'b0;
  endfunction

  function automatic logic skippable(int i);
    return mode[i] == SCC_OPT || mode[i] == SCC_STAR;
  endfunction

  // close over skippable terms
  function automatic void closure(ref logic r [N+1]);
    for (int i = 0; i < N; i++) if (r[i] && skippable(i)) r[i+1] = 1'b1;
  endfunction

  initial begin
    logic st [N+1];   // st[i+1]: term i is the last consumed and it took the symbol
    logic nx [N+1];
    logic reach [N+1];
    logic expect_m;
    foreach (cls[i]) begin cls[i] = '0; mode[i] = SCC_ONE; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int trial = 0; trial < 60; trial++) begin
      for (int i = 0; i < N; i++) begin
        cls[i] = 4'(1 << $urandom_range(0, 3));
        if ($urandom_range(0, 2) == 0) cls[i][$urandom_range(0, 3)] = 1'b1;
        mode[i] = scc_mode_e'($urandom_range(0, 3));
      end
      @(negedge clk) clear = 1'b1;
      @(negedge clk) clear = 1'b0;
      foreach (st[i]) st[i] = 1'b0;
      for (int k = 0; k < 60; k++) begin
        byte unsigned s;
        s = 8'("a" + $urandom_range(0, 4));
        // positions reachable before consuming s
        foreach (reach[i]) reach[i] = st[i];
        reach[0] = 1'b1;
        closure(reach);
        foreach (nx[i]) nx[i] = 1'b0;
        for (int i = 0; i < N; i++) begin
          logic can_enter, can_loop;
          can_enter = reach[i];
          can_loop = st[i+1] && (mode[i] == SCC_PLUS || mode[i] == SCC_STAR);
          if ((can_enter || can_loop) && in_cls(i, s)) nx[i+1] = 1'b1;
        end
        st = nx;
        // a match ends at s if the final position is reachable via closure
        // (a rule whose terms can all be skipped matches the empty string
        // at every position)
        foreach (reach[i]) reach[i] = st[i];
        reach[0] = 1'b1;
        closure(reach);
        expect_m = reach[N];
        sym = s; sym_valid = 1'b1;
        @(negedge clk);
        sym_valid = 1'b0;
        checks++;
        if (as_c[N] !== expect_m) begin
          failures++;
          if (failures < 10)
            $display("FAIL trial %0d symbol %0d: match %b expected %b", trial, k, as_c[N], expect_m);
        end
      end
    end
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
