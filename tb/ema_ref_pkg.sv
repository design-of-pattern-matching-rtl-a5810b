// ema_ref_pkg: reference model for the melody testbenches.
//
// Computes the overlapped, substitution-only edit distance between a query
// p_1{1,4} ... p_n{1,4} and a frame string by splitting the string directly
// into segments: D[i][e] is the least cost of covering frames ..e with
// terms 1..i, term i taking the last L = 1..4 frames, each frame costing
// |frame - p_i|; D[0][e] = 0 for every e (a match may start anywhere). The
// answer is the minimum of D[n][e] over all e, capped at 255 like the 8-bit
// hardware. This segment formulation is independent of the sub-state
// recurrences the hardware uses.
package ema_ref_pkg;

  localparam int INF = 1 << 28;

  function automatic int ema_distance(int unsigned p[$], byte unsigned s[$]);
    int n = p.size();
    int m = s.size();
    int d [][];
    int best = INF;
    d = new[n + 1];
    foreach (d[i]) begin
      d[i] = new[m + 1];
      foreach (d[i][e]) d[i][e] = (i == 0) ? 0 : INF;
    end
    for (int i = 1; i <= n; i++) begin
      for (int e = 1; e <= m; e++) begin
        int seg = 0;
        for (int len = 1; len <= 4 && len <= e; len++) begin
          int c = int'(s[e - len]);
          seg += (c > int'(p[i-1])) ? c - int'(p[i-1]) : int'(p[i-1]) - c;
          if (d[i-1][e - len] < INF && d[i-1][e - len] + seg < d[i][e])
            d[i][e] = d[i-1][e - len] + seg;
        end
      end
    end
    for (int e = 1; e <= m; e++) if (d[n][e] < best) best = d[n][e];
    return (best > 255) ? 255 : best;
  endfunction

endpackage
