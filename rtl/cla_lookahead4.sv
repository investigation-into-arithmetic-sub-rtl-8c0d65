// cla_lookahead4: four-position carry-lookahead unit.
//
// From the generate/propagate pairs (g[k], p[k]) of four adjacent positions
// and the carry into the lowest one, forms every carry in flat two-level
// AND-OR form, with no ripple:
//   c[k] = g[k] | p[k]g[k-1] | p[k]p[k-1]g[k-2] | ... | p[k]..p[0]cin
// c[k] is the carry out of position k. It also forms the group signals
// G = c[3] with cin = 0 and P = p[0]p[1]p[2]p[3] for the next lookahead
// level. The same unit serves bits (first level) and 4-bit groups (second
// level) of the carry-lookahead adder.
//
// Purely combinational.
module cla_lookahead4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  output logic [3:0] c,
  output logic       g_grp,
  output logic       p_grp
);
  always_comb begin
    logic term;
    for (int k = 0; k < 4; k++) begin
      c[k] = g[k];
      for (int m = 0; m < k; m++) begin
        term = g[m];
        for (int q = m + 1; q <= k; q++) term = term & p[q];
        c[k] = c[k] | term;
      end
      term = cin;
      for (int q = 0; q <= k; q++) term = term & p[q];
      c[k] = c[k] | term;
    end
    g_grp = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    p_grp = &p;
  end
endmodule
