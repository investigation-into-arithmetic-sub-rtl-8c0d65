// cla_adder: two-level carry-lookahead adder (the multiplier's fast adder).
//
// Adds the two WIDTH-bit rows left by the reduction tree into a WIDTH+1 bit
// result (WIDTH = 31 gives the 32-bit product). Level one splits the
// operands into 4-bit groups; a cla_lookahead4 per group forms the group's
// internal carries from its bit generate (x&y) and propagate (x^y) signals,
// and its group generate/propagate. Level two puts a cla_lookahead4 over
// each run of four groups and forms the carry into every group from the
// group signals. The carry between successive level-two units ripples,
// which for 31 bits is one step (8 groups, 2 level-two units). This is the
// structure of the original 31-bit adder netlist; its separate gates are
// written here as expressions. The operands
// are zero-extended to a whole number of groups; the carry out of bit
// WIDTH-1 is s[WIDTH].
//
// Purely combinational.
module cla_adder #(
  parameter int unsigned WIDTH = 2 * mult_pkg::OPERAND_W - 1
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH:0]   s
);
  localparam int NG  = (WIDTH + 3) / 4;   // 4-bit groups
  localparam int NSG = (NG + 3) / 4;      // level-two units
  localparam int WP  = 4 * NG;

  logic [WP-1:0]   xp, yp, gb, pb, cb;
  logic [4*NSG-1:0] gg, pg, cg;            // group generate/propagate/carry-out
  logic [NSG-1:0]  c_sg;                  // carry into each level-two unit
  logic [4*NSG-1:0] c_grp_in;              // carry into each group

  assign xp = WP'(x);
  assign yp = WP'(y);
  assign gb = xp & yp;
  assign pb = xp ^ yp;

  // Level one: carries inside each group.
  for (genvar k = 0; k < NG; k++) begin : g_grp
    cla_lookahead4 u_la (
      .g(gb[4*k +: 4]), .p(pb[4*k +: 4]), .cin(c_grp_in[k]),
      .c(cb[4*k +: 4]), .g_grp(gg[k]), .p_grp(pg[k])
    );
  end
  for (genvar k = NG; k < 4 * NSG; k++) begin : g_pad
    assign gg[k] = 1'b0;
    assign pg[k] = 1'b0;
  end

  // Level two: carry into each group.
  assign c_sg[0] = 1'b0;
  for (genvar u = 0; u < NSG; u++) begin : g_sup
    logic g_unused, p_unused;
    cla_lookahead4 u_la2 (
      .g(gg[4*u +: 4]), .p(pg[4*u +: 4]), .cin(c_sg[u]),
      .c(cg[4*u +: 4]), .g_grp(g_unused), .p_grp(p_unused)
    );
    assign c_grp_in[4*u]   = c_sg[u];
    assign c_grp_in[4*u+1] = cg[4*u];
    assign c_grp_in[4*u+2] = cg[4*u+1];
    assign c_grp_in[4*u+3] = cg[4*u+2];
    if (u + 1 < NSG) begin : g_ripple
      assign c_sg[u+1] = cg[4*u+3];
    end
  end

  // Sum bits: propagate XOR carry-in; the top carry is the result's MSB.
  assign s[0] = pb[0];
  for (genvar i = 1; i < WIDTH; i++) begin : g_sum
    assign s[i] = pb[i] ^ cb[i-1];
  end
  assign s[WIDTH] = cb[WIDTH-1];
endmodule
