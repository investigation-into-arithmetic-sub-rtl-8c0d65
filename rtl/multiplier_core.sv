// multiplier_core: N x N unsigned parallel (full-tree) multiplier.
//
// Three combinational parts, as in a classic full-tree multiplier:
//   1. pp_generator      - N*N AND gates form the partial-product matrix;
//   2. pp_reduction_tree - stages of 4:2 compressor rows reduce it to two
//                          (2N-1)-bit rows, ppa and ppb;
//   3. cla_adder         - a two-level carry-lookahead adder sums them into
//                          the 2N-bit product.
// ppa and ppb are brought out as well, so that the reduction tree can be
// observed apart from the fast adder (its latency is the interesting one).
//
// Interface: a (multiplicand), b (multiplier) in; ppa, ppb, product out.
// No clock: the product settles after three compressor delays plus the
// adder delay for N = 16. ppb is constant 0 in the columns where the tree
// leaves a single bit (0 and 3 for N = 16).
module multiplier_core #(
  parameter int unsigned N = mult_pkg::OPERAND_W
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] ppa,
  output logic [2*N-2:0] ppb,
  output logic [2*N-1:0] product
);
  logic [2*N-2:0][N-1:0] m;

  pp_generator      #(.N(N))         u_ppgen (.a(a), .b(b), .m(m));
  pp_reduction_tree #(.N(N))         u_tree  (.m(m), .ppa(ppa), .ppb(ppb));
  cla_adder         #(.WIDTH(2*N-1)) u_cla   (.x(ppa), .y(ppb), .s(product));
endmodule
