// pp_reduction_tree: partial-product reduction with rows of 4:2 compressors.
//
// Takes the column-compacted partial-product matrix of an N x N
// multiplication and reduces it, stage by stage, to two rows that a
// carry-propagate adder can sum. Each stage halves the tallest column
// (16 -> 8 -> 4 -> 2 for N = 16) with compressor rows placed by the layout
// rule in mult_pkg: for N = 16 the stages hold 4, 2 and 1 rows over
// columns 8..23, 10..21, 12..19, 14..17 / 4..27, 6..25 / 2..29, in all
// ninety-eight 4:2 compressors, seven half adders and seven full adders.
// Which matrix bit enters which cell input follows the original cell-level
// netlist of the 16-bit multiplier, written as a rule (see mult_pkg).
//
// Interface: m (2N-1 columns of N positions) in; ppa, ppb (2N-1 bits each)
// out, with ppa + ppb equal to the sum of all matrix bits at their weights.
// ppa takes position 0 and ppb position 1 of each final column. Purely
// combinational: three compressor delays for N = 16.
//
// Some output bits are plain wires or constants by construction: no row
// reaches columns 0..2 (for N = 16), so their bits pass straight from the
// input, and columns that end with a single bit (0 and 3 for N = 16) have
// ppb tied to 0.
module pp_reduction_tree #(
  parameter int unsigned N = mult_pkg::OPERAND_W
) (
  input  logic [2*N-2:0][N-1:0] m,
  output logic [2*N-2:0]        ppa,
  output logic [2*N-2:0]        ppb
);
  localparam int NS = mult_pkg::num_stages(N);

  logic [2*N-2:0][N-1:0] mat [NS+1];

  assign mat[0] = m;

  for (genvar s = 0; s < NS; s++) begin : g_stage
    pp_reduction_stage #(.N(N), .S(s)) u_stage (.m_in(mat[s]), .m_out(mat[s+1]));
  end

  for (genvar j = 0; j < 2 * N - 1; j++) begin : g_out
    assign ppa[j] = mat[NS][j][0];
    assign ppb[j] = mat[NS][j][1];
  end
endmodule
