// pp_generator: partial-product AND array.
//
// Forms the N*N products a[r] & b[c] and files each one in column r+c of a
// column-compacted dot matrix: column j holds the bits with r+c = j in
// positions 0, 1, .. ordered by increasing r, starting at
// r = max(0, j-(N-1)). Position p of column j is therefore
//   a[max(0, j-N+1) + p] & b[j - max(0, j-N+1) - p]
// and positions at or above the column height min(j+1, 2N-1-j) are 0. The
// tallest column (j = N-1) holds N bits.
//
// Interface: a, b (N bits each) in; m[j][p] out. Purely combinational: one
// AND gate per bit.
module pp_generator #(
  parameter int unsigned N = mult_pkg::OPERAND_W
) (
  input  logic [N-1:0]            a,
  input  logic [N-1:0]            b,
  output logic [2*N-2:0][N-1:0]   m
);
  for (genvar j = 0; j < 2 * N - 1; j++) begin : g_col
    localparam int R0 = (j > N - 1) ? j - (N - 1) : 0;
    localparam int H  = (j + 1 < 2 * N - 1 - j) ? j + 1 : 2 * N - 1 - j;
    for (genvar p = 0; p < N; p++) begin : g_pos
      if (p < H) begin : g_and
        assign m[j][p] = a[R0 + p] & b[j - R0 - p];
      end else begin : g_zero
        assign m[j][p] = 1'b0;
      end
    end
  end
endmodule
