// pp_reduction_stage: one stage of the 4:2 compressor reduction tree.
//
// Stage S of an N x N multiplier reads a column-compacted dot matrix
// (m_in[j][p], column j, position p) whose tallest column has
// mult_pkg::stage_height(N,S) bits and places mult_pkg::stage_rows(N,S)
// compressor rows over it. Row i spans columns row_first..row_last and
// reads positions 4i..4i+3 (4i, 4i+1 at its end columns). The rows' sum and
// carry rows and every bit no cell read are repacked into m_out following
// mult_pkg::pp_src, so that m_out is again column-compacted and no column is
// taller than stage_height(N,S+1). Positions above a column's height are 0.
//
// Purely combinational: one compressor delay per stage.
module pp_reduction_stage #(
  parameter int unsigned N = mult_pkg::OPERAND_W,
  parameter int unsigned S = 0
) (
  input  logic [2*N-2:0][N-1:0] m_in,
  output logic [2*N-2:0][N-1:0] m_out
);
  import mult_pkg::*;

  localparam int W  = 2 * N - 1;
  localparam int NR = stage_rows(N, S);

  logic [W-1:0] sum_r   [NR];
  logic [W-1:0] carry_r [NR];

  for (genvar i = 0; i < NR; i++) begin : g_row
    logic [W-1:0] x [4];
    for (genvar k = 0; k < 4; k++) begin : g_in
      for (genvar j = 0; j < W; j++) begin : g_bit
        if (4 * i + k < N) begin : g_tap
          assign x[k][j] = m_in[j][4*i+k];
        end else begin : g_gnd
          assign x[k][j] = 1'b0;
        end
      end
    end
    compressor_row #(
      .W(W), .FIRST(row_first(N, S, i)), .LAST(row_last(N, S, i))
    ) u_row (
      .x0(x[0]), .x1(x[1]), .x2(x[2]), .x3(x[3]),
      .sum_row(sum_r[i]), .carry_row(carry_r[i])
    );
  end

  for (genvar j = 0; j < W; j++) begin : g_col
    for (genvar k = 0; k < N; k++) begin : g_pos
      localparam int SRC = pp_src(N, S, j, k);
      if (SRC == SRC_NONE) begin : g_none
        assign m_out[j][k] = 1'b0;
      end else if (SRC >= SRC_PASS) begin : g_pass
        assign m_out[j][k] = m_in[j][SRC-SRC_PASS];
      end else if (SRC >= SRC_CARRY) begin : g_carry
        assign m_out[j][k] = carry_r[SRC-SRC_CARRY][j];
      end else begin : g_sum
        assign m_out[j][k] = sum_r[SRC-SRC_SUM][j];
      end
    end
  end
endmodule
