// compressor_row: one row of the 4:2 reduction layout.
//
// A half adder at column FIRST, 4:2 compressors at every column strictly
// between FIRST and LAST, and a full adder at column LAST. Each cell passes
// a horizontal carry to the cell on its left (more significant side): the
// half adder's carry and each compressor's cout go to the next cell's
// carry input. The row turns four input rows into two output rows:
//   sum_row[j]   for FIRST <= j <= LAST+1  (bit LAST+1 is the full adder's carry)
//   carry_row[j] for FIRST+2 <= j <= LAST  (compressor carries, one column up)
// Every other output bit is 0. Only x0, x1 are read at the two end columns;
// x0..x3 are read in between. Inputs outside FIRST..LAST are ignored.
//
// Because a compressor's cout does not depend on its cin, the horizontal
// chain does not ripple: the row's delay is that of one compressor. Purely
// combinational.
module compressor_row #(
  parameter int unsigned W     = 31,  // matrix width in columns
  parameter int unsigned FIRST = 8,   // column of the half adder
  parameter int unsigned LAST  = 23   // column of the full adder
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);
  // chain[j]: horizontal carry leaving column j towards column j+1
  logic [W-1:0] chain;
  logic [W-1:0] sum_int;

  initial begin
    assert (LAST > FIRST && LAST + 1 < W)
      else $fatal(1, "compressor_row: bad column range %0d..%0d for width %0d", FIRST, LAST, W);
  end

  for (genvar j = 0; j < W; j++) begin : g_col
    if (j == FIRST) begin : g_ha
      half_adder u_ha (.x(x0[j]), .y(x1[j]), .s(sum_int[j]), .c(chain[j]));
    end else if (j > FIRST && j < LAST) begin : g_cmp
      logic c_up;
      compressor_4to2 u_cmp (
        .x1(x0[j]), .x2(x1[j]), .x3(x2[j]), .x4(x3[j]), .cin(chain[j-1]),
        .s(sum_int[j]), .c(c_up), .cout(chain[j])
      );
      // the compressor's carry lands one column up
      assign carry_row[j+1] = c_up;
    end else if (j == LAST) begin : g_fa
      full_adder u_fa (.x(x0[j]), .y(x1[j]), .cin(chain[j-1]), .s(sum_int[j]), .c(chain[j]));
    end else if (j == LAST + 1) begin : g_top
      assign sum_int[j]   = chain[j-1];
      assign chain[j]     = 1'b0;
    end else begin : g_idle
      assign sum_int[j]   = 1'b0;
      assign chain[j]     = 1'b0;
    end
    // carry_row bits that no compressor drives
    if (!(j >= FIRST + 2 && j <= LAST)) begin : g_nocarry
      assign carry_row[j] = 1'b0;
    end
  end

  assign sum_row = sum_int;
endmodule
