// half_adder: (2,2) counter.
//
// Adds two bits of equal weight: sum = x XOR y, carry = x AND y (the AND/XOR
// gate form of the half adder). In the multiplier it starts every compressor
// row, at the row's least significant column; its carry feeds the carry
// input of the first 4:2 compressor of the row.
//
// Interface: x, y in; s (weight 2^0), c (weight 2^1) out. Purely
// combinational.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  assign s = x ^ y;
  assign c = x & y;
endmodule
