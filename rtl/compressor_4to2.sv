// compressor_4to2: 4:2 compressor in the XOR/MUX form of the PASS2 cell.
//
// Five inputs of equal weight (x1..x4 and cin) are reduced to a sum bit of
// the same weight and two bits one position up (c and cout), so that
//   x1 + x2 + x3 + x4 + cin = s + 2*(c + cout).
// Internally:
//   h1 = x1 ^ x2,  h2 = x3 ^ x4,  h3 = h1 ^ h2
//   cout = h1 ? x3  : x1
//   s    = h3 ^ cin
//   c    = h3 ? cin : x4
// cout does not depend on cin, so a chain of compressors (cout of column j
// into cin of column j+1) has no carry ripple. The multiplexer data inputs
// follow the cell's Boolean equations; only the logic of the pass-transistor
// circuit is modelled.
//
// Interface: x1..x4, cin in; s, c, cout out. Purely combinational.
module compressor_4to2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic s,
  output logic c,
  output logic cout
);
  logic h1, h2, h3;

  assign h1   = x1 ^ x2;
  assign h2   = x3 ^ x4;
  assign h3   = h1 ^ h2;
  assign cout = h1 ? x3 : x1;
  assign s    = h3 ^ cin;
  assign c    = h3 ? cin : x4;
endmodule
