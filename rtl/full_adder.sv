// full_adder: (3,2) counter in the XOR/XNOR-plus-multiplexer form.
//
// The cell first forms h = x XOR y (the XOR/XNOR pair of the pass-logic
// full adder chosen for the multiplier), then uses h to steer both outputs:
//   sum   = h ? ~cin : cin
//   carry = h ?  cin : x        (if x == y the carry equals either input)
// which is the same function as s = x^y^cin, c = xy + x cin + y cin. The
// transistor-level circuit is not modelled; only its logic is.
//
// In the multiplier it ends every compressor row, at the row's most
// significant column, with cin taken from the last 4:2 compressor's cout.
//
// Interface: x, y, cin in; s (weight 2^0), c (weight 2^1) out.
// Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic s,
  output logic c
);
  logic h;

  assign h = x ^ y;
  assign s = h ? ~cin : cin;
  assign c = h ? cin : x;
endmodule
