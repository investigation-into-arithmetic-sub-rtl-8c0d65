// output_select: byte-wide output multiplexer for a pin-limited chip.
//
// Eight 4-input multiplexers, one per output pin, pick one byte of the
// 32-bit product with the select pins {os1, os0}:
//   00 -> product[7:0]    01 -> product[15:8]
//   10 -> product[23:16]  11 -> product[31:24]
// Purely combinational.
module output_select (
  input  logic [31:0] product,
  input  logic [1:0]  sel,
  output logic [7:0]  out
);
  always_comb begin
    unique case (sel)
      2'b00: out = product[7:0];
      2'b01: out = product[15:8];
      2'b10: out = product[23:16];
      2'b11: out = product[31:24];
    endcase
  end
endmodule
