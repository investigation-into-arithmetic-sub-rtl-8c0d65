// serial_to_parallel: serial operand loader with a parallel holding register.
//
// A chain of WIDTH D flip-flops shifts serial_in in at the most significant
// end on every rising clock edge, so after WIDTH clocks the first bit sent
// sits in bit 0: operands are sent least significant bit first. A second
// rank of WIDTH flip-flops, one per shift stage, holds the value presented
// to the multiplier. On a rising clock edge with advance high it takes the
// whole shift register at once, including the bit shifted in at that same
// edge, so the multiplier sees all bits change together and never a
// half-shifted operand. The shift register keeps shifting regardless of
// advance.
//
// The operation follows the chip's test sequence: advance is raised together
// with the last (most significant) bit of an operand, and the next operand's
// least significant bit follows on the very next clock. The holding rank is
// clocked by the system clock with advance as a load enable (the source
// describes latches released by advance), and both ranks have an
// asynchronous active-low reset to 0; these two points are this design's
// choices for a single-clock, fully initialised circuit.
//
// Timing: bits sent on clock edges 1..WIDTH, with advance = 1 at edge WIDTH,
// appear on parallel_out just after edge WIDTH: one operand every WIDTH
// clocks.
//
// Because the holding rank samples the shift register's next value, the
// oldest shift stage (shift_q[0]) is never read: its bit has just been
// shifted out when the holding rank loads. It is kept so the chain has the
// WIDTH stages of the source's register; synthesis removes it.
module serial_to_parallel #(
  parameter int unsigned WIDTH = mult_pkg::OPERAND_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             serial_in,
  input  logic             advance,
  output logic [WIDTH-1:0] parallel_out
);
  logic [WIDTH-1:0] shift_q;
  logic [WIDTH-1:0] shift_d;

  assign shift_d = {serial_in, shift_q[WIDTH-1:1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_q      <= '0;
      parallel_out <= '0;
    end else begin
      shift_q <= shift_d;
      if (advance) parallel_out <= shift_d;
    end
  end
endmodule
