// multiplier_chip: the pin-limited 16 x 16 multiplier test chip.
//
// The 16 x 16 parallel multiplier (multiplier_core) needs 32 input and 32
// output bits; the chip has far fewer pins, so it is wrapped as follows:
//   - two serial_to_parallel loaders, one per operand, share clk and
//     advance: input_a and input_b each carry one operand bit per clock,
//     least significant bit first; advance is raised with the sixteenth
//     (most significant) bit, and at that clock edge both complete operands
//     move into the holding registers at once;
//   - the multiplier core works combinationally on the held operands;
//   - output_select shows one byte of the 32-bit product on out[7:0],
//     chosen by os[1:0] (00 = bits 7..0, ... 11 = bits 31..24).
// Pads, power pins and package are not logic and are not modelled; the
// ports here are the chip's logic pins, plus rst_n, which this design adds
// so the registers start from a known state.
//
// Timing: the operands loaded at an advance edge reach the core at that
// edge; their product is on out once the combinational delay of the core
// and the multiplexers has passed, with no further clock edge. Changing os
// changes out combinationally. One operation takes 16 clocks: advance is
// raised on the sixteenth, together with the operands' most significant bits. The core's ppa and ppb outputs have no pins on the chip
// and are left unconnected here.
module multiplier_chip (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       input_a,   // serial operand A (multiplicand)
  input  logic       input_b,   // serial operand B (multiplier)
  input  logic       advance,   // load both held operands from the shifters
  input  logic [1:0] os,        // output byte select {OS1, OS0}
  output logic [7:0] out        // selected product byte
);
  localparam int unsigned N = mult_pkg::OPERAND_W;

  logic [N-1:0]   a_par, b_par;
  logic [2*N-2:0] ppa, ppb;
  logic [2*N-1:0] product;

  serial_to_parallel #(.WIDTH(N)) u_s2p_a (
    .clk(clk), .rst_n(rst_n), .serial_in(input_a), .advance(advance), .parallel_out(a_par)
  );
  serial_to_parallel #(.WIDTH(N)) u_s2p_b (
    .clk(clk), .rst_n(rst_n), .serial_in(input_b), .advance(advance), .parallel_out(b_par)
  );

  multiplier_core #(.N(N)) u_core (
    .a(a_par), .b(b_par), .ppa(ppa), .ppb(ppb), .product(product)
  );

  output_select u_osel (.product(product), .sel(os), .out(out));
endmodule
