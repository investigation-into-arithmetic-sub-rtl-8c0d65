// tb_multiplier_chip: end-to-end test of the pin-limited multiplier chip at
// its full 16-bit size.
//
// First the bench replays, pin for pin, the opening 34 vectors of the
// chip's production test: an all-zero operation, then 201 * 179, with
// advance raised on vectors 15 and 31 together with each operand's last bit
// and the low product byte expected on every vector (0x00 up to vector 30,
// then 0x8B); the whole product 0x00008C8B is then read through all four
// select codes.
//
// Then, for each operand pair (the sixteen pairs of the reference test
// sequence, then random pairs) the bench shifts both operands in serially,
// least significant bit first, one bit per clock, raising advance with the
// sixteenth bit, and reads the 32-bit product a byte at a time through the
// four output-select codes. It checks against a*b computed in the bench:
//   - out is 0 after reset;
//   - while the next operands are shifted in, out still shows the previous
//     product (the held operands do not move);
//   - the new product appears right after the advance edge, 16 clocks after
//     the first bit of the operation, and not one clock earlier;
//   - every select code shows its byte.
// Mechanisms counted (each must occur): advance loads, each of the four
// output-select codes, a product whose bit 31 is set (carry out of the
// final adder), a zero product, and held-output checks during shifting.
module tb_multiplier_chip;
  logic       clk = 1'b0, rst_n, input_a, input_b, advance;
  logic [1:0] os;
  logic [7:0] out;
  int checks = 0, failures = 0;

  int n_advance = 0, n_msb = 0, n_zero = 0, n_held = 0;
  int n_sel [4] = '{0, 0, 0, 0};

  localparam logic [15:0] VEC_A [16] = '{
    16'd65535, 16'd0,     16'd34832, 16'd2633,  16'd41309, 16'd27076, 16'd60374, 16'd20971,
    16'd55803, 16'd3584,  16'd42004, 16'd11541, 16'd44893, 16'd16832, 16'd51666, 16'd29531};
  localparam logic [15:0] VEC_B [16] = '{
    16'd65535, 16'd0,     16'd8465,  16'd4626,  16'd13219, 16'd52884, 16'd59285, 16'd21518,
    16'd30015, 16'd592,   16'd11201, 16'd37566, 16'd46067, 16'd17476, 16'd25941, 16'd24158};

  // Production test vectors: {OS1, OS0, ADVANCE, INPUTB, INPUTA} per clock.
  localparam logic [4:0] REPLAY [34] = '{
    5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00000,
    5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00100,
    5'b00011, 5'b00010, 5'b00000, 5'b00001, 5'b00010, 5'b00010, 5'b00001, 5'b00011,
    5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00100,
    5'b00000, 5'b00011};

  multiplier_chip dut (
    .clk(clk), .rst_n(rst_n), .input_a(input_a), .input_b(input_b),
    .advance(advance), .os(os), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all_bytes(input logic [31:0] expected, input string what);
    for (int s = 0; s < 4; s++) begin
      os = 2'(s);
      #1;
      checks++;
      n_sel[s]++;
      if (out !== 8'(expected >> (8 * s))) begin
        failures++;
        $display("FAIL %s: os=%0d out=%h expected %h (product %h)", what, s, out,
                 8'(expected >> (8 * s)), expected);
      end
    end
  endtask

  task automatic multiply(input logic [15:0] a, input logic [15:0] b,
                          input logic [31:0] prev);
    logic [31:0] expected;
    int cycles;
    expected = 32'(a) * 32'(b);
    cycles = 0;
    for (int k = 0; k < 15; k++) begin
      input_a <= a[k];
      input_b <= b[k];
      advance <= 1'b0;
      @(posedge clk);
      cycles++;
      #1;
      os = 2'(k % 4);
      #1;
      checks++;
      n_held++;
      if (out !== 8'(prev >> (8 * (k % 4)))) begin
        failures++;
        $display("FAIL output moved while shifting: os=%0d out=%h", k % 4, out);
      end
    end
    // the last bit goes in with advance high, which loads both operands
    input_a <= a[15];
    input_b <= b[15];
    advance <= 1'b1;
    @(posedge clk);
    cycles++;
    n_advance++;
    advance <= 1'b0;
    #1;
    checks++;
    if (cycles != 16) begin
      failures++;
      $display("FAIL operation took %0d clocks", cycles);
    end
    check_all_bytes(expected, $sformatf("%0d * %0d", a, b));
    if (expected[31]) n_msb++;
    if (expected == 0) n_zero++;
  endtask

  initial begin
    logic [31:0] prev;
    logic [15:0] a, b;
    rst_n = 1'b0; input_a = 1'b0; input_b = 1'b0; advance = 1'b0; os = 2'b00;
    repeat (3) @(posedge clk);
    #1;
    check_all_bytes(32'd0, "after reset");
    rst_n = 1'b1;

    for (int v = 0; v < 34; v++) begin
      {os, advance, input_b, input_a} = REPLAY[v];
      @(posedge clk);
      #1;
      checks++;
      if (advance) n_advance++;
      if (out !== ((v >= 31) ? 8'h8B : 8'h00)) begin
        failures++;
        $display("FAIL replay vector %0d: out=%b", v, out);
      end
    end
    advance = 1'b0;
    check_all_bytes(32'h0000_8C8B, "replayed 201 * 179");
    prev = 32'h0000_8C8B;
    for (int t = 0; t < 16 + 40; t++) begin
      if (t < 16) begin
        a = VEC_A[t];
        b = VEC_B[t];
      end else begin
        a = 16'($urandom);
        b = 16'($urandom);
      end
      multiply(a, b, prev);
      prev = 32'(a) * 32'(b);
    end

    $display("mechanisms: advance=%0d sel00=%0d sel01=%0d sel10=%0d sel11=%0d msb=%0d zero=%0d held=%0d",
             n_advance, n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_msb, n_zero, n_held);
    checks++;
    if (n_advance == 0 || n_sel[0] == 0 || n_sel[1] == 0 || n_sel[2] == 0 ||
        n_sel[3] == 0 || n_msb == 0 || n_zero == 0 || n_held == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
