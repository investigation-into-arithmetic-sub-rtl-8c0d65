// tb_multiplier_core: self-check of the 16 x 16 parallel multiplier.
//
// Applies the sixteen operand pairs of the reference test sequence (chosen
// to switch the whole reduction tree), all-ones and zero operands, walking
// ones, the reference stepping sequence (a = 0, 7, 14, ..; b = 1, 57, 113,
// ..), and random operands. For each, product must equal a*b and the two
// reduced rows must satisfy ppa + ppb == a*b.
module tb_multiplier_core;
  localparam int N = 16;
  logic [N-1:0]   a, b;
  logic [2*N-2:0] ppa, ppb;
  logic [2*N-1:0] product;
  int checks = 0, failures = 0;

  localparam logic [15:0] VEC_A [16] = '{
    16'd65535, 16'd0,     16'd34832, 16'd2633,  16'd41309, 16'd27076, 16'd60374, 16'd20971,
    16'd55803, 16'd3584,  16'd42004, 16'd11541, 16'd44893, 16'd16832, 16'd51666, 16'd29531};
  localparam logic [15:0] VEC_B [16] = '{
    16'd65535, 16'd0,     16'd8465,  16'd4626,  16'd13219, 16'd52884, 16'd59285, 16'd21518,
    16'd30015, 16'd592,   16'd11201, 16'd37566, 16'd46067, 16'd17476, 16'd25941, 16'd24158};

  multiplier_core #(.N(N)) dut (.a(a), .b(b), .ppa(ppa), .ppb(ppb), .product(product));

  task automatic check(input logic [N-1:0] ta, tb);
    longint expected;
    a = ta; b = tb;
    #1;
    expected = longint'(ta) * longint'(tb);
    checks++;
    if (longint'(product) != expected) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, got %0d", ta, tb, expected, product);
    end
    checks++;
    if (longint'(ppa) + longint'(ppb) != expected) begin
      failures++;
      $display("FAIL %0d * %0d: ppa+ppb = %0d", ta, tb, longint'(ppa) + longint'(ppb));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) check(VEC_A[k], VEC_B[k]);
    for (int k = 0; k < N; k++) begin
      check(N'(1) << k, '1);
      check('1, N'(1) << k);
    end
    // reference stepping sequence: a from 0 in steps of 7, b from 1 in
    // steps of 56, both wrapping at 16 bits
    for (int t = 0; t < 2000; t++) check(N'(7 * t), N'(1 + 56 * t));
    for (int t = 0; t < 5000; t++) check(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
