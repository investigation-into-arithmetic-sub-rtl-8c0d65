// tb_cla_adder: self-check of the 31-bit two-level carry-lookahead adder
// against x + y, for corner cases (all ones, carries that cross every group
// and level-two boundary), the adder's reference stepping sequence (x from 0
// in steps of 54857, y from 1 in steps of 9546, wrapping at 31 bits) and
// random operands.
module tb_cla_adder;
  localparam int W = 31;
  logic [W-1:0] x, y;
  logic [W:0]   s;
  int checks = 0, failures = 0;

  cla_adder #(.WIDTH(W)) dut (.x(x), .y(y), .s(s));

  task automatic check(input logic [W-1:0] tx, ty);
    x = tx; y = ty;
    #1;
    checks++;
    if (s !== (W+1)'(tx) + (W+1)'(ty)) begin
      failures++;
      $display("FAIL %h + %h = %h, got %h", tx, ty, (W+1)'(tx) + (W+1)'(ty), s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, W'(1));
    check(W'(1), '1);
    for (int k = 0; k < W; k++) begin
      check(W'((64'(1) << k) - 1), W'(1));      // carry chain of length k
      check(W'(64'(1) << k), W'(64'(1) << k));  // generate at bit k only
    end
    for (int t = 0; t < 2000; t++) check(W'(54857 * t), W'(1 + 9546 * t));
    for (int t = 0; t < 5000; t++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
