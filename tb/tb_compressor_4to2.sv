// tb_compressor_4to2: applies all 32 input combinations of the 4:2
// compressor and checks
//   - x1 + x2 + x3 + x4 + cin == s + 2*(c + cout)   (value is preserved)
//   - cout is the same for cin = 0 and cin = 1        (no carry ripple)
//   - cout is set only when at least two of x1..x3 are set, so a row
//     chain never pushes more than one extra bit into the next column.
module tb_compressor_4to2;
  logic x1, x2, x3, x4, cin, s, c, cout;
  logic cout_prev;
  int checks = 0, failures = 0;

  compressor_4to2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                       .s(s), .c(c), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cout_prev = 1'b0;
    for (int v = 0; v < 32; v++) begin
      int in_sum, out_sum;
      {x1, x2, x3, x4, cin} = 5'(v);
      #1;
      in_sum  = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
      out_sum = int'(s) + 2 * (int'(c) + int'(cout));
      checks++;
      if (in_sum != out_sum) begin
        failures++;
        $display("FAIL %0b%0b%0b%0b cin=%0b: s=%0b c=%0b cout=%0b", x1, x2, x3, x4, cin, s, c, cout);
      end
      if (cin) begin
        checks++;
        if (cout !== cout_prev) begin
          failures++;
          $display("FAIL cout depends on cin for %0b%0b%0b%0b", x1, x2, x3, x4);
        end
      end
      checks++;
      if (cout && (int'(x1) + int'(x2) + int'(x3) < 2)) begin
        failures++;
        $display("FAIL cout set with fewer than two of x1..x3");
      end
      cout_prev = cout;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
