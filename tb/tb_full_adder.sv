// tb_full_adder: exhaustive self-check of the full adder against the
// arithmetic sum x + y + cin (the eight rows of the (3,2) counter table).
module tb_full_adder;
  logic x, y, cin, s, c;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .cin(cin), .s(s), .c(c));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {cin, x, y} = 3'(v);
      #1;
      checks++;
      if ({c, s} !== 2'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        $display("FAIL cin=%0b x=%0b y=%0b -> c=%0b s=%0b", cin, x, y, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
