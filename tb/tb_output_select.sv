// tb_output_select: checks that each select code shows the right byte of
// the product (00 -> bits 7..0, 01 -> 15..8, 10 -> 23..16, 11 -> 31..24).
module tb_output_select;
  logic [31:0] product;
  logic [1:0]  sel;
  logic [7:0]  out;
  int checks = 0, failures = 0;

  output_select dut (.product(product), .sel(sel), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      product = (t == 0) ? 32'h7856_3412 : $urandom;
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        checks++;
        if (out !== 8'(product >> (8 * s))) begin
          failures++;
          $display("FAIL product=%h sel=%0d out=%h", product, s, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
