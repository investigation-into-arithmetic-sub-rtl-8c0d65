// tb_compressor_row: random self-check of a compressor row.
//
// Two rows are tested: the first row of the 16-bit tree (columns 8..23 of a
// 31-column matrix) and a short one (columns 2..4 of an 8-column matrix,
// one compressor). For random inputs the weighted value of the bits the row
// consumes (x0..x3 strictly inside the range, x0 and x1 at its ends) must
// equal sum_row + carry_row, and every output bit outside the row's output
// range must be 0.
module tb_compressor_row;
  localparam int W1 = 31, F1 = 8, L1 = 23;
  localparam int W2 = 8,  F2 = 2, L2 = 4;

  logic [W1-1:0] a0, a1, a2, a3, as, ac;
  logic [W2-1:0] b0, b1, b2, b3, bs, bc;
  int checks = 0, failures = 0;

  compressor_row #(.W(W1), .FIRST(F1), .LAST(L1)) dut1 (
    .x0(a0), .x1(a1), .x2(a2), .x3(a3), .sum_row(as), .carry_row(ac));
  compressor_row #(.W(W2), .FIRST(F2), .LAST(L2)) dut2 (
    .x0(b0), .x1(b1), .x2(b2), .x3(b3), .sum_row(bs), .carry_row(bc));

  function automatic longint consumed_value(input longint x0, x1, x2, x3,
                                            input int f, input int l);
    longint v = 0;
    for (int j = f; j <= l; j++) begin
      longint n = x0[j] + x1[j];
      if (j != f && j != l) n += x2[j] + x3[j];
      v += n << j;
    end
    return v;
  endfunction

  function automatic longint range_mask(input int lo, input int hi);
    longint m = 0;
    for (int j = lo; j <= hi; j++) m[j] = 1'b1;
    return m;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      if (t == 0) begin
        {a0, a1, a2, a3} = '1; {b0, b1, b2, b3} = '1;
      end else begin
        a0 = W1'($urandom); a1 = W1'($urandom); a2 = W1'($urandom); a3 = W1'($urandom);
        b0 = W2'($urandom); b1 = W2'($urandom); b2 = W2'($urandom); b3 = W2'($urandom);
      end
      #1;
      checks++;
      if (longint'(as) + longint'(ac) != consumed_value(a0, a1, a2, a3, F1, L1)) begin
        failures++;
        $display("FAIL row %0d..%0d: sum=%h carry=%h", F1, L1, as, ac);
      end
      checks++;
      if ((longint'(as) & ~range_mask(F1, L1 + 1)) != 0 ||
          (longint'(ac) & ~range_mask(F1 + 2, L1)) != 0) begin
        failures++;
        $display("FAIL row %0d..%0d: output outside its columns", F1, L1);
      end
      checks++;
      if (longint'(bs) + longint'(bc) != consumed_value(b0, b1, b2, b3, F2, L2)) begin
        failures++;
        $display("FAIL row %0d..%0d: sum=%h carry=%h", F2, L2, bs, bc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
