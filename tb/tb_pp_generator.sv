// tb_pp_generator: self-check of the partial-product AND array.
//
// For random and corner operands: the weighted sum of all matrix bits must
// equal a*b; each column may hold no bit at or above its height
// min(j+1, 2N-1-j); and, for one-hot operands a = 2^r, b = 2^c, exactly one
// bit may be set, in column r+c.
module tb_pp_generator;
  localparam int N = 16;
  logic [N-1:0] a, b;
  logic [2*N-2:0][N-1:0] m;
  int checks = 0, failures = 0;

  pp_generator #(.N(N)) dut (.a(a), .b(b), .m(m));

  function automatic longint weighted(input logic [2*N-2:0][N-1:0] mm);
    longint v = 0;
    for (int j = 0; j < 2 * N - 1; j++)
      for (int p = 0; p < N; p++) v += longint'(mm[j][p]) << j;
    return v;
  endfunction

  task automatic check(input logic [N-1:0] ta, tb);
    int ones, col;
    a = ta; b = tb;
    #1;
    checks++;
    if (weighted(m) != longint'(ta) * longint'(tb)) begin
      failures++;
      $display("FAIL a=%0d b=%0d weighted=%0d", ta, tb, weighted(m));
    end
    checks++;
    for (int j = 0; j < 2 * N - 1; j++) begin
      int h = (j + 1 < 2 * N - 1 - j) ? j + 1 : 2 * N - 1 - j;
      for (int p = h; p < N; p++)
        if (m[j][p]) begin
          failures++;
          $display("FAIL bit above column height: j=%0d p=%0d", j, p);
        end
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
    check('1, '1);
    check('0, '1);
    check(16'd34832, 16'd8465);
    for (int t = 0; t < 1000; t++) check(N'($urandom), N'($urandom));
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int ones, col;
        a = N'(1) << r; b = N'(1) << c;
        #1;
        ones = 0; col = -1;
        for (int j = 0; j < 2 * N - 1; j++)
          for (int p = 0; p < N; p++)
            if (m[j][p]) begin ones++; col = j; end
        checks++;
        if (ones != 1 || col != r + c) begin
          failures++;
          $display("FAIL one-hot r=%0d c=%0d: ones=%0d col=%0d", r, c, ones, col);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
