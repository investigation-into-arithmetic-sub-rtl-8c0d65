// tb_pp_reduction_tree: self-check of the 4:2 compressor reduction tree.
//
// 1. Layout: for N = 16 the tree must have 3 stages of 4, 2 and 1 rows over
//    columns 8-23, 10-21, 12-19, 14-17 / 4-27, 6-25 / 2-29, with 98 4:2
//    compressors in all.
//    Wiring: a few bit sources, chosen where the repacking order matters,
//    are compared with the original cell-level netlist of the 16-bit
//    multiplier (for example, stage 2, row 2 at column 12 reads the stage 1,
//    row 3 sum and the untouched bits at positions 10..12).
// 2. Function: random dot matrices (every bit below each column's height
//    random, all-ones and all-zeros included) must give ppa + ppb equal to
//    the weighted sum of the matrix bits. An 8-bit tree is checked the same
//    way, to exercise the layout rule at a second size.
module tb_pp_reduction_tree;
  import mult_pkg::*;

  localparam int N  = 16;
  localparam int N2 = 8;

  logic [2*N-2:0][N-1:0]   m;
  logic [2*N-2:0]          ppa, ppb;
  logic [2*N2-2:0][N2-1:0] m2;
  logic [2*N2-2:0]         ppa2, ppb2;
  int checks = 0, failures = 0;

  pp_reduction_tree #(.N(N))  dut  (.m(m),  .ppa(ppa),  .ppb(ppb));
  pp_reduction_tree #(.N(N2)) dut2 (.m(m2), .ppa(ppa2), .ppb(ppb2));

  // Expected plan: {stage, row, first, last}
  localparam int PLAN [7][4] = '{
    '{0, 0, 8, 23}, '{0, 1, 10, 21}, '{0, 2, 12, 19}, '{0, 3, 14, 17},
    '{1, 0, 4, 27}, '{1, 1, 6, 25},  '{2, 0, 2, 29}
  };

  // Expected sources: {stage, column, position, pp_src value}
  localparam int WIRE [14][4] = '{
    '{0, 10, 0, SRC_SUM + 0},   '{0, 10, 1, SRC_CARRY + 0}, '{0, 10, 2, SRC_SUM + 1},
    '{0, 10, 3, SRC_PASS + 6},  '{0, 12, 4, SRC_SUM + 2},   '{0, 12, 5, SRC_PASS + 10},
    '{0, 14, 5, SRC_CARRY + 2}, '{0, 14, 6, SRC_SUM + 3},   '{0, 14, 7, SRC_PASS + 14},
    '{0, 8, 1, SRC_PASS + 2},   '{1, 6, 2, SRC_SUM + 1},    '{1, 6, 3, SRC_PASS + 6},
    '{1, 4, 1, SRC_PASS + 2},   '{2, 2, 1, SRC_PASS + 2}
  };

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, r;
    int mode;

    checks++;
    if (num_stages(N) != 3 || stage_rows(N, 0) != 4 || stage_rows(N, 1) != 2 ||
        stage_rows(N, 2) != 1) begin
      failures++;
      $display("FAIL stage/row count");
    end
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (row_first(N, PLAN[k][0], PLAN[k][1]) != PLAN[k][2] ||
          row_last(N, PLAN[k][0], PLAN[k][1]) != PLAN[k][3]) begin
        failures++;
        $display("FAIL stage %0d row %0d: %0d..%0d", PLAN[k][0] + 1, PLAN[k][1] + 1,
                 row_first(N, PLAN[k][0], PLAN[k][1]), row_last(N, PLAN[k][0], PLAN[k][1]));
      end
    end
    for (int k = 0; k < 14; k++) begin
      checks++;
      if (pp_src(N, WIRE[k][0], WIRE[k][1], WIRE[k][2]) != WIRE[k][3]) begin
        failures++;
        $display("FAIL source of stage %0d column %0d position %0d: %0d", WIRE[k][0] + 1,
                 WIRE[k][1], WIRE[k][2], pp_src(N, WIRE[k][0], WIRE[k][1], WIRE[k][2]));
      end
    end
    checks++;
    if (num_compressors(N) != 98) begin
      failures++;
      $display("FAIL compressor count %0d", num_compressors(N));
    end

    for (int t = 0; t < 3000; t++) begin
      mode = (t < 2) ? t : 2;
      v = 0;
      for (int j = 0; j < 2 * N - 1; j++) begin
        int h = (j + 1 < 2 * N - 1 - j) ? j + 1 : 2 * N - 1 - j;
        for (int p = 0; p < N; p++) begin
          m[j][p] = (p < h) && (mode == 0 ? 1'b1 : mode == 1 ? 1'b0 : 1'($urandom));
          v += longint'(m[j][p]) << j;
        end
      end
      r = 0;
      for (int j = 0; j < 2 * N2 - 1; j++) begin
        int h = (j + 1 < 2 * N2 - 1 - j) ? j + 1 : 2 * N2 - 1 - j;
        for (int p = 0; p < N2; p++) begin
          m2[j][p] = (p < h) && (mode == 0 ? 1'b1 : mode == 1 ? 1'b0 : 1'($urandom));
          r += longint'(m2[j][p]) << j;
        end
      end
      #1;
      checks++;
      if (longint'(ppa) + longint'(ppb) != v) begin
        failures++;
        $display("FAIL N=16 matrix value %0d, ppa+ppb=%0d", v, longint'(ppa) + longint'(ppb));
      end
      checks++;
      if (longint'(ppa2) + longint'(ppb2) != r) begin
        failures++;
        $display("FAIL N=8 matrix value %0d, ppa+ppb=%0d", r, longint'(ppa2) + longint'(ppb2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
