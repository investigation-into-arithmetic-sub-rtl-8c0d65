// mult_pkg: constants and elaboration-time layout functions shared by the
// 4:2-compressor multiplier.
//
// The partial-product matrix of an N x N multiplication is kept as a
// column-compacted dot matrix: column j (weight 2^j, 0 <= j < 2N-1) holds its
// bits in positions 0 .. height-1, with no gaps. A reduction stage places
// "compressor rows" (a half adder, a chain of 4:2 compressors, a full adder)
// over that matrix. Compressor row i of a stage whose tallest column has h
// bits covers columns
//     first = E + 2*i,     last = (2N-1) - E - 2*i,     E = 2^(ceil(log2 h) - 1)
// and the stage uses ceil((h - E)/2) such rows, reducing the height to E.
// Stages repeat until two rows remain. For N = 16 this gives the seven rows
// 8..23, 10..21, 12..19, 14..17 / 4..27, 6..25 / 2..29: ninety-eight 4:2
// compressors, seven half adders and seven full adders.
//
// Bit assignment, as in the original cell-level netlist of the 16-bit
// multiplier: row i reads matrix positions 4i..4i+3 of the columns strictly
// inside its range and positions 4i, 4i+1 at its two end columns (the half
// adder and the full adder); a missing position reads 0. After a stage, each
// column is repacked in the order: sum-row bit of row 0, carry-row bit of
// row 0, sum-row bit of row 1, carry-row bit of row 1, .. (a full adder's
// carry counts as a sum-row bit of the next column), then the bits no cell
// consumed, in their old order. Writing this as a rule instead of a cell
// list is this design's own; it gives the same wiring for N = 16 and extends
// to other N. The functions below compute that wiring at elaboration; they
// hold no logic.
package mult_pkg;

  // Operand width of the fabricated multiplier.
  localparam int unsigned OPERAND_W = 16;

  // Encoding returned by pp_src(): where a bit of a stage's output matrix
  // comes from.
  localparam int SRC_NONE  = -1;
  localparam int SRC_SUM   = 0;     // SRC_SUM   + i : sum row of compressor row i
  localparam int SRC_CARRY = 1000;  // SRC_CARRY + i : carry row of compressor row i
  localparam int SRC_PASS  = 2000;  // SRC_PASS  + p : input position p, passed through

  function automatic int pp_cols(input int n);
    return 2 * n - 1;
  endfunction

  function automatic int clog2i(input int v);
    int r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // Largest power of two strictly below h (the height a stage reduces to).
  function automatic int stage_target(input int h);
    return 1 << (clog2i(h) - 1);
  endfunction

  // Maximum column height entering stage s (stage 0 sees the raw matrix).
  function automatic int stage_height(input int n, input int s);
    int h;
    h = n;
    for (int t = 0; t < s; t++) h = stage_target(h);
    return h;
  endfunction

  function automatic int num_stages(input int n);
    int h, s;
    h = n;
    s = 0;
    while (h > 2) begin
      h = stage_target(h);
      s++;
    end
    return s;
  endfunction

  // Number of compressor rows in stage s.
  function automatic int stage_rows(input int n, input int s);
    int h, e;
    h = stage_height(n, s);
    e = stage_target(h);
    return (h - e + 1) / 2;
  endfunction

  function automatic int row_first(input int n, input int s, input int i);
    return stage_target(stage_height(n, s)) + 2 * i;
  endfunction

  function automatic int row_last(input int n, input int s, input int i);
    return pp_cols(n) - stage_target(stage_height(n, s)) - 2 * i;
  endfunction

  // Does compressor row i of stage s read input position p of column j?
  function automatic bit consumed(input int n, input int s, input int i,
                                  input int j, input int p);
    int f, l;
    f = row_first(n, s, i);
    l = row_last(n, s, i);
    if (j < f || j > l) return 1'b0;
    if (j == f || j == l) return (p == 4 * i) || (p == 4 * i + 1);
    return (p >= 4 * i) && (p <= 4 * i + 3);
  endfunction

  function automatic bit has_sum(input int n, input int s, input int i, input int j);
    return (j >= row_first(n, s, i)) && (j <= row_last(n, s, i) + 1);
  endfunction

  function automatic bit has_carry(input int n, input int s, input int i, input int j);
    return (j >= row_first(n, s, i) + 2) && (j <= row_last(n, s, i));
  endfunction

  // Height of column j entering stage s.
  function automatic int col_height(input int n, input int s, input int j);
    int h, nh;
    bit used;
    h = (j + 1 < pp_cols(n) - j) ? j + 1 : pp_cols(n) - j;
    for (int t = 0; t < s; t++) begin
      nh = 0;
      for (int i = 0; i < stage_rows(n, t); i++) begin
        if (has_sum(n, t, i, j))   nh++;
        if (has_carry(n, t, i, j)) nh++;
      end
      for (int p = 0; p < h; p++) begin
        used = 1'b0;
        for (int i = 0; i < stage_rows(n, t); i++)
          if (consumed(n, t, i, j, p)) used = 1'b1;
        if (!used) nh++;
      end
      h = nh;
    end
    return h;
  endfunction

  // Source of output position k of column j after stage s (see encoding).
  function automatic int pp_src(input int n, input int s, input int j, input int k);
    int slot, h;
    bit used;
    slot = 0;
    for (int i = 0; i < stage_rows(n, s); i++) begin
      if (has_sum(n, s, i, j)) begin
        if (slot == k) return SRC_SUM + i;
        slot++;
      end
      if (has_carry(n, s, i, j)) begin
        if (slot == k) return SRC_CARRY + i;
        slot++;
      end
    end
    h = col_height(n, s, j);
    for (int p = 0; p < h; p++) begin
      used = 1'b0;
      for (int i = 0; i < stage_rows(n, s); i++)
        if (consumed(n, s, i, j, p)) used = 1'b1;
      if (!used) begin
        if (slot == k) return SRC_PASS + p;
        slot++;
      end
    end
    return SRC_NONE;
  endfunction

  // Number of 4:2 compressors in the whole tree (98 for N = 16).
  function automatic int num_compressors(input int n);
    int c;
    c = 0;
    for (int s = 0; s < num_stages(n); s++)
      for (int i = 0; i < stage_rows(n, s); i++)
        c += row_last(n, s, i) - row_first(n, s, i) - 1;
    return c;
  endfunction

endpackage
