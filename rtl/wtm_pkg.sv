// Elaboration-time schedule of the Wallace reduction tree.
//
// The tree works on rows of 2N-bit words. Each stage cuts the rows into
// groups of four (the last group may hold fewer). In a group of three or four
// rows every column is reduced by the cell that fits the number of live bits
// it holds there: four bits by an approximate 4:2 compressor, three by a full
// adder, two by a half adder, a single bit is wired through. The group then
// leaves two rows: the sums (same column) and the carries (one column up). A
// group of one or two rows is passed on unchanged. Stages repeat until two
// rows are left, so 16 rows take 16 -> 8 -> 4 -> 2, three stages.
//
// "Live" bits are the positions that can be non-zero: row j of the partial
// products covers columns j .. j+N-1, and after a stage a sum bit is live where
// the column had at least one live bit, a carry bit where it had at least two.
// The functions below compute these masks as constants so that the RTL places
// cells only where bits exist. Widths are bounded by MAX_W (N <= 64).
package wtm_pkg;

  localparam int MAX_W    = 128;
  localparam int MAX_ROWS = 64;

  typedef logic [MAX_W-1:0] col_mask_t;

  // Rows left after one stage that starts with r rows.
  function automatic int next_rows(input int r);
    int rem;
    rem = r % 4;
    return 2 * (r / 4) + ((rem > 2) ? 2 : rem);
  endfunction

  // Number of stages needed to bring n rows down to two (or one).
  function automatic int num_stages(input int n);
    int r;
    int s;
    r = n;
    s = 0;
    while (r > 2) begin
      r = next_rows(r);
      s++;
    end
    return s;
  endfunction

  // Rows present at the input of stage st (st = 0 is the partial products).
  function automatic int rows_at(input int n, input int st);
    int r;
    r = n;
    for (int s = 0; s < st; s++) r = next_rows(r);
    return r;
  endfunction

  // Live-bit mask of row `row` at the input of stage st, for an n x n multiplier.
  function automatic col_mask_t live_mask(input int n, input int st, input int row);
    col_mask_t m  [MAX_ROWS];
    col_mask_t nm [MAX_ROWS];
    int r;
    int k;
    int cnt;
    for (int j = 0; j < MAX_ROWS; j++) m[j] = '0;
    for (int j = 0; j < n; j++) m[j] = ((col_mask_t'(1) << n) - col_mask_t'(1)) << j;
    r = n;
    for (int s = 0; s < st; s++) begin
      for (int j = 0; j < MAX_ROWS; j++) nm[j] = '0;
      for (int g = 0; 4 * g < r; g++) begin
        k = (r - 4 * g >= 4) ? 4 : r - 4 * g;
        if (k <= 2) begin
          nm[2*g] = m[4*g];
          if (k == 2) nm[2*g+1] = m[4*g+1];
        end else begin
          for (int c = 0; c < 2 * n; c++) begin
            cnt = 0;
            for (int i = 0; i < k; i++) cnt += int'(m[4*g+i][c]);
            if (cnt >= 1) nm[2*g] = nm[2*g] | (col_mask_t'(1) << c);
            if (cnt >= 2 && c + 1 < 2 * n) nm[2*g+1] = nm[2*g+1] | (col_mask_t'(1) << (c + 1));
          end
        end
      end
      for (int j = 0; j < MAX_ROWS; j++) m[j] = nm[j];
      r = next_rows(r);
    end
    for (int j = 0; j < MAX_ROWS; j++) if (j == row) return m[j];
    return '0;
  endfunction

  // Number of ones in a 4-bit live pattern.
  function automatic int count4(input logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  // Offset (0..3) of the i-th set bit of a 4-bit live pattern, 0 if none.
  function automatic int nth_live(input logic [3:0] v, input int i);
    int seen;
    seen = 0;
    for (int b = 0; b < 4; b++) begin
      if (v[b]) begin
        if (seen == i) return b;
        seen++;
      end
    end
    return 0;
  endfunction

endpackage
