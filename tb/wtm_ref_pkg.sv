// Reference model for the testbenches: the product an approximate Wallace
// multiplier of this schedule gives, computed column by column on a bit
// matrix. Rows are reduced in groups of four per stage; in a group of three
// or four rows each column's live bits are counted and replaced by a sum bit
// (same column) and a carry bit (next column). The count is exact except for
// four live bits whose first three are all 1: the approximate 4:2 compressor
// then gives one less. Groups of one or two rows are passed on. The matrix
// is finally summed with plain integer arithmetic.
package wtm_ref_pkg;

  function automatic longint unsigned approx_product(input int n,
                                                     input longint unsigned a,
                                                     input longint unsigned b);
    bit v  [64][128];
    bit l  [64][128];
    bit nv [64][128];
    bit nl [64][128];
    int r, nr, w, k, cnt, t;
    int vals [4];
    longint unsigned acc;
    w = 2 * n;
    for (int j = 0; j < n; j++)
      for (int c = 0; c < w; c++) begin
        v[j][c] = 0;
        l[j][c] = 0;
      end
    for (int j = 0; j < n; j++)
      for (int i = 0; i < n; i++) begin
        v[j][i+j] = a[i] & b[j];
        l[j][i+j] = 1;
      end
    r = n;
    while (r > 2) begin
      for (int j = 0; j < r; j++)
        for (int c = 0; c < w; c++) begin
          nv[j][c] = 0;
          nl[j][c] = 0;
        end
      nr = 0;
      for (int base = 0; base < r; base += 4) begin
        k = (r - base < 4) ? r - base : 4;
        if (k <= 2) begin
          for (int q = 0; q < k; q++)
            for (int c = 0; c < w; c++) begin
              nv[nr+q][c] = v[base+q][c];
              nl[nr+q][c] = l[base+q][c];
            end
          nr += k;
        end else begin
          for (int c = 0; c < w; c++) begin
            cnt = 0;
            for (int q = 0; q < k; q++)
              if (l[base+q][c]) begin
                vals[cnt] = int'(v[base+q][c]);
                cnt++;
              end
            t = 0;
            for (int q = 0; q < cnt; q++) t += vals[q];
            if (cnt == 4 && vals[0] == 1 && vals[1] == 1 && vals[2] == 1) t -= 1;
            if (cnt >= 1) begin
              nv[nr][c] = bit'(t % 2);
              nl[nr][c] = 1;
            end
            if (cnt >= 2 && c + 1 < w) begin
              nv[nr+1][c+1] = bit'(t / 2);
              nl[nr+1][c+1] = 1;
            end
          end
          nr += 2;
        end
      end
      for (int j = 0; j < nr; j++)
        for (int c = 0; c < w; c++) begin
          v[j][c] = nv[j][c];
          l[j][c] = nl[j][c];
        end
      r = nr;
    end
    acc = 0;
    for (int j = 0; j < r; j++)
      for (int c = 0; c < w; c++)
        if (v[j][c]) acc += (64'd1 << c);
    if (w < 64) acc &= (64'd1 << w) - 1;
    return acc;
  endfunction

endpackage
