// Wallace partial product reduction tree with approximate 4:2 compressors.
//
// Takes the N partial product rows (each placed in a 2N-bit word, as pp_gen
// gives them) and reduces them to two rows whose sum is the (approximate)
// product: row_s holds sum bits, row_c carry bits. The schedule is the one in
// wtm_pkg: rows in groups of four, per column an approximate 4:2 compressor
// (four live bits), a full adder (three), a half adder (two) or a wire (one).
// For N = 16 there are three stages, 16 -> 8 -> 4 -> 2 rows. Within a group the
// compressor takes the four rows in order as x1..x4, so it is wrong (by one
// unit of the column weight, always downwards) when the bits of the first
// three rows of the group are all 1 in that column. All other cells are
// exact. Bits of pp outside the partial product parallelogram are ignored.
//
// Reducing in groups of four rows per stage and using the approximate
// compressor in every column are this design's choices; the reference text
// only names FA, HA and 4:2 compressors as the reduction cells.
// Purely combinational, no clock.
module wallace_reduce
  import wtm_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [2*N-1:0] pp [N],
  output logic [2*N-1:0] row_s,
  output logic [2*N-1:0] row_c
);
  localparam int W   = 2 * N;
  localparam int NST = num_stages(N);

  for (genvar s = 0; s < NST; s++) begin : g_stage
    localparam int R  = rows_at(N, s);
    localparam int RN = rows_at(N, s + 1);

    // din: rows at the input of this stage, dout: rows it passes on.
    // Rows beyond the current count are zero.
    logic [W-1:0] din  [N];
    logic [W-1:0] dout [N];

    if (s == 0) begin : g_first
      assign din = pp;
    end else begin : g_next
      assign din = g_stage[s-1].dout;
    end

    for (genvar g = 0; 4 * g < R; g++) begin : g_grp
      localparam int K = (R - 4 * g >= 4) ? 4 : R - 4 * g;

      if (K <= 2) begin : g_pass
        assign dout[2*g] = din[4*g];
        if (K == 2) begin : g_second
          assign dout[2*g+1] = din[4*g+1];
        end
      end else begin : g_red
        localparam col_mask_t M0 = live_mask(N, s, 4 * g);
        localparam col_mask_t M1 = live_mask(N, s, 4 * g + 1);
        localparam col_mask_t M2 = live_mask(N, s, 4 * g + 2);
        localparam col_mask_t M3 = (K == 4) ? live_mask(N, s, 4 * g + 3) : '0;

        logic [W-1:0] sum_row;  // sum bit of each column
        logic [W-1:0] cy_row;   // carry out of each column (weight of column + 1)

        for (genvar c = 0; c < W; c++) begin : g_col
          localparam logic [3:0] LV  = {M3[c], M2[c], M1[c], M0[c]};
          localparam int         CNT = count4(LV);
          localparam int         I0  = 4 * g + nth_live(LV, 0);
          localparam int         I1  = 4 * g + nth_live(LV, 1);
          localparam int         I2  = 4 * g + nth_live(LV, 2);
          localparam int         I3  = 4 * g + nth_live(LV, 3);

          if (CNT == 4) begin : g_cmp
            approx_compressor_4_2 u_cmp (
              .x1(din[I0][c]), .x2(din[I1][c]), .x3(din[I2][c]), .x4(din[I3][c]),
              .s (sum_row[c]),    .c (cy_row[c])
            );
          end else if (CNT == 3) begin : g_fa
            full_adder u_fa (
              .a(din[I0][c]), .b(din[I1][c]), .cin(din[I2][c]),
              .s(sum_row[c]),    .c(cy_row[c])
            );
          end else if (CNT == 2) begin : g_ha
            half_adder u_ha (
              .a(din[I0][c]), .b(din[I1][c]),
              .s(sum_row[c]),    .c(cy_row[c])
            );
          end else if (CNT == 1) begin : g_wire
            assign sum_row[c] = din[I0][c];
            assign cy_row[c]  = 1'b0;
          end else begin : g_empty
            assign sum_row[c] = 1'b0;
            assign cy_row[c]  = 1'b0;
          end
        end

        // The carry out of the top column is always 0: the rows never sum to
        // 2^W or more, because every cell is exact or rounds down.
        assign dout[2*g]   = sum_row;
        assign dout[2*g+1] = {cy_row[W-2:0], 1'b0};
      end
    end

    for (genvar j = RN; j < N; j++) begin : g_zero
      assign dout[j] = '0;
    end
  end

  if (NST == 0) begin : g_no_stage
    assign row_s = pp[0];
    if (N > 1) begin : g_two
      assign row_c = pp[1];
    end else begin : g_one
      assign row_c = '0;
    end
  end else begin : g_out
    assign row_s = g_stage[NST-1].dout[0];
    assign row_c = g_stage[NST-1].dout[1];
  end
endmodule
