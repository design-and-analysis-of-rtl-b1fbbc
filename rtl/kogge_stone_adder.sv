// Kogge-Stone parallel prefix adder, WIDTH bits, no carry-in.
//
// Three steps, as in any parallel prefix adder:
//  1. pre-computation: bit propagate P_i = a_i ^ b_i and generate G_i = a_i & b_i;
//  2. prefix computation: log2(WIDTH) levels of prefix cells. At the level of
//     span d every bit i >= d merges its group with the group ending at bit
//     i-d. Where the merged group reaches bit 0 (d <= i < 2d) a grey cell is
//     enough (its generate is the carry out of bit i and stays fixed from then
//     on); further up a black cell also forms the group propagate. Bits below
//     d are passed on. Every level has fan-out 1 per cell output of the
//     previous level, and the depth is ceil(log2(WIDTH)) cells;
//  3. post-computation: S_i = P_i ^ C_(i-1), with C_(-1) = 0.
// For WIDTH = 16 this gives 34 black and 15 grey cells (N_BLACK, N_GREY).
// cout is the carry out of the top bit. Purely combinational, no clock.
// The default WIDTH of 32 is the final adder of a 16 x 16 multiplier.
module kogge_stone_adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  function automatic int count_black(input int w);
    int n;
    n = 0;
    for (int d = 1; d < w; d = d * 2) n += (w > 2 * d) ? w - 2 * d : 0;
    return n;
  endfunction

  localparam int N_BLACK = count_black(WIDTH);
  localparam int N_GREY  = WIDTH - 1;

  // g[l], p[l]: group generate/propagate at the input of level l.
  logic [WIDTH-1:0] g [LEVELS+1];
  logic [WIDTH-1:0] p [LEVELS+1];

  // Pre-computation
  assign p[0] = a ^ b;
  assign g[0] = a & b;

  // Prefix computation
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int D = 1 << l;
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i < D) begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end else if (i < 2 * D) begin : g_grey
        grey_cell u_grey (
          .g_hi(g[l][i]), .p_hi(p[l][i]), .g_lo(g[l][i-D]),
          .g   (g[l+1][i])
        );
        // The group now reaches bit 0; its propagate is never used again.
        assign p[l+1][i] = 1'b0;
      end else begin : g_black
        black_cell u_black (
          .g_hi(g[l][i]),   .p_hi(p[l][i]), .g_lo(g[l][i-D]), .p_lo(p[l][i-D]),
          .g   (g[l+1][i]), .p   (p[l+1][i])
        );
      end
    end
  end

  // Post-computation: carry into bit i is the group generate of bits i-1..0.
  logic [WIDTH-1:0] carry;
  assign carry = g[LEVELS];
  assign sum   = p[0] ^ {carry[WIDTH-2:0], 1'b0};
  assign cout  = carry[WIDTH-1];
endmodule
