// dineen_filter: 16 parallel Dineen smoothing cells.
//
// For every output pixel the black pixels (logic 1) of its 3x3 window are
// counted; the pixel is black when the count exceeds the limit theta.
// As on the original card, the count is built in two stages: first the
// number of black pixels in every 3-pixel-high column of the 18-column
// strip (0..3), then the sum of three neighbouring column counts, so each
// column count is shared by three windows.
//
// Inputs are the three 18-bit row registers (rows n-1, n, n+1). Output bit
// j is the result for the pixel whose centre is at bit j+1 of the rows;
// its left neighbour is bit j+2, its right neighbour bit j. Purely
// combinational. "Exceeds" is implemented as count > theta.
module dineen_filter #(
  parameter int unsigned WORD_W = 16
) (
  input  logic [WORD_W+1:0] top,
  input  logic [WORD_W+1:0] mid,
  input  logic [WORD_W+1:0] bot,
  input  logic [3:0]        theta,
  output logic [WORD_W-1:0] px
);

  logic [1:0] col [WORD_W+2];
  logic [3:0] cnt [WORD_W];

  always_comb begin
    for (int i = 0; i < WORD_W + 2; i++)
      col[i] = 2'(top[i]) + 2'(mid[i]) + 2'(bot[i]);
    for (int j = 0; j < WORD_W; j++) begin
      cnt[j] = 4'(col[j]) + 4'(col[j+1]) + 4'(col[j+2]);
      px[j]  = cnt[j] > theta;
    end
  end

endmodule
