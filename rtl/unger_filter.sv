// unger_filter: 16 parallel Unger smoothing cells.
//
// The window positions are named after the pattern of the original method:
//   A = top-middle, top-right, middle-right
//   B = middle-left, bottom-left, bottom-middle
//   C = top-left, top-middle, middle-left
//   D = middle-right, bottom-middle, bottom-right
// Four 3-input ORs test each group for at least one black pixel and a
// 4-input function forms the result: black = (A and B) or (C and D).
// The centre pixel is not used: an isolated spur is removed and a one-pixel
// hole in a stroke is filled.
//
// Inputs are the 18-bit row registers; output bit j is centred on bit j+1
// (left neighbour j+2, right neighbour j). Purely combinational.
module unger_filter #(
  parameter int unsigned WORD_W = 16
) (
  input  logic [WORD_W+1:0] top,
  input  logic [WORD_W+1:0] mid,
  input  logic [WORD_W+1:0] bot,
  output logic [WORD_W-1:0] px
);

  logic [WORD_W-1:0] a, b, c, d;

  always_comb begin
    for (int j = 0; j < WORD_W; j++) begin
      // index j+2 = left column, j+1 = centre column, j = right column
      a[j] = top[j+1] | top[j]   | mid[j];
      b[j] = mid[j+2] | bot[j+2] | bot[j+1];
      c[j] = top[j+2] | top[j+1] | mid[j+2];
      d[j] = mid[j]   | bot[j+1] | bot[j];
      px[j] = (a[j] & b[j]) | (c[j] & d[j]);
    end
  end

endmodule
