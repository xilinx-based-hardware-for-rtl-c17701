// line_register: one 16+2 bit row register of the data processor.
//
// The register holds the current 16-pixel word of one image row together
// with the last two pixels of the previous word of that row, so that the
// 3x3 window can be formed across the word boundary. On every load the
// two right-most pixels of the word being replaced move into the top two
// bits automatically, as in the original data processor. Pixel order:
// bit 15 of a memory word is the left-most pixel; q[17] is therefore the
// left-most pixel of the 18 (previous word pixel 14), q[0] the right-most
// (current word pixel 15).
//
// Timing: load and clr take effect at the rising clock edge; clr wins.
// The clear input (used at the start of every row so that the left image
// border reads as white) is this design's addition.
module line_register #(
  parameter int unsigned WORD_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              load,
  input  logic [WORD_W-1:0] din,
  output logic [WORD_W+1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (clr)  q <= '0;
    else if (load) q <= {q[1:0], din};
  end

endmodule
