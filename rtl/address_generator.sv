// address_generator: source and destination addresses for the smoothing.
//
// The image is 2^ROW_BITS rows of 2^COL_BITS pixels, packed 16 pixels per
// memory word, so a word address is simply {page, row, word}; no adder is
// needed across the two counters. The generator holds
//   - a ROW_BITS-wide row counter: the output row n,
//   - an up/down row displacement of -1, 0 or +1 that selects rows n-1,
//     n and n+1 for the three source reads,
//   - a WORD_CNT_BITS-wide word counter. It runs one step past the last
//     word of the row: that extra step feeds a white word so the right-most
//     pixel of the row can be finished. The destination word lags by one.
// src_valid is low when the source word lies outside the image (row -1,
// row 2^ROW_BITS, or the extra word step); reads are then not issued and
// the data processor takes a white word. more_words/more_rows are the two
// jump conditions of the controller.
// The 10-bit row and 7-bit word counters for a 1024x1024 image follow the
// original card; the displacement form of the up/down counting, the page
// field and the border rules are this design's choices.
// Timing: counter operations act at the rising edge, outputs are
// combinational from the counters.
module address_generator
  import smooth_pkg::*;
#(
  parameter int unsigned ROW_BITS      = 10,
  parameter int unsigned COL_BITS      = 10,
  parameter int unsigned WORD_CNT_BITS = COL_BITS - 4 + 1,
  parameter int unsigned PAGE_BITS     = 2,
  localparam int unsigned WB           = COL_BITS - 4,
  localparam int unsigned AW           = PAGE_BITS + ROW_BITS + WB
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ctrl_t                ctrl,
  input  logic [PAGE_BITS-1:0] src_page,
  input  logic [PAGE_BITS-1:0] dst_page,
  output logic [AW-1:0]        src_addr,
  output logic [AW-1:0]        dst_addr,
  output logic                 src_valid,
  output logic                 more_words,
  output logic                 more_rows
);

  localparam logic [WORD_CNT_BITS-1:0] WPR      = WORD_CNT_BITS'(1 << WB);
  localparam logic [ROW_BITS-1:0]      LAST_ROW = '1;

  logic [ROW_BITS-1:0]      row;
  logic signed [1:0]        disp;
  logic [WORD_CNT_BITS-1:0] word;
  logic [ROW_BITS-1:0]      src_row;
  logic [WORD_CNT_BITS-1:0] dst_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row  <= '0;
      disp <= '0;
      word <= '0;
    end else begin
      if (ctrl.row_clr)       row <= '0;
      else if (ctrl.row_inc)  row <= row + 1'b1;
      if (ctrl.disp_m1)       disp <= -2'sd1;
      else if (ctrl.disp_up)  disp <= disp + 2'sd1;
      if (ctrl.word_clr)      word <= '0;
      else if (ctrl.word_inc) word <= word + 1'b1;
    end
  end

  always_comb begin
    src_row   = row + ROW_BITS'(disp);
    dst_word  = word - 1'b1;
    src_valid = (word < WPR)
              && !(row == '0 && disp == -2'sd1)
              && !(row == LAST_ROW && disp == 2'sd1);
    src_addr  = {src_page, src_row, word[WB-1:0]};
    dst_addr  = {dst_page, row, dst_word[WB-1:0]};
    more_words = (word <= WPR);
    more_rows  = (row != LAST_ROW);
  end

endmodule
