// output_register: assembles the 16-bit result words of the smoothing.
//
// After the three words of column w have been loaded, the filter delivers
// the result for the last pixel of column w-1 (bit 15 of its output) and
// for the first 15 pixels of column w (bits 14:0). On each load this
// register therefore outputs {the 15 results kept from the previous load,
// the newest bit 15}: the complete word of column w-1. The 15 new leading
// results are kept for the next load. Output word bit 15 is the left-most
// pixel.
//
// Timing: one load per word column, effective at the rising edge; dout is
// stable until the next load and is written to memory from there.
module output_register #(
  parameter int unsigned WORD_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [WORD_W-1:0] px,
  output logic [WORD_W-1:0] dout
);

  logic [WORD_W-2:0] keep;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      keep <= '0;
      dout <= '0;
    end else if (load) begin
      dout <= {keep, px[WORD_W-1]};
      keep <= px[WORD_W-2:0];
    end
  end

endmodule
