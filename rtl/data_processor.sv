// data_processor: the 16-pixel-wide smoothing datapath.
//
// Three 16+2 bit row registers hold the words of rows n-1, n and n+1 at
// the same word column, each extended by the last two pixels of the
// previous column. A combinational filter (Dineen or Unger, chosen by
// `unger`) turns the three 18-bit strips into 16 results, and the output
// register assembles them into the result word of the previous column.
//
// Interface: memory data enters on din; the row register to load is chosen
// by ld_a/ld_b/ld_c (one per memory read). din_valid=0 loads a white word
// instead of din, which is how pixels outside the image are supplied. clr
// empties the row registers at the start of a row. ld_out captures the
// filter output; dout is the word to be written.
// Timing: all loads act at the rising edge; the filter has the clock
// cycles between the last row load and ld_out to settle (the memory
// precharge time in the controller's schedule).
// Carrying both filters with a run-time select stands in for loading one
// of two FPGA configurations; the white border is this design's choice.
module data_processor #(
  parameter int unsigned WORD_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] din,
  input  logic              din_valid,
  input  logic              ld_a,
  input  logic              ld_b,
  input  logic              ld_c,
  input  logic              clr,
  input  logic              ld_out,
  input  logic              unger,
  input  logic [3:0]        theta,
  output logic [WORD_W-1:0] dout
);

  logic [WORD_W-1:0] dbus;
  logic [WORD_W+1:0] row_a, row_b, row_c;
  logic [WORD_W-1:0] px_dineen, px_unger, px;

  assign dbus = din_valid ? din : '0;

  line_register #(.WORD_W(WORD_W)) u_reg_a (
    .clk, .rst_n, .clr, .load(ld_a), .din(dbus), .q(row_a));
  line_register #(.WORD_W(WORD_W)) u_reg_b (
    .clk, .rst_n, .clr, .load(ld_b), .din(dbus), .q(row_b));
  line_register #(.WORD_W(WORD_W)) u_reg_c (
    .clk, .rst_n, .clr, .load(ld_c), .din(dbus), .q(row_c));

  dineen_filter #(.WORD_W(WORD_W)) u_dineen (
    .top(row_a), .mid(row_b), .bot(row_c), .theta, .px(px_dineen));
  unger_filter #(.WORD_W(WORD_W)) u_unger (
    .top(row_a), .mid(row_b), .bot(row_c), .px(px_unger));

  assign px = unger ? px_unger : px_dineen;

  output_register #(.WORD_W(WORD_W)) u_out (
    .clk, .rst_n, .load(ld_out), .px, .dout);

endmodule
