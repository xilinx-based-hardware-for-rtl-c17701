// mem_decoder: maps the card memory into a window of the PC's upper memory.
//
// The window is 2^WIN_BITS bytes at WIN_BASE (default 64 KB at D0000h).
// A hit forms the on-board 16-bit word address from the window page
// register (upper bits) and SA[WIN_BITS-1:1] (lower bits), so the whole
// card memory is reached page by page through the one window.
// Combinational. Window position and size are this design's choices.
module mem_decoder #(
  parameter logic [19:0]  WIN_BASE = 20'hD0000,
  parameter int unsigned  WIN_BITS = 16,
  parameter int unsigned  MEM_AW   = 18,
  localparam int unsigned PG_BITS  = MEM_AW - (WIN_BITS - 1)
) (
  input  logic [19:0]        sa,
  input  logic               memr_n,
  input  logic               memw_n,
  input  logic [PG_BITS-1:0] page,
  output logic               hit,
  output logic               rd,
  output logic               wr,
  output logic [MEM_AW-1:0]  addr
);

  always_comb begin
    hit  = sa[19:WIN_BITS] == WIN_BASE[19:WIN_BITS];
    rd   = hit && !memr_n;
    wr   = hit && !memw_n;
    addr = {page, sa[WIN_BITS-1:1]};
  end

endmodule
