// microprogram_rom: the smoothing microprogram, 32 words.
//
// A read-only table addressed by the microprogram address counter. On the
// original card it was built from FPGA look-up tables, one 32x1 ROM per
// output bit; here it is a constant case table, which synthesises to the
// same kind of LUT ROM. The program itself is this design's own. It
// smooths the whole image row by row:
//
//   0      clear row counter
//   1      row start: clear word counter and row registers, displacement -1
//   2..8   first word column of the row: read rows n-1, n, n+1, no write
//   9..17  loop per word column: three reads, filter settles during the
//          precharge of the third read, load output register, write the
//          previous column's result, next word; jump to 9 while words left
//   18     next row; jump to 1 while rows left
//   19     done, stays here
//
// Every memory access is one instruction that issues the access and waits
// ACT_CLKS clocks (the active phase), followed by one that loads the data
// and waits PRE_CLKS clocks (the precharge), so accesses follow each other
// every ACT_CLKS+PRE_CLKS clocks. With an assumed 20 ns clock the defaults
// give the 80 ns active phase and the 80 ns stretched precharge of the
// original timing, during which the filter result settles.
// Combinational: instr follows addr.
module microprogram_rom
  import smooth_pkg::*;
#(
  parameter int unsigned ACT_CLKS = 4,
  parameter int unsigned PRE_CLKS = 4
) (
  input  logic [UADDR_W-1:0] addr,
  output uinstr_t            instr
);

  localparam logic [DLY_W-1:0] DA  = DLY_W'(ACT_CLKS - 1);
  localparam logic [DLY_W-1:0] DP  = DLY_W'(PRE_CLKS - 1);
  localparam logic [DLY_W-1:0] DP1 = DLY_W'(PRE_CLKS - 2);
  localparam logic [UADDR_W-1:0] A_ROW  = 5'd1;
  localparam logic [UADDR_W-1:0] A_LOOP = 5'd9;
  localparam logic [UADDR_W-1:0] A_HALT = 5'd19;

  function automatic uinstr_t ui(jsel_e j, logic [UADDR_W-1:0] ja,
                                 logic [DLY_W-1:0] d, ctrl_t c);
    ui.jsel  = j;
    ui.jaddr = ja;
    ui.delay = d;
    ui.ctrl  = c;
  endfunction

  always_comb begin
    ctrl_t c;
    c = CTRL_NONE;
    unique case (addr)
      5'd0:  begin c.row_clr = 1'b1;                          instr = ui(J_NEXT, '0, '0, c); end
      5'd1:  begin c.word_clr = 1'b1; c.disp_m1 = 1'b1;
                   c.regs_clr = 1'b1;                         instr = ui(J_NEXT, '0, '0, c); end
      5'd2:  begin c.mem_rd = 1'b1;                           instr = ui(J_NEXT, '0, DA, c); end
      5'd3:  begin c.ld_a = 1'b1; c.disp_up = 1'b1;           instr = ui(J_NEXT, '0, DP, c); end
      5'd4:  begin c.mem_rd = 1'b1;                           instr = ui(J_NEXT, '0, DA, c); end
      5'd5:  begin c.ld_b = 1'b1; c.disp_up = 1'b1;           instr = ui(J_NEXT, '0, DP, c); end
      5'd6:  begin c.mem_rd = 1'b1;                           instr = ui(J_NEXT, '0, DA, c); end
      5'd7:  begin c.ld_c = 1'b1;                             instr = ui(J_NEXT, '0, DP1, c); end
      5'd8:  begin c.ld_out = 1'b1; c.disp_m1 = 1'b1;
                   c.word_inc = 1'b1;                         instr = ui(J_NEXT, '0, '0, c); end
      5'd9:  begin c.mem_rd = 1'b1;                           instr = ui(J_NEXT, '0, DA, c); end
      5'd10: begin c.ld_a = 1'b1; c.disp_up = 1'b1;           instr = ui(J_NEXT, '0, DP, c); end
      5'd11: begin c.mem_rd = 1'b1;                           instr = ui(J_NEXT, '0, DA, c); end
      5'd12: begin c.ld_b = 1'b1; c.disp_up = 1'b1;           instr = ui(J_NEXT, '0, DP, c); end
      5'd13: begin c.mem_rd = 1'b1;                           instr = ui(J_NEXT, '0, DA, c); end
      5'd14: begin c.ld_c = 1'b1;                             instr = ui(J_NEXT, '0, DP1, c); end
      5'd15: begin c.ld_out = 1'b1;                           instr = ui(J_NEXT, '0, '0, c); end
      5'd16: begin c.mem_wr = 1'b1;                           instr = ui(J_NEXT, '0, DA, c); end
      5'd17: begin c.word_inc = 1'b1; c.disp_m1 = 1'b1;       instr = ui(J_WORDS, A_LOOP, DP, c); end
      5'd18: begin c.row_inc = 1'b1;                          instr = ui(J_ROWS, A_ROW, '0, c); end
      default: begin c.done = 1'b1;                           instr = ui(J_ALWAYS, A_HALT, '0, c); end
    endcase
  end

endmodule
