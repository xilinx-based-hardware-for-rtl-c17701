// tb_address_generator: random counter operations on a 8-row, 64-pixel
// image; source/destination addresses, the outside-image flag and both
// jump conditions are compared with an integer model after every step.
module tb_address_generator;
  import smooth_pkg::*;
  localparam int RB = 3, CB = 6, PB = 2;
  localparam int ROWS = 8, WPR = 4, AW = PB + RB + CB - 4;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl = CTRL_NONE;
  logic [PB-1:0] src_page = 2'd1, dst_page = 2'd3;
  logic [AW-1:0] src_addr, dst_addr;
  logic src_valid, more_words, more_rows;
  int checks = 0, failures = 0;
  int row = 0, disp = 0, word = 0;
  always #5 clk = ~clk;
  address_generator #(.ROW_BITS(RB), .COL_BITS(CB), .PAGE_BITS(PB)) dut (.*);

  task automatic check();
    int sr = (row + disp + ROWS) % ROWS;
    bit v = word < WPR && row + disp >= 0 && row + disp < ROWS;
    checks++;
    if (src_addr !== AW'(src_page * ROWS * WPR + sr * WPR + word % WPR) ||
        dst_addr !== AW'(dst_page * ROWS * WPR + row * WPR + (word + WPR - 1) % WPR) ||
        src_valid !== v || more_words !== (word <= WPR) || more_rows !== (row != ROWS - 1)) begin
      failures++;
      $display("FAIL row=%0d disp=%0d word=%0d src=%h dst=%h v=%b mw=%b mr=%b",
               row, disp, word, src_addr, dst_addr, src_valid, more_words, more_rows);
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    ctrl.row_clr = 1; ctrl.word_clr = 1; ctrl.disp_m1 = 1;
    @(negedge clk); ctrl = CTRL_NONE; disp = -1;
    check();
    for (int i = 0; i < 3000; i++) begin
      automatic int op = $urandom % 6;
      ctrl = CTRL_NONE;
      unique case (op)
        0: begin ctrl.row_inc = 1; row = (row + 1) % ROWS; end
        1: if (word <= WPR) begin ctrl.word_inc = 1; word++; end
           else begin ctrl.word_clr = 1; word = 0; end
        2: begin ctrl.disp_m1 = 1; disp = -1; end
        3: if (disp < 1) begin ctrl.disp_up = 1; disp++; end
        4: begin ctrl.word_clr = 1; word = 0; end
        5: if ($urandom % 4 == 0) begin ctrl.row_clr = 1; row = 0; end
      endcase
      @(negedge clk);
      ctrl = CTRL_NONE;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
