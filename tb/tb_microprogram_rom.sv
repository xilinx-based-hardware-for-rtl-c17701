// tb_microprogram_rom: walks the program as the controller would for one
// row of W word columns and counts, per row, reads, writes, loads and
// clocks, comparing them with the access schedule (3 reads per column,
// 1 write per column after the first, ACT+PRE clocks per access).
module tb_microprogram_rom;
  import smooth_pkg::*;
  localparam int ACT = 4, PRE = 4;
  logic [UADDR_W-1:0] addr;
  uinstr_t instr;
  int checks = 0, failures = 0;
  microprogram_rom #(.ACT_CLKS(ACT), .PRE_CLKS(PRE)) dut (.*);

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    for (int words = 1; words <= 8; words++) begin
      automatic int rd = 0, wr = 0, lda = 0, ldo = 0, clocks = 0, rows_done = 0, wcnt = 0, steps = 0;
      automatic int rows = 2;
      addr = '0;
      while (steps < 10000) begin
        #1;
        steps++;
        if (instr.ctrl.done) break;
        clocks += instr.delay + 1;
        rd  += instr.ctrl.mem_rd; wr += instr.ctrl.mem_wr;
        lda += instr.ctrl.ld_a;   ldo += instr.ctrl.ld_out;
        if (instr.ctrl.word_clr) wcnt = 0;
        if (instr.ctrl.word_inc) wcnt++;
        if (instr.ctrl.mem_rd && instr.delay != ACT - 1) begin failures++; $display("FAIL rd delay"); end
        unique case (instr.jsel)
          J_NEXT:   addr = addr + 1'b1;
          J_ALWAYS: addr = instr.jaddr;
          J_WORDS:  addr = (wcnt <= words) ? instr.jaddr : addr + 1'b1;
          J_ROWS:   begin rows_done++; addr = (rows_done < rows) ? instr.jaddr : addr + 1'b1; end
        endcase
      end
      expect_eq("reads",  rd,  rows * 3 * (words + 1));
      expect_eq("writes", wr,  rows * words);
      expect_eq("ld_a",   lda, rows * (words + 1));
      expect_eq("ld_out", ldo, rows * (words + 1));
      expect_eq("clocks", clocks, 1 + rows * (2 + (ACT + PRE) * (3 + 4 * words)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
