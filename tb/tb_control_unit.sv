// tb_control_unit: runs the controller against counter models of the two
// jump conditions (3 rows of 2 words). Checks the number of every control
// strobe, that strobes last one clock, that memory strobes are at least
// ACT+PRE clocks apart, the clock count to done, and the stop/restart.
module tb_control_unit;
  import smooth_pkg::*;
  localparam int ACT = 4, PRE = 4, ROWS = 3, WPR = 2;
  logic clk = 0, rst_n = 0, run = 0, more_words, more_rows, done;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  int row = 0, word = 0, cyc = 0, last_mem = -100, n_rd = 0, n_wr = 0, n_ldout = 0;
  int gap_err = 0, t_start = 0;
  ctrl_t prev = CTRL_NONE;
  always #5 clk = ~clk;
  control_unit #(.ACT_CLKS(ACT), .PRE_CLKS(PRE)) dut (.*);

  assign more_words = word <= WPR;
  assign more_rows  = row != ROWS - 1;

  always @(posedge clk) begin
    cyc++;
    if (ctrl.row_clr) row <= 0; else if (ctrl.row_inc) row <= row + 1;
    if (ctrl.word_clr) word <= 0; else if (ctrl.word_inc) word <= word + 1;
    if (ctrl.mem_rd || ctrl.mem_wr) begin
      if (cyc - last_mem < ACT + PRE) gap_err++;
      last_mem = cyc;
    end
    n_rd += ctrl.mem_rd; n_wr += ctrl.mem_wr; n_ldout += ctrl.ld_out;
    if ((ctrl.mem_rd && prev.mem_rd) || (ctrl.ld_a && prev.ld_a) || (ctrl.word_inc && prev.word_inc))
      gap_err++;
    prev <= ctrl;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      n_rd = 0; n_wr = 0; n_ldout = 0; gap_err = 0;
      repeat (5) @(negedge clk);
      expect_eq("idle strobes", int'(ctrl != CTRL_NONE), 0);
      run = 1; t_start = cyc;
      while (!done) @(negedge clk);
      expect_eq("clocks", cyc - t_start, 1 + ROWS * (2 + (ACT + PRE) * (3 + 4 * WPR)));
      expect_eq("reads", n_rd, ROWS * 3 * (WPR + 1));
      expect_eq("writes", n_wr, ROWS * WPR);
      expect_eq("ld_out", n_ldout, ROWS * (WPR + 1));
      expect_eq("gap errors", gap_err, 0);
      repeat (4) @(negedge clk);
      expect_eq("done held", int'(done), 1);
      run = 0; @(negedge clk);
      expect_eq("done cleared", int'(done), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
