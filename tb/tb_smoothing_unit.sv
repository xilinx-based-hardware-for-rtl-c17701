// tb_smoothing_unit: smooths random 8x64 images with both filters and
// several thresholds, against a pixel-by-pixel reference with a white
// border. Also checks the run time in clocks, the access spacing, that only
// the destination page is written, and that done is reported.
module tb_smoothing_unit;
  localparam int RB = 3, CB = 6, PB = 2, ACT = 4, PRE = 4;
  localparam int ROWS = 1 << RB, COLS = 1 << CB, WPR = COLS / 16;
  localparam int AW = PB + RB + CB - 4;

  logic clk = 0, rst_n = 0, run = 0, unger = 0;
  logic [3:0] theta = 0;
  logic [PB-1:0] src_page = 2'd1, dst_page = 2'd2;
  logic mem_req, mem_we, done, busy;
  logic [AW-1:0] mem_addr;
  logic [15:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  smoothing_unit #(.ROW_BITS(RB), .COL_BITS(CB), .PAGE_BITS(PB),
                   .ACT_CLKS(ACT), .PRE_CLKS(PRE)) dut (.*);

  drc_dram_model #(.AW(AW), .ACT_CLKS(ACT), .PRE_CLKS(PRE)) mdl (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rdata(mem_rdata), .ml(1'b0));

  bit img [ROWS][COLS];

  function automatic bit pix(int r, int c);
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return 0;
    return img[r][c];
  endfunction

  function automatic bit ref_px(int r, int c, bit ung, int th);
    bit w [3][3];
    int n = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        w[i][j] = pix(r + i - 1, c + j - 1);
        n += w[i][j];
      end
    if (!ung) return n > th;
    return ((w[0][1] | w[0][2] | w[1][2]) & (w[1][0] | w[2][0] | w[2][1])) |
           ((w[0][0] | w[0][1] | w[1][0]) & (w[1][2] | w[2][1] | w[2][2]));
  endfunction

  task automatic run_one(bit ung, int th, int density);
    int t0, t1, exp_clk;
    logic [15:0] w, e;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        img[r][c] = ($urandom % 100) < density;
    for (int i = 0; i < 2**AW; i++) mdl.mem[i] = 16'hA5A5;
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < WPR; k++) begin
        for (int b = 0; b < 16; b++) w[15-b] = img[r][k*16+b];
        mdl.mem[{src_page, RB'(r), (CB-4)'(k)}] = w;
      end
    unger = ung; theta = 4'(th);
    @(negedge clk) run = 1;
    t0 = cycles;
    while (!done) @(negedge clk);
    t1 = cycles;
    exp_clk = 1 + ROWS * (1 + 3 * (ACT + PRE) + WPR * 4 * (ACT + PRE) + 1);
    checks++;
    if (t1 - t0 != exp_clk) begin
      failures++; $display("FAIL clocks %0d expected %0d", t1 - t0, exp_clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (!done || busy) begin failures++; $display("FAIL done not held"); end
    run = 0;
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done after run low"); end
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < WPR; k++) begin
        for (int b = 0; b < 16; b++) e[15-b] = ref_px(r, k*16+b, ung, th);
        w = mdl.mem[{dst_page, RB'(r), (CB-4)'(k)}];
        checks++;
        if (w !== e) begin
          failures++;
          $display("FAIL ung=%0d th=%0d row %0d word %0d got %h exp %h", ung, th, r, k, w, e);
        end
      end
    for (int i = 0; i < 2**AW; i++)
      if (i[AW-1 -: PB] != dst_page && i[AW-1 -: PB] != src_page) begin
        checks++;
        if (mdl.mem[i] !== 16'hA5A5) begin failures++; $display("FAIL stray write %0d", i); end
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_one(0, 4, 50);
    run_one(0, 2, 30);
    run_one(0, 6, 70);
    run_one(1, 0, 40);
    run_one(1, 0, 20);
    run_one(1, 0, 60);
    checks++;
    if (mdl.errors != 0 || mdl.min_gap != ACT + PRE) begin
      failures++; $display("FAIL access spacing errors=%0d min_gap=%0d", mdl.errors, mdl.min_gap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
