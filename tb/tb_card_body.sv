// tb_card_body: the stimulus and checking half of the card testbenches.
// The wrapper instantiates the card and this module side by side. It owns
// the clock, reset, the PC bus master and the DRAM controller model, and
// runs one complete use of the card:
//   1. programs the DRAM controller mode word through the I/O ports,
//   2. loads a random packed image into the source page, mixing memory
//      window writes, data port writes and DMA writes, and reads part of it
//      back the same three ways,
//   3. for each run: writes the control port (filter, theta, pages, run),
//      tries PC memory accesses while the smoothing runs (they must be
//      refused), polls status until done, clears run, and reads the whole
//      destination page through the window, comparing every word with a
//      pixel-level reference (white border),
//   4. checks the processor's memory schedule: reads suppressed at the
//      image border, write count, span from first read to last write and
//      the minimum spacing of memory accesses.
// Counts each mechanism and fails on any that never happened.
module tb_card_body #(
  parameter int ROW_BITS = 10,
  parameter int COL_BITS = 10,
  parameter int MEM_AW   = 18,
  parameter int ACT      = 4,
  parameter int PRE      = 4,
  parameter int N_RUNS   = 2
) (
  output logic              clk,
  output logic              rst_n,
  output logic [19:0]       sa,
  output logic [15:0]       sd_in,
  input  logic [15:0]       sd_out,
  input  logic              sd_oe,
  output logic              ior_n,
  output logic              iow_n,
  output logic              memr_n,
  output logic              memw_n,
  output logic              aen,
  output logic              dack_n,
  input  logic              iochrdy,
  input  logic              drc_ml,
  input  logic              drc_req,
  input  logic              drc_we,
  input  logic [MEM_AW-1:0] drc_addr,
  input  logic [15:0]       drc_wdata,
  output logic [15:0]       drc_rdata
);
  import card_pkg::*;
  localparam int ROWS = 1 << ROW_BITS, COLS = 1 << COL_BITS, WPR = COLS / 16;
  localparam int IMG_W = ROWS * WPR;           // words per image page
  localparam int SRC_PAGE = 1, DST_PAGE = 2;

  int checks = 0, failures = 0;
  int n_mode = 0, n_win_wr = 0, n_win_rd = 0, n_dp_wr = 0, n_dp_rd = 0;
  int n_dma_wr = 0, n_dma_rd = 0, n_blocked = 0, n_dineen = 0, n_unger = 0;
  int n_border = 0, n_polls = 0;

  initial clk = 0;
  always #5 clk = ~clk;

  pc_bus_master bus (.*);
  drc_dram_model #(.AW(MEM_AW), .ACT_CLKS(ACT), .PRE_CLKS(PRE)) mdl (
    .clk, .req(drc_req), .we(drc_we), .addr(drc_addr), .wdata(drc_wdata),
    .rdata(drc_rdata), .ml(drc_ml));

  bit img [ROWS][COLS];

  function automatic bit pix(int r, int c);
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return 0;
    return img[r][c];
  endfunction

  function automatic bit ref_px(int r, int c, bit ung, int th);
    bit w [3][3];
    int n = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin w[i][j] = pix(r + i - 1, c + j - 1); n += w[i][j]; end
    if (!ung) return n > th;
    return ((w[0][1] | w[0][2] | w[1][2]) & (w[1][0] | w[2][0] | w[2][1])) |
           ((w[0][0] | w[0][1] | w[1][0]) & (w[1][2] | w[2][1] | w[2][2]));
  endfunction

  function automatic logic [15:0] src_word(int idx);
    logic [15:0] w;
    int r = idx / WPR, k = idx % WPR;
    for (int b = 0; b < 16; b++) w[15 - b] = img[r][k * 16 + b];
    return w;
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // PC access to card word address a through the window
  task automatic win_access(bit wr, int a, inout logic [15:0] d);
    bus.io_write(P_PAGE, 16'(a >> 15));
    if (wr) bus.mem_write(16'((a % 32768) * 2), d);
    else    bus.mem_read(16'((a % 32768) * 2), d);
  endtask

  task automatic set_ptr(int a);
    bus.io_write(P_PTR_LO, 16'(a));
    bus.io_write(P_PTR_HI, 16'(a >> 16));
  endtask

  // processor memory schedule, observed on the controller port
  bit in_run = 0;
  int rd_seen = 0, wr_seen = 0, cyc = 0, t_first = -1, t_last = 0;
  always @(posedge clk) begin
    cyc++;
    if (in_run && drc_req) begin
      if (drc_we) begin wr_seen++; t_last = cyc; end
      else begin rd_seen++; if (t_first < 0) t_first = cyc; end
    end
  end

  task automatic smooth(bit ung, int th);
    logic [15:0] d, e, st;
    int exp_span;
    rd_seen = 0; wr_seen = 0; t_first = -1;
    in_run = 1;
    bus.io_write(P_CTRL, 16'(1 | (int'(ung) << 1) | (th << 4) | (SRC_PAGE << 8) | (DST_PAGE << 12)));
    checks++;
    bus.io_read(P_STATUS, st);
    if (st[1:0] != 2'b10) fail($sformatf("status while running %b", st[1:0]));
    // PC accesses during the run are refused
    d = 16'h1234;
    win_access(1, 0, d);
    win_access(0, SRC_PAGE * IMG_W, d);
    checks++;
    if (d !== 16'hFFFF || mdl.mem[0] === 16'h1234) fail("access during run not refused");
    else n_blocked += 2;
    do begin
      bus.io_read(P_STATUS, st);
      n_polls++;
    end while (!st[0]);
    in_run = 0;
    bus.io_write(P_CTRL, 16'((int'(ung) << 1) | (th << 4)));
    if (ung) n_unger++; else n_dineen++;
    // memory schedule
    checks++;
    if (rd_seen != 3 * (WPR + 1) * ROWS - 3 * ROWS - 2 * WPR || wr_seen != IMG_W)
      fail($sformatf("schedule reads %0d writes %0d", rd_seen, wr_seen));
    else n_border += 3 * ROWS + 2 * WPR;
    exp_span = 1 + ROWS * (2 + (ACT + PRE) * (3 + 4 * WPR)) - ACT - PRE - 1 - (2 + ACT + PRE);
    checks++;
    if (t_last - t_first != exp_span) fail($sformatf("span %0d expected %0d", t_last - t_first, exp_span));
    // result
    bus.io_write(P_PAGE, 16'((DST_PAGE * IMG_W) >> 15));
    for (int i = 0; i < IMG_W; i++) begin
      int a = DST_PAGE * IMG_W + i;
      if (a % 32768 == 0) bus.io_write(P_PAGE, 16'(a >> 15));
      bus.mem_read(16'((a % 32768) * 2), d);
      n_win_rd++;
      for (int b = 0; b < 16; b++) e[15 - b] = ref_px(i / WPR, (i % WPR) * 16 + b, ung, th);
      checks++;
      if (d !== e) begin
        if (failures < 10) $display("FAIL result word %0d got %h exp %h", i, d, e);
        failures++;
      end
    end
  endtask

  initial begin
    logic [15:0] d;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. DRAM controller mode word
    bus.io_write(P_PRG_LO, 16'h5A3C);
    bus.io_write(P_PRG_HI, 16'h0001);
    checks++;
    if (mdl.mode_word !== MEM_AW'(18'h15A3C)) fail("mode load"); else n_mode++;
    bus.io_read(P_PRG_LO, d);
    checks++; if (d !== 16'h5A3C) fail("programming word readback");
    // 2. load the source image
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) img[r][c] = ($urandom % 100) < 45;
    set_ptr(SRC_PAGE * IMG_W);
    for (int i = 0; i < IMG_W; i++) begin
      automatic int a = SRC_PAGE * IMG_W + i;
      d = src_word(i);
      unique case (i % 4)
        0, 1: begin win_access(1, a, d); set_ptr(a + 1); n_win_wr++; end
        2:    begin bus.io_write(P_DATA, d); n_dp_wr++; end
        3:    begin bus.dma_write(d); n_dma_wr++; end
      endcase
    end
    bus.io_read(P_PTR_LO, d);
    checks++; if (d !== 16'(SRC_PAGE * IMG_W + IMG_W)) fail($sformatf("pointer increment %h", d));
    // read part of it back three ways
    set_ptr(SRC_PAGE * IMG_W);
    for (int i = 0; i < 12; i++) begin
      if (i % 2 == 0) begin bus.io_read(P_DATA, d); n_dp_rd++; end
      else begin bus.dma_read(d); n_dma_rd++; end
      checks++; if (d !== src_word(i)) fail($sformatf("data port read %0d got %h exp %h", i, d, src_word(i)));
    end
    for (int i = IMG_W - 4; i < IMG_W; i++) begin
      win_access(0, SRC_PAGE * IMG_W + i, d);
      n_win_rd++;
      checks++; if (d !== src_word(i)) fail($sformatf("window read %0d", i));
    end
    // 3. smoothing runs
    for (int k = 0; k < N_RUNS; k++) smooth(1'(k % 2), 2 + (k * 3) % 6);
    // 4. whole-test checks
    checks++;
    if (mdl.errors != 0 || mdl.min_gap < ACT + PRE)
      fail($sformatf("access spacing errors %0d min gap %0d", mdl.errors, mdl.min_gap));
    checks++; if (bus.oe_errors != 0) fail("data bus enable");
    $display("mechanisms: mode_load=%0d window_wr=%0d window_rd=%0d dataport_wr=%0d dataport_rd=%0d dma_wr=%0d dma_rd=%0d",
             n_mode, n_win_wr, n_win_rd, n_dp_wr, n_dp_rd, n_dma_wr, n_dma_rd);
    $display("mechanisms: refused_during_run=%0d dineen_runs=%0d unger_runs=%0d border_reads_skipped=%0d wait_states=%0d status_polls=%0d",
             n_blocked, n_dineen, n_unger, n_border, bus.waits, n_polls);
    begin
      automatic int cnt [13] = '{n_mode, n_win_wr, n_win_rd, n_dp_wr, n_dp_rd, n_dma_wr, n_dma_rd,
                       n_blocked, n_dineen, n_unger, n_border, n_polls, int'(bus.waits)};
      for (int i = 0; i < 13; i++) begin
        checks++;
        if (cnt[i] == 0) fail($sformatf("mechanism %0d never happened", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
