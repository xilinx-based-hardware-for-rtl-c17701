// tb_data_processor: feeds three random rows word column by word column,
// in the order the controller uses (clear, load rows n-1/n/n+1, load
// output), with a white word after the last column, and checks each result
// word of the middle row against a per-pixel reference for both filters.
module tb_data_processor;
  localparam int W = 5;  // words per row
  logic clk = 0, rst_n = 0;
  logic [15:0] din = 0, dout;
  logic din_valid = 0, ld_a = 0, ld_b = 0, ld_c = 0, clr = 0, ld_out = 0, unger = 0;
  logic [3:0] theta = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  data_processor dut (.*);

  logic [15:0] rows [3][W];

  function automatic bit p(int r, int c);
    if (c < 0 || c >= 16 * W) return 0;
    return rows[r][c / 16][15 - c % 16];
  endfunction

  function automatic bit ref_px(int c, bit ung, int th);
    bit w [3][3];
    int n = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin w[i][j] = p(i, c + j - 1); n += w[i][j]; end
    if (!ung) return n > th;
    return ((w[0][1] | w[0][2] | w[1][2]) & (w[1][0] | w[2][0] | w[2][1])) |
           ((w[0][0] | w[0][1] | w[1][0]) & (w[1][2] | w[2][1] | w[2][2]));
  endfunction

  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      unger = t % 2; theta = 4'(2 + t % 6);
      for (int r = 0; r < 3; r++) for (int k = 0; k < W; k++) rows[r][k] = 16'($urandom);
      pulse(clr);
      for (int k = 0; k <= W; k++) begin
        din_valid = k < W;
        din = k < W ? rows[0][k] : 16'hFFFF; pulse(ld_a);
        din = k < W ? rows[1][k] : 16'hFFFF; pulse(ld_b);
        din = k < W ? rows[2][k] : 16'hFFFF; pulse(ld_c);
        pulse(ld_out);
        if (k > 0) begin
          logic [15:0] e;
          for (int b = 0; b < 16; b++) e[15 - b] = ref_px((k - 1) * 16 + b, unger, theta);
          checks++;
          if (dout !== e) begin
            failures++; $display("FAIL t=%0d word %0d got %h exp %h", t, k - 1, dout, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
