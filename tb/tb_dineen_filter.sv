// tb_dineen_filter: random 18-bit row strips and all thresholds 0..9,
// compared with a direct count of each 3x3 window.
module tb_dineen_filter;
  logic [17:0] top, mid, bot;
  logic [3:0] theta;
  logic [15:0] px;
  int checks = 0, failures = 0;
  dineen_filter dut (.*);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      top = 18'($urandom); mid = 18'($urandom); bot = 18'($urandom);
      theta = 4'($urandom % 10);
      #1;
      for (int j = 0; j < 16; j++) begin
        automatic int n = 0;
        for (int k = j; k <= j + 2; k++) n += top[k] + mid[k] + bot[k];
        checks++;
        if (px[j] !== (n > theta)) begin
          failures++;
          $display("FAIL j=%0d n=%0d theta=%0d got %b", j, n, theta, px[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
