// tb_output_register: every load must output the 15 leading results of the
// previous load followed by bit 15 of the current one.
module tb_output_register;
  logic clk = 0, rst_n = 0, load = 0;
  logic [15:0] px = 0, dout, prev = 0, exp_d = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  output_register dut (.*);
  initial begin
    @(negedge clk); rst_n = 1;
    checks++; if (dout !== 0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 300; i++) begin
      px = 16'($urandom); load = ($urandom % 3) != 0;
      @(negedge clk);
      if (load) begin exp_d = {prev[14:0], px[15]}; prev = px; end
      checks++;
      if (dout !== exp_d) begin failures++; $display("FAIL %0d got %h exp %h", i, dout, exp_d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
