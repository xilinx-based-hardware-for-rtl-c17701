// tb_line_register: loads random words and checks that the two right-most
// pixels of the previous word are carried into the top bits, that clear
// empties the register and that the register holds without load.
module tb_line_register;
  logic clk = 0, rst_n = 0, clr = 0, load = 0;
  logic [15:0] din = 0;
  logic [17:0] q, exp_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  line_register dut (.*);

  task automatic chk(string what);
    checks++;
    if (q !== exp_q) begin failures++; $display("FAIL %s q=%h exp=%h", what, q, exp_q); end
  endtask

  initial begin
    exp_q = '0;
    @(negedge clk); chk("reset");
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      automatic int op = $urandom % 4;
      automatic logic [15:0] d = 16'($urandom);
      din = d; load = op != 0; clr = op == 3 && ($urandom % 2 == 0);
      @(negedge clk);
      if (clr) exp_q = '0;
      else if (load) exp_q = {exp_q[1:0], d};
      chk("step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
