// tb_delay_logic: for every delay value d an instruction must last d+1
// clocks: `first` only in its first clock, `advance` only in its last.
module tb_delay_logic;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [3:0] delay = 0;
  logic first, advance;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  delay_logic dut (.*);
  initial begin
    @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 3; rep++)
      for (int d = 0; d < 16; d++) begin
        delay = 4'(d);
        #1;
        for (int k = 0; k <= d; k++) begin
          checks++;
          if (first !== (k == 0) || advance !== (k == d)) begin
            failures++; $display("FAIL d=%0d k=%0d first=%b adv=%b", d, k, first, advance);
          end
          @(negedge clk);
        end
      end
    // clear in the middle of a delay returns to the first state
    delay = 4'd9; @(negedge clk); @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    checks++; if (!first) begin failures++; $display("FAIL clr"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
