// tb_unger_filter: checks the two example patterns of the method (a spur
// pixel removed, a hole filled) and random strips against the A/B/C/D rule
// written out on a 3x3 window array.
module tb_unger_filter;
  logic [17:0] top, mid, bot;
  logic [15:0] px;
  int checks = 0, failures = 0;
  unger_filter dut (.*);

  // window w[row][col], col 0 = left; centre of output j is bit j+1
  function automatic bit rule(logic [17:0] t, logic [17:0] m, logic [17:0] b, int j);
    bit w [3][3];
    for (int c = 0; c < 3; c++) begin
      w[0][c] = t[j + 2 - c]; w[1][c] = m[j + 2 - c]; w[2][c] = b[j + 2 - c];
    end
    return ((w[0][1] | w[0][2] | w[1][2]) & (w[1][0] | w[2][0] | w[2][1])) |
           ((w[0][0] | w[0][1] | w[1][0]) & (w[1][2] | w[2][1] | w[2][2]));
  endfunction

  initial begin
    // spur: left column black plus the centre -> centre becomes white
    top = 18'b100 << 6; mid = 18'b110 << 6; bot = 18'b100 << 6; #1;
    checks++; if (px[6] !== 1'b0) begin failures++; $display("FAIL spur"); end
    // hole: left column, top-middle and bottom-middle black -> centre black
    top = 18'b110 << 6; mid = 18'b100 << 6; bot = 18'b110 << 6; #1;
    checks++; if (px[6] !== 1'b1) begin failures++; $display("FAIL hole"); end
    for (int i = 0; i < 3000; i++) begin
      top = 18'($urandom); mid = 18'($urandom); bot = 18'($urandom);
      if (i % 2 == 1) begin top &= 18'($urandom); mid &= 18'($urandom); bot &= 18'($urandom); end
      #1;
      for (int j = 0; j < 16; j++) begin
        checks++;
        if (px[j] !== rule(top, mid, bot, j)) begin failures++; $display("FAIL j=%0d", j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
