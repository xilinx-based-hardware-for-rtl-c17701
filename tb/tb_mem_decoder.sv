// tb_mem_decoder: random bus addresses and pages; the window hit for
// D0000h-DFFFFh and the word address {page, SA[15:1]} are checked.
module tb_mem_decoder;
  logic [19:0] sa; logic memr_n, memw_n, hit, rd, wr;
  logic [2:0] page; logic [17:0] addr;
  int checks = 0, failures = 0;
  mem_decoder dut (.*);
  initial begin
    for (int i = 0; i < 5000; i++) begin
      automatic bit e_hit;
      sa = (i % 3 == 0) ? 20'hD0000 | 20'($urandom % 65536) : 20'($urandom);
      page = 3'($urandom); memr_n = 1'($urandom); memw_n = 1'($urandom);
      #1;
      e_hit = sa >= 20'hD0000 && sa <= 20'hDFFFF;
      checks++;
      if (hit !== e_hit || rd !== (e_hit && !memr_n) || wr !== (e_hit && !memw_n) ||
          addr !== {page, sa[15:1]}) begin
        failures++; $display("FAIL sa=%h hit=%b addr=%h", sa, hit, addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
