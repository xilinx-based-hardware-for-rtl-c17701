// tb_io_decoder: all I/O addresses 0..3FFh with AEN low and high, plus DMA
// acknowledge; hit/port/rd/wr are compared with the expected decode of
// eight word ports at 300h.
module tb_io_decoder;
  import card_pkg::*;
  logic [9:0] sa; logic aen, dack_n, ior_n, iow_n, hit, rd, wr;
  port_e port;
  int checks = 0, failures = 0;
  io_decoder dut (.*);
  initial begin
    for (int a = 0; a < 1024; a++)
      for (int m = 0; m < 8; m++) begin
        automatic bit e_hit;
        sa = 10'(a); aen = m[0]; dack_n = !(m == 7); ior_n = m[1]; iow_n = !m[1] ? 1'b1 : m[2];
        #1;
        e_hit = (!dack_n) || (!aen && a >= 'h300 && a < 'h310);
        checks++;
        if (hit !== e_hit || rd !== (e_hit && !ior_n) || wr !== (e_hit && !iow_n) ||
            (e_hit && port !== (dack_n ? port_e'(a[3:1]) : P_DATA))) begin
          failures++; $display("FAIL a=%h m=%0d hit=%b port=%0d", a, m, hit, port);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
