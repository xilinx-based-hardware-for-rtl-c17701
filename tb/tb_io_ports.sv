// tb_io_ports: random writes to all ports checked against a register
// model through read-back and the decoded outputs; the mode-load strobe
// must follow exactly the writes of the high programming word, and the
// pointer must advance on ptr_inc.
module tb_io_ports;
  import card_pkg::*;
  logic clk = 0, rst_n = 0, wr_stb = 0, done = 0, busy = 0, ptr_inc = 0;
  port_e port = P_CTRL;
  logic [15:0] wdata = 0, rdata;
  logic run, unger, prg_ml;
  logic [3:0] theta, src_page, dst_page;
  logic [2:0] win_page;
  logic [17:0] prg_word, ptr;
  logic [15:0] m_ctrl = 0; logic [2:0] m_page = 0; logic [17:0] m_prg = 0, m_ptr = 0;
  int checks = 0, failures = 0, n_ml = 0, exp_ml = 0;
  always #5 clk = ~clk;
  io_ports dut (.*);
  always @(posedge clk) if (rst_n) n_ml += prg_ml;

  task automatic chk(string s, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", s, got, exp); end
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      automatic int op = $urandom % 3;
      port = port_e'($urandom % 8); wdata = 16'($urandom);
      done = 1'($urandom); busy = 1'($urandom);
      if (op == 0) begin
        wr_stb = 1;
        unique case (port)
          P_CTRL:   m_ctrl = wdata;
          P_PAGE:   m_page = wdata[2:0];
          P_PRG_LO: m_prg[15:0] = wdata;
          P_PRG_HI: begin m_prg[17:16] = wdata[1:0]; exp_ml++; end
          P_PTR_LO: m_ptr[15:0] = wdata;
          P_PTR_HI: m_ptr[17:16] = wdata[1:0];
          default: ;
        endcase
      end else if (op == 1) begin
        ptr_inc = 1; m_ptr = m_ptr + 1;
      end
      #1;
      if (!wr_stb && !ptr_inc) begin
        unique case (port)
          P_CTRL:   chk("ctrl rd", rdata, m_ctrl);
          P_STATUS: chk("status", rdata, {busy, done});
          P_PAGE:   chk("page rd", rdata, m_page);
          P_PRG_LO: chk("prg lo", rdata, m_prg[15:0]);
          P_PRG_HI: chk("prg hi", rdata, m_prg[17:16]);
          P_PTR_LO: chk("ptr lo", rdata, m_ptr[15:0]);
          P_PTR_HI: chk("ptr hi", rdata, m_ptr[17:16]);
          default:  ;
        endcase
      end
      @(negedge clk);
      wr_stb = 0; ptr_inc = 0;
      chk("outputs", {run, unger, theta, src_page, dst_page, win_page},
          {m_ctrl[0], m_ctrl[1], m_ctrl[7:4], m_ctrl[11:8], m_ctrl[15:12], m_page});
      chk("prg word", prg_word, m_prg);
      chk("ptr", ptr, m_ptr);
    end
    @(negedge clk);
    chk("mode loads", n_ml, exp_ml);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
