// tb_xilinx0_interface: the PC interface on its own, with the DRAM
// controller model behind it and the data processor side driven by the
// testbench. Checks register access, memory window writes and reads in
// several pages, data port and DMA access with pointer increment, the
// mode load, wait states on reads, the hand-over of the controller to the
// processor while run is set, and refusal of PC memory accesses then.
module tb_xilinx0_interface;
  import card_pkg::*;
  localparam int AW = 18;
  logic clk = 0, rst_n = 0;
  logic [19:0] sa; logic [15:0] sd_in, sd_out; logic sd_oe, ior_n, iow_n, memr_n, memw_n, aen, dack_n, iochrdy;
  logic run, unger; logic [3:0] theta, src_page, dst_page;
  logic done = 0, busy = 0, xl_req = 0, xl_we = 0;
  logic [AW-1:0] xl_addr = 0; logic [15:0] xl_wdata = 0;
  logic drc_ml, drc_req, drc_we; logic [AW-1:0] drc_addr; logic [15:0] drc_wdata, drc_rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  xilinx0_interface dut (.*);
  pc_bus_master bus (.*);
  drc_dram_model #(.AW(AW)) mdl (.clk, .req(drc_req), .we(drc_we), .addr(drc_addr),
    .wdata(drc_wdata), .rdata(drc_rdata), .ml(drc_ml));

  task automatic chk(string s, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", s, got, exp); end
  endtask

  logic [15:0] ref_mem [int];

  initial begin
    logic [15:0] d;
    int w0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    bus.io_write(P_CTRL, 16'h2352);
    bus.io_read(P_CTRL, d); chk("ctrl", d, 16'h2352);
    chk("fields", {run, unger, theta, src_page, dst_page}, {1'b0, 1'b1, 4'h5, 4'h3, 4'h2});
    done = 1; busy = 0; bus.io_read(P_STATUS, d); chk("status", d, 16'h0001);
    bus.io_write(P_PRG_LO, 16'hBEEF); bus.io_write(P_PRG_HI, 16'h0002);
    chk("mode word", mdl.mode_word, 18'h2BEEF);
    // window writes into several pages, then read back
    for (int i = 0; i < 40; i++) begin
      automatic int a = ($urandom % (1 << AW));
      automatic logic [15:0] v = 16'($urandom);
      bus.io_write(P_PAGE, 16'(a >> 15));
      bus.mem_write(16'((a % 32768) * 2), v);
      ref_mem[a] = v;
    end
    foreach (ref_mem[a]) begin
      bus.io_write(P_PAGE, 16'(a >> 15));
      w0 = bus.waits;
      bus.mem_read(16'((a % 32768) * 2), d);
      chk("window read", d, ref_mem[a]);
      chk("read waited", int'(bus.waits > w0), 1);
    end
    // data port and DMA
    bus.io_write(P_PTR_LO, 16'h1000); bus.io_write(P_PTR_HI, 16'h0003);
    for (int i = 0; i < 10; i++)
      if (i % 2) bus.dma_write(16'(i * 7)); else bus.io_write(P_DATA, 16'(i * 7));
    bus.io_read(P_PTR_LO, d); chk("pointer", d, 16'h100A);
    for (int i = 0; i < 10; i++) chk("dp mem", mdl.mem[18'h31000 + i], 16'(i * 7));
    bus.io_write(P_PTR_LO, 16'h1000);
    for (int i = 0; i < 10; i++) begin
      if (i % 2) bus.dma_read(d); else bus.io_read(P_DATA, d);
      chk("dp read", d, 16'(i * 7));
    end
    chk("bus enables", bus.oe_errors, 0);
    // processor owns the controller while run is set
    bus.io_write(P_CTRL, 16'h0001);
    @(negedge clk);
    xl_req = 1; xl_we = 1; xl_addr = 18'h00123; xl_wdata = 16'hCAFE;
    #1 chk("xl pass", {drc_req, drc_we, drc_addr, drc_wdata}, {1'b1, 1'b1, 18'h00123, 16'hCAFE});
    @(negedge clk); xl_req = 0; xl_we = 0;
    repeat (10) @(negedge clk);
    bus.io_write(P_PAGE, 0);
    bus.mem_write(16'h0246, 16'h1111);
    bus.mem_read(16'h0246, d);
    chk("refused read", d, 16'hFFFF);
    chk("refused write", mdl.mem[18'h00123], 16'hCAFE);
    bus.io_write(P_CTRL, 16'h0000);
    bus.mem_read(16'h0246, d);
    chk("after run", d, 16'hCAFE);
    chk("spacing", mdl.errors, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
