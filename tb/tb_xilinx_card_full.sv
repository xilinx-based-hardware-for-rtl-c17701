// tb_xilinx_card_full: the card at its default size (1024x1024 pixel
// image, 512 KB memory): loads a full random image, smooths it once with
// Dineen (theta 2) and once with Unger, and checks all 65536 result words
// of each run. See tb_card_body for the sequence.
module tb_xilinx_card_full;
  localparam int AW = 18;
  logic clk, rst_n, sd_oe, ior_n, iow_n, memr_n, memw_n, aen, dack_n, iochrdy;
  logic [19:0] sa;
  logic [15:0] sd_in, sd_out, drc_wdata, drc_rdata;
  logic drc_ml, drc_req, drc_we;
  logic [AW-1:0] drc_addr;

  xilinx_card dut (.*);
  tb_card_body #(.ROW_BITS(10), .COL_BITS(10), .MEM_AW(AW), .N_RUNS(2)) body (.*);

  initial begin
    repeat (40000000) @(posedge clk);
    body.failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", body.checks, body.failures);
    $finish;
  end
endmodule
