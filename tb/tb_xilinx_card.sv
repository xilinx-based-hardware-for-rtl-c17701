// tb_xilinx_card: end-to-end test of the card at a reduced image size
// (16 rows x 64 pixels, 128K-word memory), four smoothing runs alternating
// Dineen and Unger with different thresholds. See tb_card_body.
module tb_xilinx_card;
  localparam int RB = 4, CB = 6, AW = 17;
  logic clk, rst_n, sd_oe, ior_n, iow_n, memr_n, memw_n, aen, dack_n, iochrdy;
  logic [19:0] sa;
  logic [15:0] sd_in, sd_out, drc_wdata, drc_rdata;
  logic drc_ml, drc_req, drc_we;
  logic [AW-1:0] drc_addr;

  xilinx_card #(.ROW_BITS(RB), .COL_BITS(CB), .MEM_AW(AW)) dut (.*);
  tb_card_body #(.ROW_BITS(RB), .COL_BITS(CB), .MEM_AW(AW), .N_RUNS(4)) body (.*);

  initial begin
    repeat (400000) @(posedge clk);
    body.failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", body.checks, body.failures);
    $finish;
  end
endmodule
