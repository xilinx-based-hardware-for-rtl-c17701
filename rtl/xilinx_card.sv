// xilinx_card: the image processing card, configured for image smoothing.
//
// The card sits on the PC-AT bus. Its interface FPGA (XILINX0) decodes the
// PC's I/O and memory cycles, holds the control registers and owns the
// address and control lines of the DRAM controller. A data processor FPGA
// (XILINX1) holds the smoothing circuit and works on the 16-bit memory
// block behind that controller: while the PC has set run, XILINX1's
// requests pass to the controller and read data reaches XILINX1 directly
// from the memory data bus.
//
// Typical use: the PC loads a packed 1024x1024 binary image into a source
// page through the memory window or the data port, selects the filter and
// pages in the control port together with run, polls the status port for
// done, clears run and reads the smoothed image from the destination page.
//
// The DRAM controller with its memory, the FPGA configuration logic and the
// other data processor FPGAs of the full card are outside this module; the
// controller port is brought out. Bidirectional buses are split into
// in/out/enable signals. Default sizes: 1024x1024 pixel image, 18-bit word
// address (512 KB, the smallest memory fit), four image pages.
module xilinx_card #(
  parameter int unsigned  ROW_BITS  = 10,
  parameter int unsigned  COL_BITS  = 10,
  parameter int unsigned  MEM_AW    = 18,
  parameter int unsigned  ACT_CLKS  = 4,
  parameter int unsigned  PRE_CLKS  = 4,
  parameter logic [9:0]   IO_BASE   = 10'h300,
  parameter logic [19:0]  WIN_BASE  = 20'hD0000,
  localparam int unsigned PAGE_BITS = MEM_AW - ROW_BITS - (COL_BITS - 4)
) (
  input  logic              clk,
  input  logic              rst_n,
  // PC-AT bus
  input  logic [19:0]       sa,
  input  logic [15:0]       sd_in,
  output logic [15:0]       sd_out,
  output logic              sd_oe,
  input  logic              ior_n,
  input  logic              iow_n,
  input  logic              memr_n,
  input  logic              memw_n,
  input  logic              aen,
  input  logic              dack_n,
  output logic              iochrdy,
  // DRAM controller port
  output logic              drc_ml,
  output logic              drc_req,
  output logic              drc_we,
  output logic [MEM_AW-1:0] drc_addr,
  output logic [15:0]       drc_wdata,
  input  logic [15:0]       drc_rdata
);

  logic                 run, unger, done, busy;
  logic [3:0]           theta;
  logic [3:0]           src_page4, dst_page4;
  logic [PAGE_BITS-1:0] src_page, dst_page;
  logic                 xl_req, xl_we;
  logic [MEM_AW-1:0]    xl_addr;
  logic [15:0]          xl_wdata;

  xilinx0_interface #(
    .MEM_AW(MEM_AW), .IO_BASE(IO_BASE),
    .WIN_BASE(WIN_BASE), .ACT_CLKS(ACT_CLKS), .PRE_CLKS(PRE_CLKS)
  ) u_xilinx0 (
    .clk, .rst_n, .sa, .sd_in, .sd_out, .sd_oe, .ior_n, .iow_n, .memr_n,
    .memw_n, .aen, .dack_n, .iochrdy, .run, .unger, .theta, .src_page(src_page4),
    .dst_page(dst_page4), .done, .busy, .xl_req, .xl_we, .xl_addr, .xl_wdata,
    .drc_ml, .drc_req, .drc_we, .drc_addr, .drc_wdata, .drc_rdata);

  // the control port carries 4-bit page numbers
  assign src_page = PAGE_BITS'(src_page4);
  assign dst_page = PAGE_BITS'(dst_page4);

  smoothing_unit #(
    .ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS), .PAGE_BITS(PAGE_BITS),
    .ACT_CLKS(ACT_CLKS), .PRE_CLKS(PRE_CLKS)
  ) u_xilinx1 (
    .clk, .rst_n, .run, .unger, .theta, .src_page, .dst_page,
    .mem_req(xl_req), .mem_we(xl_we), .mem_addr(xl_addr),
    .mem_wdata(xl_wdata), .mem_rdata(drc_rdata), .done, .busy);

endmodule
