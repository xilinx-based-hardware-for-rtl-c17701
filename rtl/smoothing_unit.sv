// smoothing_unit: the image smoothing circuit of a data processor FPGA.
//
// Smooths a binary image of 2^ROW_BITS x 2^COL_BITS pixels stored packed,
// 16 pixels per 16-bit memory word (bit 15 = left-most pixel), with either
// the Dineen (count > theta) or the Unger rule, and writes the result image
// to another page of the same memory. It consists of the data processor,
// the address generator and the microprogrammed control unit.
//
// For each output word column the controller reads the three words of
// rows n-1, n, n+1, lets the filter settle during the third read's
// precharge, loads the output register and writes the finished word of the
// previous column: three reads and one write per output word, as in the
// original access schedule. Pixels outside the image count as white.
//
// Memory port: mem_req is a one-clock start strobe with mem_we, mem_addr
// and mem_wdata valid in that clock. Read data must be valid on mem_rdata
// from ACT_CLKS clocks after the strobe until the next strobe; successive
// strobes are ACT_CLKS+PRE_CLKS or more clocks apart. There is no refresh:
// the continuous accesses refresh the rows, as the original design relies on.
// Raise run to start; done goes high at the end and stays until run falls.
module smoothing_unit
  import smooth_pkg::*;
#(
  parameter int unsigned ROW_BITS  = 10,
  parameter int unsigned COL_BITS  = 10,
  parameter int unsigned PAGE_BITS = 2,
  parameter int unsigned ACT_CLKS  = 4,
  parameter int unsigned PRE_CLKS  = 4,
  localparam int unsigned AW       = PAGE_BITS + ROW_BITS + COL_BITS - 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  logic                 unger,
  input  logic [3:0]           theta,
  input  logic [PAGE_BITS-1:0] src_page,
  input  logic [PAGE_BITS-1:0] dst_page,
  output logic                 mem_req,
  output logic                 mem_we,
  output logic [AW-1:0]        mem_addr,
  output logic [15:0]          mem_wdata,
  input  logic [15:0]          mem_rdata,
  output logic                 done,
  output logic                 busy
);

  ctrl_t          ctrl;
  logic [AW-1:0]  src_addr, dst_addr;
  logic           src_valid, more_words, more_rows;

  control_unit #(.ACT_CLKS(ACT_CLKS), .PRE_CLKS(PRE_CLKS)) u_ctrl (
    .clk, .rst_n, .run, .more_words, .more_rows, .ctrl, .done);

  address_generator #(
    .ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS), .PAGE_BITS(PAGE_BITS)
  ) u_agen (
    .clk, .rst_n, .ctrl, .src_page, .dst_page, .src_addr, .dst_addr,
    .src_valid, .more_words, .more_rows);

  data_processor #(.WORD_W(16)) u_dp (
    .clk, .rst_n, .din(mem_rdata), .din_valid(src_valid),
    .ld_a(ctrl.ld_a), .ld_b(ctrl.ld_b), .ld_c(ctrl.ld_c),
    .clr(ctrl.regs_clr), .ld_out(ctrl.ld_out), .unger, .theta,
    .dout(mem_wdata));

  assign mem_req  = (ctrl.mem_rd && src_valid) || ctrl.mem_wr;
  assign mem_we   = ctrl.mem_wr;
  assign mem_addr = ctrl.mem_wr ? dst_addr : src_addr;
  assign busy     = run && !done;

  // Memory port rules: a read and a write never start together, and a new
  // access never starts before the previous one has finished its cycle.
  a_rd_wr_exclusive: assert property (@(posedge clk)
    !(ctrl.mem_rd && ctrl.mem_wr));
  for (genvar k = 1; k < ACT_CLKS + PRE_CLKS; k++) begin : g_spacing
    a_access_spacing: assert property (@(posedge clk)
      mem_req |-> !$past(mem_req, k));
  end

endmodule
