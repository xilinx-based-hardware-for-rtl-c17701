// xilinx0_interface: the PC-AT bus interface of the card.
//
// Contains the I/O decoder, the I/O registers, the memory window decoder
// and the address and control signal multiplexer that feeds the DRAM
// controller, plus the small engine that turns a PC memory or data port
// cycle into one DRAM access.
//
// PC side: the bus strobes are taken as synchronous to clk. A memory cycle
// inside the window, or an I/O cycle on the data port (also a DMA cycle,
// dack_n low), starts one DRAM access at its first clock. iochrdy is pulled
// low until a write has been issued or read data has been latched; the
// latched word is driven on sd_out while the read strobe stays low. A new
// access is issued no sooner than ACT_CLKS+PRE_CLKS clocks after the
// previous one. While the data processor runs the memory belongs to it:
// PC writes to the memory are dropped and PC reads return FFFFh, without
// stalling the bus; software polls the status port for done.
// Processor side: run/filter/theta/pages go out to the data processor FPGA;
// its memory requests pass through the multiplexer while run is set.
// Which sources are multiplexed follows the original interface; the
// engine, the timing rules and the run-time ownership are this design's.
module xilinx0_interface
  import card_pkg::*;
#(
  parameter int unsigned  MEM_AW    = 18,
  parameter logic [9:0]   IO_BASE   = 10'h300,
  parameter logic [19:0]  WIN_BASE  = 20'hD0000,
  parameter int unsigned  ACT_CLKS  = 4,
  parameter int unsigned  PRE_CLKS  = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // PC-AT bus
  input  logic [19:0]          sa,
  input  logic [15:0]          sd_in,
  output logic [15:0]          sd_out,
  output logic                 sd_oe,
  input  logic                 ior_n,
  input  logic                 iow_n,
  input  logic                 memr_n,
  input  logic                 memw_n,
  input  logic                 aen,
  input  logic                 dack_n,
  output logic                 iochrdy,
  // data processor FPGA
  output logic                 run,
  output logic                 unger,
  output logic [3:0]           theta,
  output logic [3:0]           src_page,
  output logic [3:0]           dst_page,
  input  logic                 done,
  input  logic                 busy,
  input  logic                 xl_req,
  input  logic                 xl_we,
  input  logic [MEM_AW-1:0]    xl_addr,
  input  logic [15:0]          xl_wdata,
  // DRAM controller
  output logic                 drc_ml,
  output logic                 drc_req,
  output logic                 drc_we,
  output logic [MEM_AW-1:0]    drc_addr,
  output logic [15:0]          drc_wdata,
  input  logic [15:0]          drc_rdata
);

  localparam int unsigned WPG_BITS = MEM_AW - 15;
  localparam int unsigned GAP      = ACT_CLKS + PRE_CLKS - 1;

  typedef enum logic [1:0] {S_IDLE, S_PEND, S_WAIT} acc_state_e;

  logic               io_hit, io_rd, io_wr, mem_hit, mem_rd, mem_wr;
  port_e              port;
  logic [15:0]        io_rdata;
  logic [WPG_BITS-1:0] win_page;
  logic [MEM_AW-1:0]  prg_word, ptr, mem_addr;
  logic               prg_ml, io_wr_stb, ptr_inc;
  logic               io_rd_q, io_wr_q, mem_rd_q, mem_wr_q;
  logic               start, start_we, start_dp;

  acc_state_e         state;
  logic               acc_we, acc_dp;
  logic [MEM_AW-1:0]  acc_addr;
  logic [15:0]        acc_wdata, rbuf;
  logic [3:0]         gap_cnt, rd_cnt;
  logic               pc_req;

  io_decoder #(.IO_BASE(IO_BASE)) u_iodec (
    .sa(sa[9:0]), .aen, .dack_n, .ior_n, .iow_n,
    .hit(io_hit), .port, .rd(io_rd), .wr(io_wr));

  mem_decoder #(.WIN_BASE(WIN_BASE), .WIN_BITS(16), .MEM_AW(MEM_AW)) u_memdec (
    .sa, .memr_n, .memw_n, .page(win_page),
    .hit(mem_hit), .rd(mem_rd), .wr(mem_wr), .addr(mem_addr));

  io_ports #(.MEM_AW(MEM_AW)) u_ports (
    .clk, .rst_n, .port, .wr_stb(io_wr_stb), .wdata(sd_in), .rdata(io_rdata),
    .done, .busy, .ptr_inc, .run, .unger, .theta, .win_page, .src_page,
    .dst_page, .prg_word, .prg_ml, .ptr);

  drc_mux #(.MEM_AW(MEM_AW)) u_mux (
    .prg_ml, .prg_word, .pc_req, .pc_we(acc_we), .pc_addr(acc_addr),
    .pc_wdata(acc_wdata), .xl_sel(run), .xl_req, .xl_we, .xl_addr, .xl_wdata,
    .drc_ml, .drc_req, .drc_we, .drc_addr, .drc_wdata);

  // first clock of each bus cycle
  assign io_wr_stb = io_wr && !io_wr_q;
  always_comb begin
    start_dp = (port == P_DATA) && ((io_rd && !io_rd_q) || (io_wr && !io_wr_q));
    start    = start_dp || (mem_rd && !mem_rd_q) || (mem_wr && !mem_wr_q);
    start_we = start_dp ? io_wr : mem_wr;
  end

  assign pc_req  = (state == S_PEND) && (gap_cnt >= 4'(GAP)) && !run;
  assign ptr_inc = pc_req && acc_dp;
  assign iochrdy = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      io_rd_q <= 1'b0; io_wr_q <= 1'b0; mem_rd_q <= 1'b0; mem_wr_q <= 1'b0;
      state <= S_IDLE; acc_we <= 1'b0; acc_dp <= 1'b0; acc_addr <= '0;
      acc_wdata <= '0; rbuf <= '0; gap_cnt <= 4'(GAP); rd_cnt <= '0;
    end else begin
      io_rd_q <= io_rd; io_wr_q <= io_wr; mem_rd_q <= mem_rd; mem_wr_q <= mem_wr;
      if (drc_req || drc_ml)        gap_cnt <= '0;
      else if (gap_cnt != 4'(GAP))  gap_cnt <= gap_cnt + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          if (run) begin
            if (!start_we) rbuf <= '1;
          end else begin
            state     <= S_PEND;
            acc_we    <= start_we;
            acc_dp    <= start_dp;
            acc_addr  <= start_dp ? ptr : mem_addr;
            acc_wdata <= sd_in;
          end
        end
        S_PEND: if (run) begin
          state <= S_IDLE;
          if (!acc_we) rbuf <= '1;
        end else if (pc_req) begin
          state  <= acc_we ? S_IDLE : S_WAIT;
          rd_cnt <= 4'(ACT_CLKS - 1);
        end
        S_WAIT: if (rd_cnt == '0) begin
          rbuf  <= drc_rdata;
          state <= S_IDLE;
        end else begin
          rd_cnt <= rd_cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Controller port rules: a mode load never coincides with an access,
  // and the PC never reaches the controller while the processor owns it.
  a_ml_alone: assert property (@(posedge clk)
    !(drc_ml && drc_req));
  a_pc_not_while_run: assert property (@(posedge clk)
    !(pc_req && run));

  always_comb begin
    sd_oe  = io_rd || mem_rd;
    sd_out = (io_rd && port != P_DATA) ? io_rdata : rbuf;
  end

endmodule
