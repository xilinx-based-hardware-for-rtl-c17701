// io_ports: the card's I/O registers (see card_pkg for the map).
//
// Holds the control word (run, filter select, Dineen threshold, source and
// destination image pages), the memory window page, the DRAM controller
// programming word and the data port address pointer; reports done/busy.
// Writing the high half of the programming word also emits a one-clock
// mode-load strobe that presents the word to the DRAM controller. The
// pointer advances by one word on ptr_inc (after each data port access).
// Interface: wr_stb is a one-clock strobe at the start of an I/O write to
// `port`; rdata is the read-back value of `port`, combinational.
// All registers reset to zero, so the processor is stopped after reset.
// Register layout and reset values are this design's choices.
module io_ports
  import card_pkg::*;
#(
  parameter int unsigned  MEM_AW    = 18,
  localparam int unsigned WPG_BITS  = MEM_AW - 15,
  localparam int unsigned HI_BITS   = MEM_AW - 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  port_e                port,
  input  logic                 wr_stb,
  input  logic [15:0]          wdata,
  output logic [15:0]          rdata,
  input  logic                 done,
  input  logic                 busy,
  input  logic                 ptr_inc,
  output logic                 run,
  output logic                 unger,
  output logic [3:0]           theta,
  output logic [WPG_BITS-1:0]  win_page,
  output logic [3:0]           src_page,
  output logic [3:0]           dst_page,
  output logic [MEM_AW-1:0]    prg_word,
  output logic                 prg_ml,
  output logic [MEM_AW-1:0]    ptr
);

  initial begin
    assert (MEM_AW > 16 && WPG_BITS <= 16)
      else $error("io_ports: unsupported MEM_AW");
  end

  logic [15:0] ctrl_q;

  assign run      = ctrl_q[0];
  assign unger    = ctrl_q[1];
  assign theta    = ctrl_q[7:4];
  assign src_page = ctrl_q[11:8];
  assign dst_page = ctrl_q[15:12];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q   <= '0;
      win_page <= '0;
      prg_word <= '0;
      prg_ml   <= 1'b0;
      ptr      <= '0;
    end else begin
      prg_ml <= 1'b0;
      if (wr_stb) begin
        unique case (port)
          P_CTRL:   ctrl_q <= wdata;
          P_PAGE:   win_page <= wdata[WPG_BITS-1:0];
          P_PRG_LO: prg_word[15:0] <= wdata;
          P_PRG_HI: begin
            prg_word[MEM_AW-1:16] <= wdata[HI_BITS-1:0];
            prg_ml <= 1'b1;
          end
          P_PTR_LO: ptr[15:0] <= wdata;
          P_PTR_HI: ptr[MEM_AW-1:16] <= wdata[HI_BITS-1:0];
          default: ;
        endcase
      end
      if (ptr_inc) ptr <= ptr + 1'b1;
    end
  end

  always_comb begin
    unique case (port)
      P_CTRL:   rdata = ctrl_q;
      P_STATUS: rdata = {14'b0, busy, done};
      P_PAGE:   rdata = 16'(win_page);
      P_PRG_LO: rdata = prg_word[15:0];
      P_PRG_HI: rdata = 16'(prg_word[MEM_AW-1:16]);
      P_PTR_LO: rdata = ptr[15:0];
      P_PTR_HI: rdata = 16'(ptr[MEM_AW-1:16]);
      default:  rdata = '0;
    endcase
  end

endmodule
