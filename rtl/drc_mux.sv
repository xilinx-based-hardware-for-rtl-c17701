// drc_mux: address and control signal multiplexer in front of the DRAM
// controller.
//
// Three sources share the controller's address and control lines:
//   - the programming word from the I/O ports (mode load strobe),
//   - the PC: accesses through the memory window or the data port,
//   - the data processor FPGA while it runs.
// Priority: a mode load wins, then the data processor when xl_sel is high,
// otherwise the PC. The write data for the memory follows the selected
// source. Combinational. The priority order is this design's choice.
module drc_mux #(
  parameter int unsigned MEM_AW = 18
) (
  input  logic              prg_ml,
  input  logic [MEM_AW-1:0] prg_word,
  input  logic              pc_req,
  input  logic              pc_we,
  input  logic [MEM_AW-1:0] pc_addr,
  input  logic [15:0]       pc_wdata,
  input  logic              xl_sel,
  input  logic              xl_req,
  input  logic              xl_we,
  input  logic [MEM_AW-1:0] xl_addr,
  input  logic [15:0]       xl_wdata,
  output logic              drc_ml,
  output logic              drc_req,
  output logic              drc_we,
  output logic [MEM_AW-1:0] drc_addr,
  output logic [15:0]       drc_wdata
);

  always_comb begin
    drc_ml = 1'b0;
    if (prg_ml) begin
      drc_ml    = 1'b1;
      drc_req   = 1'b0;
      drc_we    = 1'b0;
      drc_addr  = prg_word;
      drc_wdata = '0;
    end else if (xl_sel) begin
      drc_req   = xl_req;
      drc_we    = xl_we;
      drc_addr  = xl_addr;
      drc_wdata = xl_wdata;
    end else begin
      drc_req   = pc_req;
      drc_we    = pc_we;
      drc_addr  = pc_addr;
      drc_wdata = pc_wdata;
    end
  end

endmodule
