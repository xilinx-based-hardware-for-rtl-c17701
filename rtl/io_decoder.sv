// io_decoder: decodes the PC I/O address into one of the card's ports.
//
// A PC-AT I/O cycle is decoded from SA[9:1] while AEN is low (AEN high
// marks a DMA cycle, in which the address bus carries a memory address).
// The eight word ports sit at IO_BASE..IO_BASE+15. A DMA acknowledge
// (dack_n low) selects the data port regardless of the address, which is
// how the card's memory is reached by DMA through an I/O port.
// Combinational. The base address and the DMA hookup are this design's
// choices.
module io_decoder
  import card_pkg::*;
#(
  parameter logic [9:0] IO_BASE = 10'h300
) (
  input  logic [9:0] sa,
  input  logic       aen,
  input  logic       dack_n,
  input  logic       ior_n,
  input  logic       iow_n,
  output logic       hit,
  output port_e      port,
  output logic       rd,
  output logic       wr
);

  always_comb begin
    if (!dack_n) begin
      hit  = 1'b1;
      port = P_DATA;
    end else begin
      hit  = !aen && (sa[9:4] == IO_BASE[9:4]);
      port = port_e'(sa[3:1]);
    end
    rd = hit && !ior_n;
    wr = hit && !iow_n;
  end

endmodule
