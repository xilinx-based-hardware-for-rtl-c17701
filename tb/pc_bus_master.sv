// pc_bus_master: simulation-only PC-AT bus master for the card's
// testbenches. Its tasks run I/O and memory read/write cycles, synchronous
// to clk (signals change on the falling edge), hold each strobe for at
// least three clocks and stretch it while the card pulls iochrdy low.
// Counts wait-state clocks in `waits`.
module pc_bus_master
  import card_pkg::*;
#(
  parameter logic [9:0]  IO_BASE  = 10'h300,
  parameter logic [19:0] WIN_BASE = 20'hD0000
) (
  input  logic        clk,
  output logic [19:0] sa,
  output logic [15:0] sd_in,
  input  logic [15:0] sd_out,
  input  logic        sd_oe,
  output logic        ior_n,
  output logic        iow_n,
  output logic        memr_n,
  output logic        memw_n,
  output logic        aen,
  output logic        dack_n,
  input  logic        iochrdy
);
  int unsigned waits = 0;
  int unsigned oe_errors = 0;

  initial begin
    sa = '0; sd_in = '0; ior_n = 1; iow_n = 1; memr_n = 1; memw_n = 1; aen = 0; dack_n = 1;
  end

  task automatic finish_cycle(input bit is_read, output logic [15:0] d);
    repeat (2) @(negedge clk);
    while (!iochrdy) begin waits++; @(negedge clk); end
    @(negedge clk);
    d = sd_out;
    if (is_read && !sd_oe) oe_errors++;
    if (!is_read && sd_oe) oe_errors++;
    ior_n = 1; iow_n = 1; memr_n = 1; memw_n = 1; dack_n = 1; aen = 0;
    @(negedge clk);
  endtask

  task automatic io_write(input port_e port, input logic [15:0] d);
    logic [15:0] unused;
    sa = 20'(IO_BASE) + 20'(port) * 20'd2; sd_in = d; iow_n = 0;
    finish_cycle(0, unused);
  endtask

  task automatic io_read(input port_e port, output logic [15:0] d);
    sa = 20'(IO_BASE) + 20'(port) * 20'd2; ior_n = 0;
    finish_cycle(1, d);
  endtask

  // byte offset inside the memory window
  task automatic mem_write(input logic [15:0] off, input logic [15:0] d);
    logic [15:0] unused;
    sa = WIN_BASE + 20'(off); sd_in = d; memw_n = 0;
    finish_cycle(0, unused);
  endtask

  task automatic mem_read(input logic [15:0] off, output logic [15:0] d);
    sa = WIN_BASE + 20'(off); memr_n = 0;
    finish_cycle(1, d);
  endtask

  // DMA cycles: the controller puts a memory address on the bus with AEN
  // high; the card answers through its data port.
  task automatic dma_write(input logic [15:0] d);
    logic [15:0] unused;
    sa = 20'h12340; aen = 1; dack_n = 0; sd_in = d; iow_n = 0; memr_n = 0;
    finish_cycle(0, unused);
  endtask

  task automatic dma_read(output logic [15:0] d);
    sa = 20'h12340; aen = 1; dack_n = 0; ior_n = 0; memw_n = 0;
    finish_cycle(1, d);
  endtask
endmodule
