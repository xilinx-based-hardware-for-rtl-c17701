// drc_dram_model: behavioural model of one DRAM controller port with its
// 16-bit memory block, for simulation only (not synthesisable intent).
//
// Accepts a one-clock start strobe (req) with we/addr/wdata. A write is
// stored at the strobe. A read returns the word on rdata from ACT_CLKS
// clocks after the strobe and holds it until the next read completes.
// A strobe on ml (mode load) captures addr as the controller's mode word.
// The model counts protocol errors: a strobe earlier than ACT_CLKS+PRE_CLKS
// clocks after the previous one, or a mode load during an access.
// It performs no refresh. The array is public for back-door loading.
module drc_dram_model #(
  parameter int unsigned AW       = 18,
  parameter int unsigned ACT_CLKS = 4,
  parameter int unsigned PRE_CLKS = 4
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   wdata,
  output logic [15:0]   rdata,
  input  logic          ml
);

  logic [15:0]   mem [2**AW];
  logic [AW-1:0] mode_word = '0;
  int unsigned   since = 1000;
  int unsigned   cnt = 0;
  logic [AW-1:0] raddr;
  int unsigned   errors = 0;
  int unsigned   accesses = 0;
  int unsigned   writes = 0;
  int unsigned   min_gap = 1000;

  initial rdata = '0;

  always @(posedge clk) begin
    if (since < 1000) since <= since + 1;
    if (req) begin
      if (since + 1 < ACT_CLKS + PRE_CLKS) errors <= errors + 1;
      if (since + 1 < min_gap) min_gap <= since + 1;
      since    <= 0;
      accesses <= accesses + 1;
      if (we) begin
        mem[addr] <= wdata;
        writes <= writes + 1;
      end else begin
        raddr <= addr;
        cnt   <= ACT_CLKS - 1;
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 1;
      if (cnt == 1) rdata <= mem[raddr];
    end
    if (ml) begin
      if (since + 1 < ACT_CLKS + PRE_CLKS) errors <= errors + 1;
      mode_word <= addr;
    end
  end

endmodule
