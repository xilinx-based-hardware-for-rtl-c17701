// delay_logic: stalls the microprogram for a given number of clocks.
//
// A loadable down counter that is normally idle (zero). In the first clock
// of a microinstruction (`first` high) a non-zero delay field d loads the
// counter, which then counts down; while it is non-zero the microprogram
// address counter is inhibited and the controller keeps its state. An
// instruction with delay d therefore lasts d+1 clocks. `advance` tells the
// address counter to step (or jump) in the last clock of the instruction.
// clr (controller stopped) returns the counter to idle.
// Loading the counter from the microinstruction and inhibiting the address
// counter follow the original controller; the exact d+1 clock count and the
// first/advance outputs are this design's definition.
module delay_logic #(
  parameter int unsigned DLY_BITS = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic [DLY_BITS-1:0] delay,
  output logic                first,
  output logic                advance
);

  logic [DLY_BITS-1:0] cnt;

  assign first   = (cnt == '0);
  assign advance = first ? (delay == '0) : (cnt == DLY_BITS'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cnt <= '0;
    else if (clr)    cnt <= '0;
    else if (first)  cnt <= delay;
    else             cnt <= cnt - 1'b1;
  end

endmodule
