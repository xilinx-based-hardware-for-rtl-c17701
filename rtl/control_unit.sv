// control_unit: microprogrammed controller of the smoothing circuit.
//
// Parts, as on the original card:
//   - address counter: a loadable forward counter that addresses the
//     microprogram ROM,
//   - conditional jump control: a 4-input multiplexer whose select lines
//     come from the ROM; its inputs are constant 0 (next instruction),
//     constant 1 (unconditional jump) and the two conditions more_words and
//     more_rows. Its output is the load input of the address counter,
//   - delay logic: inhibits the address counter for the number of clocks
//     in the instruction's delay field,
//   - the microprogram ROM.
// The control bits of an instruction are driven in its first clock only,
// so each one acts once even when the instruction is stretched by a delay;
// the jump decision is taken in its last clock. While run is low the
// address counter is held at 0 and no control bit is driven; raising run
// starts the program from address 0. These start/stop rules are this
// design's choice.
module control_unit
  import smooth_pkg::*;
#(
  parameter int unsigned ACT_CLKS = 4,
  parameter int unsigned PRE_CLKS = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  run,
  input  logic  more_words,
  input  logic  more_rows,
  output ctrl_t ctrl,
  output logic  done
);

  logic [UADDR_W-1:0] upc;
  uinstr_t            instr;
  logic               first, advance, jump;

  microprogram_rom #(.ACT_CLKS(ACT_CLKS), .PRE_CLKS(PRE_CLKS)) u_rom (
    .addr(upc), .instr);

  delay_logic #(.DLY_BITS(DLY_W)) u_delay (
    .clk, .rst_n, .clr(!run), .delay(instr.delay), .first, .advance);

  always_comb begin
    unique case (instr.jsel)
      J_NEXT:   jump = 1'b0;
      J_ALWAYS: jump = 1'b1;
      J_WORDS:  jump = more_words;
      J_ROWS:   jump = more_rows;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        upc <= '0;
    else if (!run)     upc <= '0;
    else if (advance)  upc <= jump ? instr.jaddr : upc + 1'b1;
  end

  assign ctrl = (run && first) ? instr.ctrl : CTRL_NONE;
  assign done = run && instr.ctrl.done;

endmodule
