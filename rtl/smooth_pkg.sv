// smooth_pkg: types and constants shared by the smoothing processor.
//
// The smoothing controller is microprogrammed. One microinstruction holds
// a jump-select code for the conditional jump multiplexer, a jump target,
// a delay count for the delay logic and a set of control bits that drive
// the address generator and the data processor. The field layout and the
// microinstruction word width are this design's own; the four-input jump
// multiplexer (constant 0, constant 1, two conditions) follows the
// controller description of the original card.
package smooth_pkg;

  // Microprogram ROM geometry: 32 words, the size of one 32x1 LUT ROM
  // per output bit.
  localparam int unsigned UADDR_W = 5;
  localparam int unsigned DLY_W   = 4;

  // Select code of the conditional jump multiplexer.
  typedef enum logic [1:0] {
    J_NEXT  = 2'd0,   // input tied to 0: sequential execution
    J_ALWAYS = 2'd1,  // input tied to 1: unconditional jump
    J_WORDS = 2'd2,   // condition 0: more words left in this row
    J_ROWS  = 2'd3    // condition 1: more rows left in the image
  } jsel_e;

  // Control bits. One-shot bits act in the first clock of an instruction.
  typedef struct packed {
    logic row_clr;   // row counter <= 0
    logic row_inc;   // row counter + 1
    logic word_clr;  // word counter <= 0
    logic word_inc;  // word counter + 1
    logic disp_m1;   // row displacement <= -1
    logic disp_up;   // row displacement + 1
    logic regs_clr;  // clear the three 16+2 bit row registers
    logic ld_a;      // load row n-1 register from memory data
    logic ld_b;      // load row n   register
    logic ld_c;      // load row n+1 register
    logic ld_out;    // load output register from the filter
    logic mem_rd;    // start a memory read at the source address
    logic mem_wr;    // start a memory write at the destination address
    logic done;      // smoothing finished
  } ctrl_t;

  typedef struct packed {
    jsel_e              jsel;
    logic [UADDR_W-1:0] jaddr;
    logic [DLY_W-1:0]   delay;
    ctrl_t              ctrl;
  } uinstr_t;

  localparam ctrl_t CTRL_NONE = '0;

endpackage
