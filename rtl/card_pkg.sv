// card_pkg: register map of the card's PC interface.
//
// The card occupies eight 16-bit I/O ports starting at the I/O base. The
// port numbers are SA[3:1] of the I/O address. The map is this design's
// own; the kinds of registers (control, memory page select, controller
// programming word, a data port for programmed or DMA transfers) follow
// the interface described for the original card.
package card_pkg;

  typedef enum logic [2:0] {
    P_CTRL    = 3'd0,  // R/W [0] run, [1] Unger (0 = Dineen), [7:4] theta,
                       //     [11:8] source page, [15:12] destination page
    P_STATUS  = 3'd1,  // R   [0] done, [1] busy
    P_PAGE    = 3'd2,  // R/W memory window page
    P_PRG_LO  = 3'd3,  // R/W DRAM controller programming word, bits 15:0
    P_PRG_HI  = 3'd4,  // R/W programming word high bits; a write also loads the controller mode
    P_PTR_LO  = 3'd5,  // R/W data port word address, bits 15:0
    P_PTR_HI  = 3'd6,  // R/W data port word address, high bits
    P_DATA    = 3'd7   // R/W memory word at the data port address, address then + 1
  } port_e;

endpackage
