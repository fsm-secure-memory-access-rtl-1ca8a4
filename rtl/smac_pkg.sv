// smac_pkg: types and constants shared by the secure memory access
// controller (SMAC), its block RAM and the GPIO wrapper.
//
// The two 32-bit GPIO registers that link the processor side (PS) and the
// programmable-logic side (PL) are split into a control half (bits 31..16)
// and a 16-bit data half (bits 15..0). The bit positions below are the
// published register map; RESET_EXT (31), done (25), ready (31) and
// stopped (28) carry printed bit numbers, while start (30), load_unload (26)
// and continue (24) are read off their column in the same map. The other
// control bits are unused.
//
// The state set is the one of the controller's algorithm: idle, load_mem,
// unload_mem, wait_load_unload and wait_done. Its encoding is this design's
// own choice.
package smac_pkg;

  // Width of each GPIO register and of its data field.
  localparam int unsigned GPIO_W = 32;
  localparam int unsigned SMAC_DATA_W = 16;

  // Default BRAM address width: 1K words of 16 bits, one 18 Kb block RAM.
  localparam int unsigned SMAC_ADDR_W = 10;

  // GPIO_Ins (written by the PS, read by the PL).
  localparam int unsigned GI_RESET_EXT   = 31;
  localparam int unsigned GI_START       = 30;
  localparam int unsigned GI_LOAD_UNLOAD = 26;
  localparam int unsigned GI_DONE        = 25;
  localparam int unsigned GI_CONTINUE    = 24;

  // GPIO_Outs (written by the PL, read by the PS).
  localparam int unsigned GO_READY       = 31;
  localparam int unsigned GO_STOPPED     = 28;

  // Controller states.
  typedef enum logic [2:0] {
    ST_IDLE             = 3'd0,
    ST_LOAD_MEM         = 3'd1,
    ST_UNLOAD_MEM       = 3'd2,
    ST_WAIT_LOAD_UNLOAD = 3'd3,
    ST_WAIT_DONE        = 3'd4
  } smac_state_t;

endpackage
