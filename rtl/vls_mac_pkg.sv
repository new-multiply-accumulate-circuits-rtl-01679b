// Shared constants and types of the variable-latency speculative (VLS)
// multiply-accumulate units.
//
// DEFAULT_N is the operand width of every figure of the architecture
// (8x8); the 16- and 32-bit sizes are obtained by overriding N.
// DEFAULT_LONG_CYCLES is this design's choice for how many clock cycles the
// long (critical) data path is given when the clock period is set by the
// short data path: the long path is at most 1.3 times the short one in all
// reported sizes, so two cycles always suffice.
package vls_mac_pkg;

  parameter int unsigned DEFAULT_N           = 8;
  parameter int unsigned DEFAULT_LONG_CYCLES = 2;

  // Sequencer state of the variable-latency controller.
  typedef enum logic [0:0] {
    CTRL_IDLE = 1'b0,   // waiting for an operand pair, or finishing a short op
    CTRL_LONG = 1'b1    // a long-path operation is settling
  } ctrl_state_e;

  // Identifies one of the five MAC architectures side by side in the top.
  typedef enum logic [2:0] {
    MAC_TYPE1A = 3'd0,
    MAC_TYPE1B = 3'd1,
    MAC_TYPE2A = 3'd2,
    MAC_TYPE2B = 3'd3,
    MAC_TYPE3  = 3'd4
  } mac_type_e;

  parameter int unsigned NUM_MAC_TYPES = 5;

endpackage
