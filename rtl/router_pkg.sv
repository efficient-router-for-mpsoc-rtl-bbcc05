// router_pkg: constants and the controller state type shared by the packet
// router blocks (router_fsm, router_reg, router_sync, router_fifo, router_top).
//
// A packet is a header byte, 1..63 payload bytes and one parity byte.  The
// header carries the destination channel in its low ADDR_W bits and the
// payload length in the bits above.  The parity byte is the XOR of the header
// and every payload byte.  The byte width (8) and the four output channels
// follow the router described here; the header layout and the parity rule are
// this design's own choice.
package router_pkg;

  localparam int unsigned DATA_W = 8;   // byte-wide input and channel outputs
  localparam int unsigned NUM_CH = 4;   // four output FIFOs / channels
  localparam int unsigned ADDR_W = $clog2(NUM_CH);

  // The eight controller states.  Five of them are named after the state
  // outputs of the controller (detect_add, lfd_state, ld_state, laf_state,
  // lp_state, full_state); the remaining names are this design's own.
  typedef enum logic [2:0] {
    DECODE_ADDRESS     = 3'd0,  // waiting for a header, detect_add = 1
    LOAD_FIRST_DATA    = 3'd1,  // write the header into the FIFO
    LOAD_DATA          = 3'd2,  // stream payload bytes into the FIFO
    LOAD_PARITY        = 3'd3,  // write the parity byte into the FIFO
    FIFO_FULL_STATE    = 3'd4,  // destination FIFO full, source suspended
    LOAD_AFTER_FULL    = 3'd5,  // write the byte held while the FIFO was full
    WAIT_TILL_EMPTY    = 3'd6,  // destination FIFO still holds an older packet
    CHECK_PARITY_ERROR = 3'd7   // compare parities, clear internal registers
  } router_state_e;

endpackage
