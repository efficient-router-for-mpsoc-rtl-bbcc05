// router_fsm: the controller of the packet router.
//
// An eight-state machine that takes one packet at a time from the byte-wide
// input and loads it into the FIFO of its destination channel:
//   DECODE_ADDRESS     detect_add = 1; a header is taken when packet_valid is
//                      high.  Goes to LOAD_FIRST_DATA if the destination FIFO
//                      is empty, otherwise to WAIT_TILL_EMPTY.
//   WAIT_TILL_EMPTY    source suspended until the destination FIFO is empty.
//   LOAD_FIRST_DATA    lfd_state: the header is written into the FIFO.
//   LOAD_DATA          ld_state: each cycle one payload byte is taken.  It is
//                      written if the FIFO has room, otherwise it is held and
//                      the machine goes to FIFO_FULL_STATE.  A byte with
//                      packet_valid low is the parity byte: go to LOAD_PARITY.
//   FIFO_FULL_STATE    full_state: source suspended until the FIFO has room.
//   LOAD_AFTER_FULL    laf_state: the held byte is written; back to LOAD_DATA,
//                      or to CHECK_PARITY_ERROR if it was the parity byte
//                      (low_pkt_valid set).
//   LOAD_PARITY        lp_state: the parity byte is written, or the machine
//                      goes to FIFO_FULL_STATE if the FIFO is full.
//   CHECK_PARITY_ERROR rst_int_reg = 1: the datapath compares parities and
//                      clears its flags; back to DECODE_ADDRESS once
//                      parity_done is seen.
// suspend_data is high in every state except DECODE_ADDRESS and LOAD_DATA: the
// source must hold its byte on a clock edge where suspend_data was high.
// write_enb_reg is the single FIFO write strobe, steered by router_sync.
//
// The number of states and the port names follow the router's controller
// block; the state names not given by its outputs, the transitions and the
// suspend rule are this design's own.  Reset is synchronous, active low.
module router_fsm
  import router_pkg::*;
(
  input  logic clk,
  input  logic resetn,
  input  logic pkt_valid,
  input  logic fifo_full,
  input  logic fifo_empty,
  input  logic parity_done,
  input  logic low_pkt_valid,
  output logic suspend_data,
  output logic write_enb_reg,
  output logic detect_add,
  output logic ld_state,
  output logic lp_state,
  output logic laf_state,
  output logic lfd_state,
  output logic full_state,
  output logic rst_int_reg
);

  router_state_e state, next;

  always_ff @(posedge clk) begin
    if (!resetn) state <= DECODE_ADDRESS;
    else         state <= next;
  end

  always_comb begin
    next = state;
    unique case (state)
      DECODE_ADDRESS:     if (pkt_valid) next = fifo_empty ? LOAD_FIRST_DATA : WAIT_TILL_EMPTY;
      WAIT_TILL_EMPTY:    if (fifo_empty) next = LOAD_FIRST_DATA;
      LOAD_FIRST_DATA:    next = LOAD_DATA;
      LOAD_DATA:          if (!pkt_valid)    next = LOAD_PARITY;
                          else if (fifo_full) next = FIFO_FULL_STATE;
      FIFO_FULL_STATE:    if (!fifo_full) next = LOAD_AFTER_FULL;
      LOAD_AFTER_FULL:    next = low_pkt_valid ? CHECK_PARITY_ERROR : LOAD_DATA;
      LOAD_PARITY:        next = fifo_full ? FIFO_FULL_STATE : CHECK_PARITY_ERROR;
      CHECK_PARITY_ERROR: if (parity_done) next = DECODE_ADDRESS;
      default:            next = DECODE_ADDRESS;
    endcase
  end

  assign detect_add   = (state == DECODE_ADDRESS);
  assign lfd_state    = (state == LOAD_FIRST_DATA);
  assign ld_state     = (state == LOAD_DATA);
  assign lp_state     = (state == LOAD_PARITY);
  assign laf_state    = (state == LOAD_AFTER_FULL);
  assign full_state   = (state == FIFO_FULL_STATE);
  assign rst_int_reg  = (state == CHECK_PARITY_ERROR);
  assign suspend_data = !(detect_add || ld_state);
  assign write_enb_reg = lfd_state || laf_state
                      || (ld_state && pkt_valid && !fifo_full)
                      || (lp_state && !fifo_full);

endmodule
