// router_top: FSM and FIFO based packet router, one byte-wide input and
// NUM_CH output channels.
//
// A source sends a packet as a header byte (destination channel in the low
// two bits, payload length above), the payload bytes, and a parity byte (XOR
// of all previous bytes of the packet).  packet_valid is high with the header
// and payload bytes and low with the parity byte.  The source presents one
// byte per cycle and holds it over any clock edge at which suspend_data was
// high.  The controller (router_fsm) loads the whole packet, parity byte
// included, into the FIFO of the addressed channel (router_fifo, one per
// channel) through the FIFO synchronizer (router_sync); router_reg keeps
// header, held byte and parity and raises err after a packet whose parity
// byte does not match.  valid_chanel[i] is high while FIFO i holds data; the
// receiver of channel i pulses re[i] and takes ch_out[i] one cycle later.
//
// Timing: a packet with N payload bytes into a FIFO with room occupies the
// input for N + 5 cycles (decode, header write, N payload, parity, parity
// write, check).  Reset (resetn low) is synchronous.
//
// Four channels follow the router's synchronizer, its four FIFOs and its
// simulated outputs; the FIFO depth and packet format are this design's own.
module router_top
  import router_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              resetn,
  input  logic              packet_valid,
  input  logic [DATA_W-1:0] data_in,
  input  logic [NUM_CH-1:0] re,
  output logic [DATA_W-1:0] ch_out [NUM_CH],
  output logic [NUM_CH-1:0] valid_chanel,
  output logic              err,
  output logic              suspend_data
);

  logic              fifo_full, fifo_empty, parity_done, low_pkt_valid;
  logic              write_enb_reg, detect_add, ld_state, lp_state, laf_state;
  logic              lfd_state, full_state, rst_int_reg;
  logic [NUM_CH-1:0] write_enb, full, empty;
  logic [DATA_W-1:0] dout;

  router_fsm u_fsm (
    .clk, .resetn, .pkt_valid(packet_valid), .fifo_full, .fifo_empty,
    .parity_done, .low_pkt_valid, .suspend_data, .write_enb_reg, .detect_add,
    .ld_state, .lp_state, .laf_state, .lfd_state, .full_state, .rst_int_reg
  );

  router_sync #(.N_CH(NUM_CH)) u_sync (
    .clk, .resetn, .data(data_in[ADDR_W-1:0]), .detect_add, .full, .empty,
    .write_enb_reg, .fifo_full, .fifo_empty, .write_enb, .vld_out(valid_chanel)
  );

  router_reg u_reg (
    .clk, .resetn, .pkt_valid(packet_valid), .data_in, .fifo_full, .detect_add,
    .lfd_state, .ld_state, .laf_state, .lp_state, .rst_int_reg,
    .parity_done, .low_pkt_valid, .err, .dout
  );

  for (genvar i = 0; i < NUM_CH; i++) begin : g_fifo
    router_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .resetn, .write_enb(write_enb[i]), .read_enb(re[i]),
      .data_in(dout), .full(full[i]), .empty(empty[i]), .data_out(ch_out[i])
    );
  end

  // A write is only ever steered to a FIFO that has room.
  assert property (@(posedge clk) disable iff (!resetn) (write_enb & full) == '0);
  // One packet at a time: the source is stalled except while a byte is taken.
  assert property (@(posedge clk) disable iff (!resetn)
                   full_state |-> suspend_data);

endmodule
