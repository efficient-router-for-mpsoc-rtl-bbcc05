// clos_pkg: constants and handshake types of the three-stage Clos network
// C(4,4,4) and its 4x4 circuit switches.
//
// Every link carries a data bus forward, a 1-bit request (Req) forward and a
// 2-bit answer (Ans) backward.  Req = 1 holds the link; Req = 0 releases it.
// Ans = 01 (Ack): the path to the destination is set up, data may flow.
// Ans = 11 (nAck): the path is set up but the destination cannot take data.
// Ans = 10 (Back): the link or the path beyond it is blocked; the probe must
// back off.  Ans = 00 means no answer yet, or an idle link (this value is
// this design's choice; the other three codes are the network's own).
package clos_pkg;

  localparam int unsigned N_PORTS = 4;               // n = m = p = 4
  localparam int unsigned PORT_W  = $clog2(N_PORTS);
  localparam int unsigned N_TERM  = N_PORTS * N_PORTS; // 16 inputs, 16 outputs
  localparam int unsigned DEST_W  = $clog2(N_TERM);  // 4-bit output address in the probe
  localparam int unsigned LINK_W  = 8;               // data bus width

  typedef enum logic [1:0] {
    ANS_NONE = 2'b00,
    ANS_ACK  = 2'b01,
    ANS_BACK = 2'b10,
    ANS_NACK = 2'b11
  } ans_e;

  typedef logic [PORT_W-1:0] port_t;

endpackage
