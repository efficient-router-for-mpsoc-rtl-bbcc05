// clos_ic: input control of a 4x4 circuit switch, the state machine that runs
// the path setup of pipelined circuit switching.
//
// When the upstream side raises req_in, the probe on the data wires carries
// the 4-bit output address.  The profitable outputs depend on the stage:
//   STAGE 0: any of the four outputs (each leads to a different middle
//            switch, the four-way path diversity), tried in order 0..3;
//   STAGE 1: output dest[3:2], towards the last-stage switch of the address;
//   STAGE 2: output dest[1:0], the terminal itself.
// States:
//   IDLE      no request; ans_out = None.
//   ROUTE     ask the arbiter for the lowest profitable output not yet tried.
//             If it is not granted (busy, or lost to a higher priority input)
//             it counts as tried.  With no output left: BACK.
//   WAIT_ANS  the output link is held (Req = 1 downstream); wait for its
//             answer.  Back: release the link (Req = 0), mark it tried and
//             ROUTE again.  Ack or nAck: CONNECTED.
//   CONNECTED the circuit is set up; ans_out follows the downstream answer, so
//             Ack/nAck flow control reaches the source.
//   BACK      ans_out = Back until the upstream side releases req_in.
// Dropping req_in in any state releases the held output and returns to IDLE,
// which is the release phase.  This is exhaustive profitable backtracking: the
// probe moves forward over free profitable links, moves back from blocked
// ones, and at the first stage tries all four paths before it gives up.
//
// Each IC answers one cycle after the state change that causes the answer,
// so Ack needs one cycle per stage to reach the source.  The stage rules, the
// try order and the timing are this design's own reading of the network's
// routing description.  Reset (rst_n low) is synchronous.
module clos_ic
  import clos_pkg::*;
#(
  parameter int unsigned STAGE = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_in,
  input  logic [DEST_W-1:0] probe,       // output address on the data wires
  output ans_e              ans_out,     // answer to the upstream side
  output logic              req,         // request to the arbiter
  output port_t             port,        // output asked for / held
  input  logic              grant,
  output logic              release_o,   // free the held output
  input  ans_e              ans_dn       // answer of the held output
);

  typedef enum logic [2:0] {IDLE, ROUTE, WAIT_ANS, CONNECTED, BACK} ic_state_e;

  ic_state_e            state;
  logic [N_PORTS-1:0]   tried;
  port_t                port_q, cand;
  logic                 none_left;

  // Outputs that do not lead towards the address start out as tried.
  function automatic logic [N_PORTS-1:0] unprofitable(input logic [DEST_W-1:0] d);
    logic [N_PORTS-1:0] allowed;
    unique case (STAGE)
      0:       allowed = '1;
      1:       allowed = N_PORTS'(1) << d[DEST_W-1:PORT_W];
      default: allowed = N_PORTS'(1) << d[PORT_W-1:0];
    endcase
    return ~allowed;
  endfunction

  always_comb begin
    cand      = '0;
    none_left = &tried;
    for (int p = N_PORTS - 1; p >= 0; p--)
      if (!tried[p]) cand = port_t'(p);
  end

  assign req       = (state == ROUTE) && req_in && !none_left;
  assign port      = (state == ROUTE) ? cand : port_q;
  assign release_o = ((state == WAIT_ANS) && (!req_in || ans_dn == ANS_BACK))
                  || ((state == CONNECTED) && !req_in);

  always_comb begin
    unique case (state)
      CONNECTED: ans_out = ans_dn;
      BACK:      ans_out = ANS_BACK;
      default:   ans_out = ANS_NONE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= IDLE;
      tried  <= '0;
      port_q <= '0;
    end else begin
      unique case (state)
        IDLE:
          if (req_in) begin
            tried <= unprofitable(probe);
            state <= ROUTE;
          end
        ROUTE:
          if (!req_in)        state <= IDLE;
          else if (none_left) state <= BACK;
          else if (grant) begin
            port_q <= cand;
            state  <= WAIT_ANS;
          end else begin
            tried[cand] <= 1'b1;
          end
        WAIT_ANS:
          if (!req_in) state <= IDLE;
          else if (ans_dn == ANS_BACK) begin
            tried[port_q] <= 1'b1;
            state         <= ROUTE;
          end else if (ans_dn == ANS_ACK || ans_dn == ANS_NACK) begin
            state <= CONNECTED;
          end
        CONNECTED:
          if (!req_in) state <= IDLE;
        BACK:
          if (!req_in) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // A grant only answers a request.
  assert property (@(posedge clk) disable iff (!rst_n) grant |-> req);
  // Handshake rule: an input released for a full cycle answers None.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (!req_in && $past(!req_in)) |-> ans_out == ANS_NONE);

endmodule
