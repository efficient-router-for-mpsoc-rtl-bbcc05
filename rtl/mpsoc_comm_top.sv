// mpsoc_comm_top: the two communication structures for a multiprocessor
// system-on-chip, side by side, each with its own ports.
//
//  * u_router: the FSM and FIFO based packet router (router_top).  One
//    byte-wide packet input with packet_valid and a suspend_data back-
//    pressure output; four output channels, each a FIFO with a valid flag
//    and a read enable; a parity error flag.
//  * u_clos:   the three-stage Clos network C(4,4,4) (clos_network) with 16
//    inputs and 16 outputs, pipelined circuit switching with a 1-bit Req and
//    a 2-bit Ans per link and exhaustive profitable backtracking for the
//    path setup.
//
// The two share only the clock.  The router's reset is active low (resetn),
// as is the network's (rst_n); both are synchronous.
module mpsoc_comm_top
  import router_pkg::*;
  import clos_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  // packet router
  input  logic              resetn,
  input  logic              packet_valid,
  input  logic [7:0]        data_in,
  input  logic [3:0]        re,
  output logic [7:0]        ch_out [4],
  output logic [3:0]        valid_chanel,
  output logic              err,
  output logic              suspend_data,
  // Clos network
  input  logic              rst_n,
  input  logic [15:0]       src_req,
  input  logic [7:0]        src_data [16],
  output logic [1:0]        src_ans  [16],
  output logic [15:0]       dst_req,
  output logic [7:0]        dst_data [16],
  input  logic [1:0]        dst_ans  [16]
);

  router_top #(.FIFO_DEPTH(FIFO_DEPTH)) u_router (
    .clk, .resetn, .packet_valid, .data_in, .re, .ch_out, .valid_chanel,
    .err, .suspend_data
  );

  ans_e src_ans_e [N_TERM];
  ans_e dst_ans_e [N_TERM];

  for (genvar t = 0; t < N_TERM; t++) begin : g_ans
    assign src_ans[t]   = src_ans_e[t];
    assign dst_ans_e[t] = ans_e'(dst_ans[t]);
  end

  clos_network u_clos (
    .clk, .rst_n, .src_req, .src_data, .src_ans(src_ans_e),
    .dst_req, .dst_data, .dst_ans(dst_ans_e)
  );

endmodule
