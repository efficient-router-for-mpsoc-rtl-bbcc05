// clos_oc: output control of one output link of a 4x4 circuit switch.
//
// Acts on the arbiter's commands.  alloc (with alloc_ic, the input control
// that won the link) makes the link busy; release_cmd frees it.  While busy,
// req_out = 1 towards the downstream switch and sel tells the crossbar which
// input to connect.  A link is offered to the arbiter as free only when it is
// not busy and the downstream side has withdrawn its answer (ans_in = None),
// so a new owner never sees an answer meant for the previous one.
// req_out and sel are registered: they change on the clock edge of the
// command.  Reset (rst_n low) is synchronous and frees the link.
//
// The role of the block follows the switch description; its registers and
// the free rule are this design's own.
module clos_oc
  import clos_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  alloc,
  input  port_t alloc_ic,
  input  logic  release_cmd,
  input  ans_e  ans_in,
  output logic  req_out,
  output port_t sel,
  output logic  free
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_out <= 1'b0;
      sel     <= '0;
    end else if (alloc) begin
      req_out <= 1'b1;
      sel     <= alloc_ic;
    end else if (release_cmd) begin
      req_out <= 1'b0;
    end
  end

  assign free = !req_out && (ans_in == ANS_NONE);

  assert property (@(posedge clk) disable iff (!rst_n) alloc |-> free);

endmodule
