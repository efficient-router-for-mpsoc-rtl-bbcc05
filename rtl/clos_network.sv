// clos_network: three-stage Clos network C(4,4,4) with 16 inputs and 16
// outputs, built from twelve 4x4 circuit switches.
//
// Switch s of a stage has its output j wired to input s of switch j of the
// next stage, so every first-stage switch reaches every middle switch and
// every middle switch reaches every last-stage switch.  Input terminal t
// enters first-stage switch t/4 at its port t%4; output terminal d leaves
// last-stage switch d/4 at its port d%4, so the 4-bit output address names
// the last-stage switch in its upper two bits and the port in its lower two.
// Between any input and output there are four paths, one per middle switch.
//
// A source sets up a circuit by raising src_req[t] with the output address on
// the low bits of src_data[t] and waiting for src_ans[t]: Ack (or nAck) means
// the circuit is set up, after which src_data[t] reaches dst_data[d] in the
// same cycle; Back means no free path was found and the source must drop
// src_req and try again later.  Dropping src_req releases the circuit stage
// by stage.  The destination sees dst_req[d] and answers on dst_ans[d]: Ack
// when it can take data, nAck when it cannot.
//
// The C(4,4,4) topology, its wiring and the handshake codes follow the
// network description; the width of the data bus (8 bits) is this design's
// choice.
module clos_network
  import clos_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_TERM-1:0] src_req,
  input  logic [LINK_W-1:0] src_data [N_TERM],
  output ans_e              src_ans  [N_TERM],
  output logic [N_TERM-1:0] dst_req,
  output logic [LINK_W-1:0] dst_data [N_TERM],
  input  ans_e              dst_ans  [N_TERM]
);

  // Links between stage k and stage k+1, indexed by (upstream switch,
  // upstream output port).
  logic [N_PORTS-1:0] s0_req  [N_PORTS], s1_req  [N_PORTS];
  logic [LINK_W-1:0]  s0_data [N_PORTS][N_PORTS], s1_data [N_PORTS][N_PORTS];
  ans_e               s0_ans  [N_PORTS][N_PORTS], s1_ans  [N_PORTS][N_PORTS];

  for (genvar s = 0; s < N_PORTS; s++) begin : g_sw
    // Per-switch port views
    logic [N_PORTS-1:0] in1_req, in2_req, out2_req;
    logic [LINK_W-1:0]  in0_data [N_PORTS], in1_data [N_PORTS], in2_data [N_PORTS];
    logic [LINK_W-1:0]  out2_data [N_PORTS];
    ans_e               in0_ans [N_PORTS], in1_ans [N_PORTS], in2_ans [N_PORTS];
    ans_e               out1_ans [N_PORTS], out2_ans [N_PORTS], out0_ans [N_PORTS];

    for (genvar p = 0; p < N_PORTS; p++) begin : g_wire
      // first stage: terminals in, links to middle switch p out
      assign in0_data[p]  = src_data[s*N_PORTS + p];
      assign src_ans[s*N_PORTS + p] = in0_ans[p];
      assign out0_ans[p]  = s0_ans[s][p];
      // middle stage: input p comes from first-stage switch p, output p goes
      // to last-stage switch p
      assign in1_req[p]   = s0_req[p][s];
      assign in1_data[p]  = s0_data[p][s];
      assign s0_ans[p][s] = in1_ans[p];
      assign out1_ans[p]  = s1_ans[s][p];
      // last stage: input p comes from middle switch p, outputs are terminals
      assign in2_req[p]   = s1_req[p][s];
      assign in2_data[p]  = s1_data[p][s];
      assign s1_ans[p][s] = in2_ans[p];
      assign dst_data[s*N_PORTS + p] = out2_data[p];
      assign out2_ans[p]  = dst_ans[s*N_PORTS + p];
    end
    assign dst_req[s*N_PORTS +: N_PORTS] = out2_req;

    clos_switch #(.STAGE(0)) u_first (
      .clk, .rst_n, .in_req(src_req[s*N_PORTS +: N_PORTS]), .in_data(in0_data),
      .in_ans(in0_ans), .out_req(s0_req[s]), .out_data(s0_data[s]), .out_ans(out0_ans)
    );
    clos_switch #(.STAGE(1)) u_middle (
      .clk, .rst_n, .in_req(in1_req), .in_data(in1_data), .in_ans(in1_ans),
      .out_req(s1_req[s]), .out_data(s1_data[s]), .out_ans(out1_ans)
    );
    clos_switch #(.STAGE(2)) u_last (
      .clk, .rst_n, .in_req(in2_req), .in_data(in2_data), .in_ans(in2_ans),
      .out_req(out2_req), .out_data(out2_data), .out_ans(out2_ans)
    );
  end

endmodule
