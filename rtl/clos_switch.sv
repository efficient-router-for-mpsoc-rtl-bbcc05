// clos_switch: 4x4 circuit switch, the common building block of all three
// stages of the Clos network.
//
// Control part: four input controls (clos_ic) run the path setup, an arbiter
// (clos_arbiter) grants output links and cross-connects the answers, four
// output controls (clos_oc) hold the links and drive Req downstream.  Data
// part: a multiplexer crossbar (clos_crossbar) connects each held output to
// its owner's input; the probe of the setup phase crosses it like data.
// Every link has data and Req forward and a 2-bit Ans backward (clos_pkg).
// STAGE (0, 1 or 2) sets the routing rule of the input controls.
//
// This structure of four ICs, four OCs, an arbiter and a crossbar follows the
// switch description; the internal timing is this design's own: a request
// that is granted raises Req on the output at the next clock edge.
module clos_switch
  import clos_pkg::*;
#(
  parameter int unsigned STAGE = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_PORTS-1:0] in_req,
  input  logic [LINK_W-1:0]  in_data  [N_PORTS],
  output ans_e               in_ans   [N_PORTS],
  output logic [N_PORTS-1:0] out_req,
  output logic [LINK_W-1:0]  out_data [N_PORTS],
  input  ans_e               out_ans  [N_PORTS]
);

  logic [N_PORTS-1:0] ic_req, ic_release, grant, alloc, release_cmd, oc_free;
  port_t              ic_port [N_PORTS];
  port_t              alloc_ic [N_PORTS];
  port_t              sel [N_PORTS];
  ans_e               ans_to_ic [N_PORTS];

  for (genvar i = 0; i < N_PORTS; i++) begin : g_ic
    clos_ic #(.STAGE(STAGE)) u_ic (
      .clk, .rst_n, .req_in(in_req[i]), .probe(in_data[i][DEST_W-1:0]),
      .ans_out(in_ans[i]), .req(ic_req[i]), .port(ic_port[i]),
      .grant(grant[i]), .release_o(ic_release[i]), .ans_dn(ans_to_ic[i])
    );
  end

  clos_arbiter u_arb (
    .ic_req, .ic_port, .ic_release, .oc_free, .ans_in(out_ans),
    .grant, .alloc, .alloc_ic, .release_cmd, .ans_to_ic
  );

  for (genvar o = 0; o < N_PORTS; o++) begin : g_oc
    clos_oc u_oc (
      .clk, .rst_n, .alloc(alloc[o]), .alloc_ic(alloc_ic[o]),
      .release_cmd(release_cmd[o]), .ans_in(out_ans[o]),
      .req_out(out_req[o]), .sel(sel[o]), .free(oc_free[o])
    );
  end

  clos_crossbar u_xbar (
    .in_data, .busy(out_req), .sel, .out_data
  );

endmodule
