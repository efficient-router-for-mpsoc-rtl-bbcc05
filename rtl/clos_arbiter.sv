// clos_arbiter: arbiter of a 4x4 circuit switch.
//
// Two jobs.  As referee, it takes the request of each input control (ic_req
// with the wanted output ic_port) and grants each free output to at most one
// of them: when several input controls want the same free output, the one
// with the lowest index wins (a fixed priority).  A grant is combinational and
// takes effect on the next clock edge through the output control's alloc
// command.  A release from an input control is passed to the output control
// it names.  As cross-connect, it routes the answer of each output link
// (ans_in) back to the input control whose port names that output.
//
// The two jobs follow the switch description; the fixed priority order
// (input 0 first) is this design's choice.
module clos_arbiter
  import clos_pkg::*;
(
  input  logic [N_PORTS-1:0] ic_req,
  input  port_t              ic_port     [N_PORTS],
  input  logic [N_PORTS-1:0] ic_release,
  input  logic [N_PORTS-1:0] oc_free,
  input  ans_e               ans_in      [N_PORTS],
  output logic [N_PORTS-1:0] grant,
  output logic [N_PORTS-1:0] alloc,
  output port_t              alloc_ic    [N_PORTS],
  output logic [N_PORTS-1:0] release_cmd,
  output ans_e               ans_to_ic   [N_PORTS]
);

  always_comb begin
    grant       = '0;
    alloc       = '0;
    release_cmd = '0;
    for (int o = 0; o < N_PORTS; o++) alloc_ic[o] = '0;
    for (int o = 0; o < N_PORTS; o++) begin
      for (int i = N_PORTS - 1; i >= 0; i--) begin
        if (ic_req[i] && ic_port[i] == port_t'(o) && oc_free[o]) begin
          alloc_ic[o] = port_t'(i);
          alloc[o]    = 1'b1;
        end
        if (ic_release[i] && ic_port[i] == port_t'(o)) release_cmd[o] = 1'b1;
      end
      if (alloc[o]) grant[alloc_ic[o]] = 1'b1;
    end
    for (int i = 0; i < N_PORTS; i++) ans_to_ic[i] = ans_in[ic_port[i]];
  end

endmodule
