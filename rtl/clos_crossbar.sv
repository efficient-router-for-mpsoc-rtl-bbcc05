// clos_crossbar: data part of a 4x4 circuit switch.
//
// One multiplexer per output: while output o is held (busy[o]) it carries
// the input chosen by sel[o]; an idle output carries zero.  Purely
// combinational, so once a circuit is set up data crosses the switch in the
// same cycle.  The probe of the setup phase travels on the same wires.
// Multiplexers follow the switch description; driving zero on an idle
// output is this design's choice.
module clos_crossbar
  import clos_pkg::*;
(
  input  logic [LINK_W-1:0]  in_data  [N_PORTS],
  input  logic [N_PORTS-1:0] busy,
  input  port_t              sel      [N_PORTS],
  output logic [LINK_W-1:0]  out_data [N_PORTS]
);

  always_comb begin
    for (int o = 0; o < N_PORTS; o++)
      out_data[o] = busy[o] ? in_data[sel[o]] : '0;
  end

endmodule
