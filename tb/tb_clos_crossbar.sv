// tb_clos_crossbar: self-checking test of clos_crossbar.
// Random input words, select values and busy flags; every output is
// compared with the selected input when busy and with zero when idle.
module tb_clos_crossbar;
  import clos_pkg::*;
  logic [LINK_W-1:0]  in_data [N_PORTS], out_data [N_PORTS];
  logic [N_PORTS-1:0] busy;
  port_t              sel [N_PORTS];
  int                 checks = 0, failures = 0;

  clos_crossbar dut (.in_data, .busy, .sel, .out_data);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < N_PORTS; i++) begin
        in_data[i] = LINK_W'($urandom);
        sel[i]     = port_t'($urandom);
      end
      busy = N_PORTS'($urandom);
      #1;
      for (int o = 0; o < N_PORTS; o++) begin
        checks++;
        if (out_data[o] !== (busy[o] ? in_data[sel[o]] : '0)) begin
          failures++;
          $display("FAIL output %0d", o);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
