// tb_clos_arbiter: self-checking test of clos_arbiter.
// Random requests, wanted ports, releases, free flags and answers.  A
// reference written here (for each output, the lowest-numbered requesting
// input control wins if the output is free) gives the expected grants,
// allocate commands and owners; releases must reach the named output and
// each input control must see the answer of the output it names.
module tb_clos_arbiter;
  import clos_pkg::*;
  logic [N_PORTS-1:0] ic_req, ic_release, oc_free, grant, alloc, release_cmd;
  port_t              ic_port [N_PORTS], alloc_ic [N_PORTS];
  ans_e               ans_in [N_PORTS], ans_to_ic [N_PORTS];
  int                 checks = 0, failures = 0, n_conflict = 0;

  clos_arbiter dut (.ic_req, .ic_port, .ic_release, .oc_free, .ans_in,
                    .grant, .alloc, .alloc_ic, .release_cmd, .ans_to_ic);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N_PORTS-1:0] e_grant, e_alloc, e_rel;
  int                 winner, nreq;

  initial begin
    for (int k = 0; k < 3000; k++) begin
      ic_req = N_PORTS'($urandom); ic_release = N_PORTS'($urandom); oc_free = N_PORTS'($urandom);
      for (int i = 0; i < N_PORTS; i++) begin
        ic_port[i] = port_t'($urandom);
        ans_in[i]  = ans_e'($urandom);
      end
      #1;
      e_grant = '0; e_alloc = '0; e_rel = '0;
      for (int o = 0; o < N_PORTS; o++) begin
        winner = -1; nreq = 0;
        for (int i = 0; i < N_PORTS; i++)
          if (ic_req[i] && ic_port[i] == o) begin
            nreq++;
            if (winner < 0) winner = i;
          end
        if (nreq > 1 && oc_free[o]) n_conflict++;
        if (winner >= 0 && oc_free[o]) begin
          e_alloc[o] = 1;
          e_grant[winner] = 1;
          check(alloc_ic[o] == port_t'(winner), "owner of allocated output");
        end
        for (int i = 0; i < N_PORTS; i++)
          if (ic_release[i] && ic_port[i] == o) e_rel[o] = 1;
      end
      check(grant == e_grant, "grants");
      check(alloc == e_alloc, "allocate commands");
      check(release_cmd == e_rel, "release commands");
      for (int i = 0; i < N_PORTS; i++) check(ans_to_ic[i] == ans_in[ic_port[i]], "answer cross-connect");
      #1;
    end
    check(n_conflict > 0, "contention seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
