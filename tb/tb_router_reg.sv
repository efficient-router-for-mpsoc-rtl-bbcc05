// tb_router_reg: self-checking test of router_reg.
// The controller's state signals are driven by the testbench in the order
// the controller produces them, for 300 random packets (0..10 payload bytes,
// random FIFO-full stalls on payload and parity bytes, one packet in four
// with a wrong parity byte).  Checked: the byte offered to the FIFOs in every
// load state (header, payload, held byte, parity), low_pkt_valid after the
// parity byte, parity_done after it is written, and err after the check
// against a parity computed here.
module tb_router_reg;
  logic       clk = 1'b0;
  logic       resetn, pkt_valid, fifo_full, detect_add, lfd_state, ld_state;
  logic       laf_state, lp_state, rst_int_reg;
  logic [7:0] data_in, dout;
  logic       parity_done, low_pkt_valid, err;
  int         checks = 0, failures = 0;
  int         n_hold = 0, n_parity_hold = 0, n_err = 0;

  router_reg dut (
    .clk, .resetn, .pkt_valid, .data_in, .fifo_full, .detect_add, .lfd_state,
    .ld_state, .laf_state, .lp_state, .rst_int_reg, .parity_done,
    .low_pkt_valid, .err, .dout
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_states();
    detect_add = 0; lfd_state = 0; ld_state = 0; laf_state = 0; lp_state = 0;
    rst_int_reg = 0; fifo_full = 0; pkt_valid = 0;
  endtask

  task automatic clock();
    @(negedge clk);
    idle_states();
  endtask

  logic [7:0] hdr, b, par, sum;
  int         n;
  bit         bad, ff;

  initial begin
    resetn = 1'b0; data_in = '0;
    idle_states();
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(!err && !parity_done && !low_pkt_valid, "reset values");
    resetn = 1'b1;
    for (int pk = 0; pk < 300; pk++) begin
      n   = $urandom_range(10);
      bad = ($urandom_range(3) == 0);
      hdr = 8'($urandom);
      sum = hdr;
      // decode: header taken
      detect_add = 1; pkt_valid = 1; data_in = hdr;
      clock();
      check(!err, "err cleared by a new header");
      // first data: header written
      lfd_state = 1; data_in = 8'($urandom);
      #1 check(dout == hdr, "header offered in lfd_state");
      clock();
      for (int i = 0; i < n; i++) begin
        b = 8'($urandom);
        sum ^= b;
        ff = ($urandom_range(4) == 0);
        ld_state = 1; pkt_valid = 1; data_in = b; fifo_full = ff;
        #1 check(dout == b, "payload offered in ld_state");
        clock();
        if (ff) begin
          n_hold++;
          laf_state = 1; data_in = 8'($urandom);
          #1 check(dout == b, "held payload offered in laf_state");
          clock();
        end
      end
      par = bad ? ~sum : sum;
      ld_state = 1; pkt_valid = 0; data_in = par;
      clock();
      check(low_pkt_valid, "low_pkt_valid after parity byte");
      ff = ($urandom_range(2) == 0);
      lp_state = 1; fifo_full = ff; data_in = 8'($urandom);
      #1 check(dout == par, "parity offered in lp_state");
      clock();
      if (ff) begin
        n_parity_hold++;
        check(!parity_done, "parity not written while FIFO full");
        laf_state = 1; data_in = 8'($urandom);
        #1 check(dout == par, "parity offered in laf_state");
        clock();
      end
      check(parity_done, "parity_done after parity written");
      rst_int_reg = 1;
      clock();
      check(err == bad, "err after check");
      check(!low_pkt_valid && !parity_done, "flags cleared by rst_int_reg");
      if (err) n_err++;
      repeat ($urandom_range(2)) clock();
    end
    check(n_hold > 0 && n_parity_hold > 0 && n_err > 0, "hold, parity hold and error all seen");
    $display("held=%0d parity held=%0d errors=%0d", n_hold, n_parity_hold, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
