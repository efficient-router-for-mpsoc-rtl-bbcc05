// tb_clos_oc: self-checking test of clos_oc.
// Random allocate and release commands (allocate only when the link is
// free, as the arbiter does) and random downstream answers.  A model of the
// link checks req_out, sel and the free flag every cycle.
module tb_clos_oc;
  import clos_pkg::*;
  logic  clk = 1'b0;
  logic  rst_n, alloc, release_cmd, req_out, free;
  port_t alloc_ic, sel;
  ans_e  ans_in;
  int    checks = 0, failures = 0, n_alloc = 0, n_rel = 0, n_held_back = 0;

  clos_oc dut (.clk, .rst_n, .alloc, .alloc_ic, .release_cmd, .ans_in, .req_out, .sel, .free);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit    m_busy;
  port_t m_sel;

  initial begin
    rst_n = 1'b0; alloc = 0; release_cmd = 0; alloc_ic = '0; ans_in = ANS_NONE;
    m_busy = 0; m_sel = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      ans_in      = ans_e'($urandom);
      alloc_ic    = port_t'($urandom);
      release_cmd = 1'b0;
      alloc       = 1'b0;
      #1;
      check(req_out == m_busy, "req_out");
      if (m_busy) check(sel == m_sel, "sel");
      check(free == (!m_busy && ans_in == ANS_NONE), "free rule");
      if (!m_busy && ans_in != ANS_NONE) n_held_back++;
      if (free && $urandom_range(1)) alloc = 1'b1;
      else if (m_busy && $urandom_range(2) == 0) release_cmd = 1'b1;
      @(posedge clk);
      if (alloc) begin m_busy = 1; m_sel = alloc_ic; n_alloc++; end
      else if (release_cmd) begin m_busy = 0; n_rel++; end
      @(negedge clk);
    end
    check(n_alloc > 0 && n_rel > 0 && n_held_back > 0, "allocate, release, and answer holding a free link all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
