// tb_router_fifo: self-checking test of router_fifo.
// Random write and read enables are applied for several thousand cycles
// against a queue model.  Checked every cycle: full and empty against the
// model's occupancy, data_out after each read against the word the model
// pops, and that writes to a full FIFO and reads from an empty one change
// nothing.  Reset values (full 0, empty 1, data_out 0) are checked at the
// start and after a reset in the middle of traffic.
module tb_router_fifo;
  localparam int unsigned W = 8;
  localparam int unsigned D = 16;

  logic         clk = 1'b0;
  logic         resetn, we, re;
  logic [W-1:0] din, dout;
  logic         full, empty;
  int           checks = 0, failures = 0;
  int           n_full = 0, n_empty_rd = 0, n_full_wr = 0;

  router_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .clk, .resetn, .write_enb(we), .read_enb(re), .data_in(din),
    .full, .empty, .data_out(dout)
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

  logic [W-1:0] q[$];
  logic [W-1:0] exp_out;
  bit           rd_done;
  int           wprob, rprob;

  initial begin
    resetn = 1'b0; we = 1'b0; re = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(full == 1'b0 && empty == 1'b1 && dout == '0, "reset values");
    resetn = 1'b1;
    exp_out = '0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // phases: fill-biased, drain-biased, balanced
      case ((cyc / 500) % 3)
        0: begin wprob = 80; rprob = 20; end
        1: begin wprob = 20; rprob = 80; end
        default: begin wprob = 50; rprob = 50; end
      endcase
      check(full == (q.size() == D), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      check(dout == exp_out, "data_out");
      we  = ($urandom_range(99) < wprob);
      re  = ($urandom_range(99) < rprob);
      din = W'($urandom);
      // model, using the flags before the edge
      rd_done = re && q.size() != 0;
      if (re && q.size() == 0) n_empty_rd++;
      if (we && q.size() == D) n_full_wr++;
      if (rd_done) exp_out = q.pop_front();
      if (we && (q.size() + (rd_done ? 1 : 0)) < D) q.push_back(din);
      if (full) n_full++;
      @(negedge clk);
    end
    // reset in the middle of traffic
    we = 1'b0; re = 1'b0;
    resetn = 1'b0;
    @(negedge clk);
    check(full == 1'b0 && empty == 1'b1 && dout == '0, "reset mid-traffic");
    check(n_full > 0 && n_empty_rd > 0 && n_full_wr > 0, "full, read-when-empty and write-when-full all seen");
    $display("full cycles=%0d reads when empty=%0d writes when full=%0d", n_full, n_empty_rd, n_full_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
