// tb_clos_network: end-to-end self-checking test of the C(4,4,4) network.
// Sixteen source models set up circuits with the Req/Ans handshake: probe
// with the output address, back off and retry on Back, send a few words
// once Ack comes (holding while the destination answers nAck), then release.
// Sixteen destination models answer Ack, or nAck while they are not ready.
// Checked: every word a source drives in a cycle with Ack appears on its
// destination's data output in that cycle with the destination's Req high;
// each circuit is released completely; setup in an idle network takes 9
// cycles (3 per stage).  Traffic: a single connection, then 150 rounds that
// are full permutations (all 16 inputs), partial permutations, or rounds in
// which two inputs want the same output.  Counted and required: setups,
// Back to a source, re-routing inside a first-stage switch after a Back,
// nAck flow control, and full permutations completed.
module tb_clos_network;
  import clos_pkg::*;
  logic              clk = 1'b0;
  logic              rst_n;
  logic [N_TERM-1:0] src_req, dst_req;
  logic [LINK_W-1:0] src_data [N_TERM], dst_data [N_TERM];
  ans_e              src_ans [N_TERM], dst_ans [N_TERM];
  int                checks = 0, failures = 0;

  clos_network dut (.clk, .rst_n, .src_req, .src_data, .src_ans, .dst_req, .dst_data, .dst_ans);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- destinations ----------------
  logic [N_TERM-1:0] ready;
  int                nack_prob = 0;
  always_comb
    for (int d = 0; d < N_TERM; d++)
      dst_ans[d] = dst_req[d] ? (ready[d] ? ANS_ACK : ANS_NACK) : ANS_NONE;
  always @(negedge clk)
    for (int d = 0; d < N_TERM; d++)
      if (!rst_n) ready[d] <= 1'b1;
      else if (ready[d]) ready[d] <= !($urandom_range(99) < nack_prob);
      else ready[d] <= ($urandom_range(3) == 0);

  // ---------------- counters ----------------
  int n_setup = 0, n_back = 0, n_reroute = 0, n_nack = 0, n_words = 0, n_full_perm = 0;
  for (genvar s = 0; s < N_PORTS; s++) begin : g_cnt
    for (genvar p = 0; p < N_PORTS; p++) begin : g_p
      always @(posedge clk)
        if (rst_n && dut.g_sw[s].u_first.ic_release[p] &&
            dut.g_sw[s].u_first.ans_to_ic[p] == ANS_BACK) n_reroute++;
    end
  end

  // ---------------- sources ----------------
  int  dest   [N_TERM];
  bit  go     [N_TERM];
  bit  done   [N_TERM];
  int  lat    [N_TERM];

  for (genvar t = 0; t < N_TERM; t++) begin : g_src
    initial begin
      int k, n, w;
      src_req[t] = 1'b0; src_data[t] = '0; done[t] = 1'b0; go[t] = 1'b0;
      forever begin
        @(negedge clk);
        if (go[t]) begin
          go[t] = 1'b0;
          // setup phase, with retries
          forever begin
            src_data[t] = LINK_W'(dest[t]);
            src_req[t]  = 1'b1;
            lat[t] = 0;
            while (src_ans[t] == ANS_NONE) begin
              @(negedge clk);
              lat[t]++;
            end
            if (src_ans[t] != ANS_BACK) break;
            n_back++;
            src_req[t] = 1'b0;
            repeat ($urandom_range(1, 6)) @(negedge clk);
          end
          n_setup++;
          // transfer phase
          n = $urandom_range(1, 8);
          k = 0;
          while (k < n) begin
            if (src_ans[t] == ANS_ACK) begin
              w = $urandom_range(255);
              src_data[t] = LINK_W'(w);
              #1;
              check(dst_req[dest[t]] == 1'b1, "destination Req high during transfer");
              check(dst_data[dest[t]] == LINK_W'(w), $sformatf("word from %0d at %0d", t, dest[t]));
              n_words++;
              k++;
            end else begin
              check(src_ans[t] == ANS_NACK, "answer is Ack or nAck during transfer");
              n_nack++;
            end
            @(negedge clk);
          end
          // release phase
          src_req[t] = 1'b0;
          @(negedge clk);
          check(src_ans[t] == ANS_NONE, "answer withdrawn after release");
          done[t] = 1'b1;
        end
      end
    end
  end

  task automatic run_round(input bit [N_TERM-1:0] active);
    int waited = 0;
    bit all;
    for (int t = 0; t < N_TERM; t++) begin
      done[t] = !active[t];
      go[t]   = active[t];
    end
    do begin
      @(negedge clk);
      waited++;
      all = 1;
      for (int t = 0; t < N_TERM; t++) all &= done[t];
    end while (!all && waited < 5000);
    check(all, "round finished");
    repeat (4) @(negedge clk);
    check(dst_req == '0, "every circuit released after the round");
  endtask

  int perm [N_TERM];
  int tmp, j, kind;
  bit [N_TERM-1:0] act;

  initial begin
    rst_n = 1'b0;
    foreach (dest[t]) dest[t] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(dst_req == '0 && src_ans[0] == ANS_NONE, "idle after reset");

    // one connection in an idle network: setup latency
    dest[5] = 4'hB;
    run_round(16'h0020);
    check(lat[5] == 9, $sformatf("setup latency 9 cycles in an idle network (got %0d)", lat[5]));

    for (int r = 0; r < 150; r++) begin
      nack_prob = (r % 10 == 9) ? 20 : 0;
      foreach (perm[i]) perm[i] = i;
      for (int i = N_TERM - 1; i > 0; i--) begin
        j = $urandom_range(i);
        tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      end
      kind = r % 3;
      if (kind == 0) act = '1;                       // full permutation
      else act = N_TERM'($urandom);                  // partial permutation
      foreach (dest[t]) dest[t] = perm[t];
      if (kind == 2) begin                           // two inputs, one output
        act[0] = 1'b1; act[9] = 1'b1;
        dest[9] = dest[0];
      end
      run_round(act);
      if (kind == 0) n_full_perm++;
    end

    $display("setups=%0d back=%0d reroutes=%0d nack=%0d words=%0d full permutations=%0d",
             n_setup, n_back, n_reroute, n_nack, n_words, n_full_perm);
    check(n_back > 0, "Back reached a source at least once");
    check(n_reroute > 0, "first-stage re-routing after Back at least once");
    check(n_nack > 0, "nAck flow control at least once");
    check(n_full_perm == 50, "full permutations completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
