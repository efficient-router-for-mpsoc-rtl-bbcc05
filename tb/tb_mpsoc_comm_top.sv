// tb_mpsoc_comm_top: end-to-end self-checking test of mpsoc_comm_top with
// every parameter at its default.  The packet router and the Clos network
// run at the same time, each with its own traffic.
// Router: the packet of the router's simulation (header 248, 62 payload
// bytes of 248, channel 0), then 150 random packets to random channels with
// phases of slow readers and one packet in five with a wrong parity byte;
// every byte read from every channel is compared with the expected stream
// and err with the expected parity result.
// Network: a setup in the idle network (9 cycles), then 60 rounds of full
// permutations, partial permutations and two-inputs-one-output rounds, with
// destinations that answer nAck at times; every word must reach its
// destination in the cycle it is sent.
// Each mechanism is counted and must occur at least once: source suspended,
// FIFO full, wait till empty, parity held while full, parity error; Back to a
// source, re-routing in a first-stage switch, nAck flow control.
module tb_mpsoc_comm_top;
  import router_pkg::*;
  import clos_pkg::*;

  logic              clk = 1'b0;
  // router
  logic              resetn, packet_valid, err, suspend_data;
  logic [7:0]        data_in;
  logic [3:0]        re, valid_chanel;
  logic [7:0]        ch_out [4];
  // network
  logic              rst_n;
  logic [N_TERM-1:0] src_req, dst_req;
  logic [LINK_W-1:0] src_data [N_TERM], dst_data [N_TERM];
  ans_e              src_ans [N_TERM], dst_ans [N_TERM];
  logic [1:0]        src_ans_b [N_TERM], dst_ans_b [N_TERM];
  int                checks = 0, failures = 0;

  mpsoc_comm_top dut (
    .clk, .resetn, .packet_valid, .data_in, .re, .ch_out, .valid_chanel, .err,
    .suspend_data, .rst_n, .src_req, .src_data, .src_ans(src_ans_b), .dst_req,
    .dst_data, .dst_ans(dst_ans_b)
  );
  for (genvar t = 0; t < N_TERM; t++) begin : g_cast
    assign src_ans[t]   = ans_e'(src_ans_b[t]);
    assign dst_ans_b[t] = dst_ans[t];
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // ---------------- event counters ----------------
  int n_suspend = 0, n_full = 0, n_wait = 0, n_parity_full = 0, n_err = 0;
  int n_bytes_rx = 0;
  router_state_e st_prev;
  always @(posedge clk) if (resetn) begin
    st_prev <= dut.u_router.u_fsm.state;
    if (suspend_data && packet_valid) n_suspend++;
    if (dut.u_router.u_fsm.state == FIFO_FULL_STATE && st_prev != FIFO_FULL_STATE) n_full++;
    if (dut.u_router.u_fsm.state == WAIT_TILL_EMPTY && st_prev != WAIT_TILL_EMPTY) n_wait++;
    if (dut.u_router.u_fsm.state == FIFO_FULL_STATE && st_prev == LOAD_PARITY) n_parity_full++;
  end

  // ---------------- receivers ----------------
  logic [7:0] expq [4][$];
  int         rd_prob [4];
  bit         rd_pend [4];
  for (genvar c = 0; c < 4; c++) begin : g_rx
    initial begin
      rd_pend[c] = 0;
      re[c] = 1'b0;
      forever begin
        @(negedge clk);
        if (rd_pend[c]) begin
          if (expq[c].size() == 0) check(0, $sformatf("channel %0d: unexpected byte", c));
          else check(ch_out[c] == expq[c].pop_front(), $sformatf("channel %0d byte", c));
          n_bytes_rx++;
        end
        re[c] = ($urandom_range(99) < rd_prob[c]);
        rd_pend[c] = re[c] && valid_chanel[c];
      end
    end
  end

  // ---------------- source ----------------
  int cyc = 0;
  always @(posedge clk) cyc++;

  // Present one byte until it is taken (an edge with suspend_data low).
  task automatic send_byte(input logic [7:0] b, input bit pv);
    bit s;
    data_in = b; packet_valid = pv;
    forever begin
      s = suspend_data;
      @(posedge clk);
      @(negedge clk);
      if (!s) break;
    end
  endtask

  int hdr_cycle;
  task automatic send_packet(input int ch, input int n, input bit bad,
                             input bit fixed = 0, input logic [7:0] fixed_b = '0);
    logic [7:0] hdr, b, par;
    hdr = fixed ? fixed_b : {6'(n), 2'(ch)};
    par = hdr;
    // the header: remember when it is taken
    data_in = hdr; packet_valid = 1'b1;
    while (suspend_data) @(negedge clk);
    hdr_cycle = cyc;
    @(negedge clk);
    expq[ch].push_back(hdr);
    for (int i = 0; i < n; i++) begin
      b = fixed ? fixed_b : 8'($urandom);
      par ^= b;
      send_byte(b, 1'b1);
      expq[ch].push_back(b);
    end
    if (bad) par = ~par;
    send_byte(par, 1'b0);
    expq[ch].push_back(par);
  endtask

  // Wait until the packet has been checked (controller back in decode).
  task automatic finish_packet(input bit bad);
    packet_valid = 1'b0;
    while (suspend_data) @(negedge clk);
    check(err == bad, "err flag after packet");
    if (err) n_err++;
  endtask

  task automatic drain();
    int t = 0;
    while ((expq[0].size() + expq[1].size() + expq[2].size() + expq[3].size()) != 0 && t < 5000) begin
      @(negedge clk);
      t++;
    end
    check(t < 5000, "all channels drained");
  endtask

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
        if (rst_n && dut.u_clos.g_sw[s].u_first.ic_release[p] &&
            dut.u_clos.g_sw[s].u_first.ans_to_ic[p] == ANS_BACK) n_reroute++;
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

  int h1, n, ch, last_ch;
  bit bad;
  int perm [N_TERM];
  int tmp, j, kind;
  bit [N_TERM-1:0] act;
  bit router_done = 0, net_done = 0;

  initial begin
    resetn = 1'b0; packet_valid = 1'b0; data_in = '0;
    rst_n = 1'b0;
    foreach (dest[t]) dest[t] = 0;
    foreach (rd_prob[i]) rd_prob[i] = 100;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(valid_chanel == 4'b0000 && !err && !suspend_data, "router reset state");
    check(dst_req == '0 && src_ans[0] == ANS_NONE, "network idle after reset");
    resetn = 1'b1;
    rst_n  = 1'b1;
    @(negedge clk);
    fork
      begin : router_traffic
        send_packet(0, 62, 0, 1, 8'd248);
        finish_packet(0);
        drain();
        rd_prob[3] = 0;
        fork
          begin
            send_packet(3, 15, 0);
            packet_valid = 1'b0;
          end
          begin
            repeat (40) @(negedge clk);
            rd_prob[3] = 100;
          end
        join
        finish_packet(0);
        last_ch = 0;
        for (int pk = 0; pk < 150; pk++) begin
          if (pk % 30 == 0)
            foreach (rd_prob[i]) rd_prob[i] = ((pk / 30) % 2) ? 100 : $urandom_range(10, 60);
          ch  = ($urandom_range(3) == 0) ? last_ch : $urandom_range(3);
          n   = $urandom_range(0, 30);
          bad = ($urandom_range(4) == 0);
          send_packet(ch, n, bad);
          finish_packet(bad);
          last_ch = ch;
        end
        foreach (rd_prob[i]) rd_prob[i] = 100;
        drain();
        router_done = 1;
      end
      begin : network_traffic
        dest[5] = 4'hB;
        run_round(16'h0020);
        check(lat[5] == 9, $sformatf("setup latency 9 cycles in an idle network (got %0d)", lat[5]));
        for (int r = 0; r < 60; r++) begin
          nack_prob = (r % 10 == 9) ? 20 : 0;
          foreach (perm[i]) perm[i] = i;
          for (int i = N_TERM - 1; i > 0; i--) begin
            j = $urandom_range(i);
            tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
          end
          kind = r % 3;
          if (kind == 0) act = '1;
          else act = N_TERM'($urandom);
          foreach (dest[t]) dest[t] = perm[t];
          if (kind == 2) begin
            act[0] = 1'b1; act[9] = 1'b1;
            dest[9] = dest[0];
          end
          run_round(act);
          if (kind == 0) n_full_perm++;
        end
        net_done = 1;
      end
    join
    check(router_done && net_done, "both traffic generators finished");
    $display("router: suspended cycles=%0d fifo full=%0d wait till empty=%0d parity held=%0d parity errors=%0d bytes=%0d",
             n_suspend, n_full, n_wait, n_parity_full, n_err, n_bytes_rx);
    $display("network: setups=%0d back=%0d reroutes=%0d nack=%0d words=%0d full permutations=%0d",
             n_setup, n_back, n_reroute, n_nack, n_words, n_full_perm);
    check(n_suspend > 0, "source suspended at least once");
    check(n_full > 0, "FIFO full at least once");
    check(n_wait > 0, "wait till empty at least once");
    check(n_parity_full > 0, "parity byte held while full at least once");
    check(n_err > 0, "parity error at least once");
    check(n_back > 0, "Back reached a source at least once");
    check(n_reroute > 0, "first-stage re-routing after Back at least once");
    check(n_nack > 0, "nAck flow control at least once");
    check(n_full_perm == 20, "full permutations completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
