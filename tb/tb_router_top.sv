// tb_router_top: end-to-end self-checking test of the packet router.
// A source sends packets (header with channel address and length, payload,
// parity byte) and obeys suspend_data; four receivers read their channel
// with random read enables and compare every byte with the stream expected
// for that channel.  After each packet err is compared with whether the
// parity byte was made wrong on purpose.
// Directed parts first:
//   * the packet seen on the router's simulation (header 248 = 0xF8:
//     channel 0, length 62, every byte 248) with a reader that reads all the
//     time;
//   * throughput: two packets back to back into empty FIFOs, the second
//     header is taken N + 5 cycles after the first;
//   * a packet of 15 payload bytes into a channel nobody reads, so the
//     parity byte finds the FIFO full.
// Then 400 random packets with phases of slow readers.  Each mechanism
// (source suspended, FIFO full, wait till empty, parity held while full,
// parity error) is counted and must occur.
module tb_router_top;
  import router_pkg::*;

  logic              clk = 1'b0;
  logic              resetn, packet_valid, err, suspend_data;
  logic [7:0]        data_in;
  logic [3:0]        re, valid_chanel;
  logic [7:0]        ch_out [4];
  int                checks = 0, failures = 0;

  router_top dut (
    .clk, .resetn, .packet_valid, .data_in, .re, .ch_out, .valid_chanel,
    .err, .suspend_data
  );

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
    st_prev <= dut.u_fsm.state;
    if (suspend_data && packet_valid) n_suspend++;
    if (dut.u_fsm.state == FIFO_FULL_STATE && st_prev != FIFO_FULL_STATE) n_full++;
    if (dut.u_fsm.state == WAIT_TILL_EMPTY && st_prev != WAIT_TILL_EMPTY) n_wait++;
    if (dut.u_fsm.state == FIFO_FULL_STATE && st_prev == LOAD_PARITY) n_parity_full++;
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

  int h1, h2, n, ch, last_ch;
  bit bad;

  initial begin
    resetn = 1'b0; packet_valid = 1'b0; data_in = '0;
    foreach (rd_prob[i]) rd_prob[i] = 100;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(valid_chanel == 4'b0000 && !err && !suspend_data, "reset state");
    check(ch_out[0] == 0 && ch_out[1] == 0 && ch_out[2] == 0 && ch_out[3] == 0, "outputs zero after reset");
    resetn = 1'b1;
    @(negedge clk);

    // the packet of the router's simulation: 248 on the input throughout
    send_packet(0, 62, 0, 1, 8'd248);
    finish_packet(0);
    drain();

    // throughput: back to back, empty FIFOs, nobody reading
    foreach (rd_prob[i]) rd_prob[i] = 0;
    send_packet(1, 5, 0);
    h1 = hdr_cycle;
    send_packet(2, 3, 0);
    h2 = hdr_cycle;
    check(h2 - h1 == 5 + 5, $sformatf("second header taken N+5 cycles later (got %0d)", h2 - h1));
    finish_packet(0);
    check(valid_chanel == 4'b0110, "valid on the two written channels only");
    foreach (rd_prob[i]) rd_prob[i] = 100;
    drain();

    // parity byte meets a full FIFO: 1 + 15 bytes fill 16 words
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
    drain();

    // random traffic
    last_ch = 0;
    for (int pk = 0; pk < 400; pk++) begin
      if (pk % 50 == 0)
        foreach (rd_prob[i]) rd_prob[i] = ((pk / 50) % 2) ? 100 : $urandom_range(10, 60);
      ch  = ($urandom_range(3) == 0) ? last_ch : $urandom_range(3);
      n   = $urandom_range(0, 30);
      bad = ($urandom_range(4) == 0);
      send_packet(ch, n, bad);
      finish_packet(bad);
      last_ch = ch;
      repeat ($urandom_range(2)) @(negedge clk);
    end
    foreach (rd_prob[i]) rd_prob[i] = 100;
    drain();
    repeat (3) @(negedge clk);
    check(valid_chanel == 4'b0000, "all channels empty at the end");

    $display("suspended cycles=%0d fifo full=%0d wait till empty=%0d parity held=%0d parity errors=%0d bytes=%0d",
             n_suspend, n_full, n_wait, n_parity_full, n_err, n_bytes_rx);
    check(n_suspend > 0, "source suspended at least once");
    check(n_full > 0, "FIFO full at least once");
    check(n_wait > 0, "wait till empty at least once");
    check(n_parity_full > 0, "parity byte held while full at least once");
    check(n_err > 0, "parity error at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
