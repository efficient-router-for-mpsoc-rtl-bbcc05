// tb_clos_ic: self-checking test of clos_ic at all three stages.
// The testbench plays the arbiter (a grant when the wanted output is marked
// free) and the downstream switch (the answer of the held output).  Scripted
// cases, with the request, the wanted port, release and the upstream answer
// checked every cycle:
//   stage 0: output 0 busy, output 1 answers Back, output 2 answers Ack:
//            the probe skips 0, backs off 1, connects on 2; nAck and Ack
//            are relayed upstream; dropping Req releases output 2;
//   stage 0: every output refused: the answer upstream is Back;
//   stage 0: Req dropped while waiting for an answer releases the output;
//   stage 1: only output dest[3:2] is tried; refused: Back;
//   stage 2: only output dest[1:0] is tried; granted, Ack relayed.
module tb_clos_ic;
  import clos_pkg::*;
  logic               clk = 1'b0;
  logic               rst_n;
  logic [2:0]         req_in, req, grant, release_o;
  logic [DEST_W-1:0]  probe [3];
  ans_e               ans_out [3], ans_dn [3];
  port_t              port [3];
  logic [N_PORTS-1:0] free [3];
  int                 checks = 0, failures = 0;

  for (genvar s = 0; s < 3; s++) begin : g_dut
    clos_ic #(.STAGE(s)) dut (
      .clk, .rst_n, .req_in(req_in[s]), .probe(probe[s]), .ans_out(ans_out[s]),
      .req(req[s]), .port(port[s]), .grant(grant[s]), .release_o(release_o[s]),
      .ans_dn(ans_dn[s])
    );
    assign grant[s] = req[s] && free[s][port[s]];
  end

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive one stage's inputs, check its outputs in this cycle, then clock.
  // e_port < 0 means the port is not checked.
  task automatic step(input int s, input bit rq, input logic [3:0] fr, input ans_e dn,
                      input bit e_req, input int e_port, input bit e_rel, input ans_e e_ans,
                      input string what);
    bit ok;
    req_in[s] = rq; free[s] = fr; ans_dn[s] = dn;
    #1;
    ok = (req[s] == e_req) && (release_o[s] == e_rel) && (ans_out[s] == e_ans)
      && (e_port < 0 || port[s] == port_t'(e_port));
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL stage %0d %s: req=%0b port=%0d rel=%0b ans=%0d", s, what,
               req[s], port[s], release_o[s], ans_out[s]);
    end
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0;
    req_in = '0;
    for (int s = 0; s < 3; s++) begin probe[s] = '0; free[s] = '0; ans_dn[s] = ANS_NONE; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // ---- stage 0: skip a busy link, back off a blocked path, connect ----
    probe[0] = 4'b1010;
    step(0, 1, 4'b0110, ANS_NONE, 0, -1, 0, ANS_NONE, "idle takes the probe");
    step(0, 1, 4'b0110, ANS_NONE, 1, 0, 0, ANS_NONE, "asks for output 0 (busy)");
    step(0, 1, 4'b0110, ANS_NONE, 1, 1, 0, ANS_NONE, "asks for output 1, granted");
    step(0, 1, 4'b0110, ANS_NONE, 0, 1, 0, ANS_NONE, "holds output 1, waits");
    step(0, 1, 4'b0110, ANS_BACK, 0, 1, 1, ANS_NONE, "Back from output 1: release");
    step(0, 1, 4'b0110, ANS_NONE, 1, 2, 0, ANS_NONE, "asks for output 2, granted");
    step(0, 1, 4'b0000, ANS_NONE, 0, 2, 0, ANS_NONE, "waits on output 2");
    step(0, 1, 4'b0000, ANS_ACK,  0, 2, 0, ANS_NONE, "Ack arrives");
    step(0, 1, 4'b0000, ANS_ACK,  0, 2, 0, ANS_ACK,  "connected, Ack relayed");
    step(0, 1, 4'b0000, ANS_NACK, 0, 2, 0, ANS_NACK, "nAck relayed");
    step(0, 1, 4'b0000, ANS_ACK,  0, 2, 0, ANS_ACK,  "Ack again");
    step(0, 0, 4'b0000, ANS_ACK,  0, 2, 1, ANS_ACK,  "Req dropped: release");
    step(0, 0, 4'b1111, ANS_NONE, 0, -1, 0, ANS_NONE, "idle");

    // ---- stage 0: every output refused ----
    probe[0] = 4'b0001;
    step(0, 1, 4'b0000, ANS_NONE, 0, -1, 0, ANS_NONE, "idle takes the probe");
    for (int p = 0; p < 4; p++)
      step(0, 1, 4'b0000, ANS_NONE, 1, p, 0, ANS_NONE, "asks, refused");
    step(0, 1, 4'b0000, ANS_NONE, 0, -1, 0, ANS_NONE, "no output left");
    step(0, 1, 4'b0000, ANS_NONE, 0, -1, 0, ANS_BACK, "Back upstream");
    step(0, 1, 4'b0000, ANS_NONE, 0, -1, 0, ANS_BACK, "Back held while Req");
    step(0, 0, 4'b0000, ANS_NONE, 0, -1, 0, ANS_BACK, "Req dropped");
    step(0, 0, 4'b0000, ANS_NONE, 0, -1, 0, ANS_NONE, "idle");

    // ---- stage 0: Req dropped while waiting ----
    step(0, 1, 4'b1000, ANS_NONE, 0, -1, 0, ANS_NONE, "idle takes the probe");
    step(0, 1, 4'b1000, ANS_NONE, 1, 0, 0, ANS_NONE, "output 0 refused");
    step(0, 1, 4'b1000, ANS_NONE, 1, 1, 0, ANS_NONE, "output 1 refused");
    step(0, 1, 4'b1000, ANS_NONE, 1, 2, 0, ANS_NONE, "output 2 refused");
    step(0, 1, 4'b1000, ANS_NONE, 1, 3, 0, ANS_NONE, "output 3 granted");
    step(0, 0, 4'b0000, ANS_NONE, 0, 3, 1, ANS_NONE, "abort releases output 3");
    step(0, 0, 4'b0000, ANS_NONE, 0, -1, 0, ANS_NONE, "idle");

    // ---- stage 1: only dest[3:2] ----
    probe[1] = 4'b1001;
    step(1, 1, 4'b1011, ANS_NONE, 0, -1, 0, ANS_NONE, "idle takes the probe");
    step(1, 1, 4'b1011, ANS_NONE, 1, 2, 0, ANS_NONE, "asks for output 2 only");
    step(1, 1, 4'b1011, ANS_NONE, 0, -1, 0, ANS_NONE, "no output left");
    step(1, 1, 4'b1011, ANS_NONE, 0, -1, 0, ANS_BACK, "Back upstream");
    step(1, 0, 4'b1011, ANS_NONE, 0, -1, 0, ANS_BACK, "Req dropped");
    step(1, 0, 4'b1011, ANS_NONE, 0, -1, 0, ANS_NONE, "idle");

    // ---- stage 2: only dest[1:0] ----
    probe[2] = 4'b0111;
    step(2, 1, 4'b1000, ANS_NONE, 0, -1, 0, ANS_NONE, "idle takes the probe");
    step(2, 1, 4'b1000, ANS_NONE, 1, 3, 0, ANS_NONE, "asks for output 3, granted");
    step(2, 1, 4'b0000, ANS_ACK,  0, 3, 0, ANS_NONE, "Ack from the terminal");
    step(2, 1, 4'b0000, ANS_ACK,  0, 3, 0, ANS_ACK,  "Ack relayed");
    step(2, 0, 4'b0000, ANS_ACK,  0, 3, 1, ANS_ACK,  "release");
    step(2, 0, 4'b0000, ANS_NONE, 0, -1, 0, ANS_NONE, "idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
