// tb_clos_switch: self-checking test of clos_switch.
// Two switches are tested, a first-stage one (any output) and a last-stage
// one (output = low address bits).  Downstream of each output sits a model
// that answers the Req it sees with a chosen code (Ack or Back), and None
// when Req is low.  Checked:
//   first stage: a lone probe takes output 0 and gets Ack; two probes that
//     start together get outputs 1 and 2 (priority to the lower input);
//     a probe whose only free output answers Back is answered Back; data
//     crosses the held circuits in the same cycle; releasing frees the link;
//     setup takes 3 cycles (probe taken, output granted, answer relayed)
//     once the downstream answers at once;
//   last stage: four probes to four different terminals all connect; a
//     fifth probe to a held terminal is answered Back.
module tb_clos_switch;
  import clos_pkg::*;
  logic               clk = 1'b0;
  logic               rst_n;
  logic [N_PORTS-1:0] a_in_req, a_out_req, b_in_req, b_out_req;
  logic [LINK_W-1:0]  a_in_data [N_PORTS], a_out_data [N_PORTS];
  logic [LINK_W-1:0]  b_in_data [N_PORTS], b_out_data [N_PORTS];
  ans_e               a_in_ans [N_PORTS], a_out_ans [N_PORTS], a_mode [N_PORTS];
  ans_e               b_in_ans [N_PORTS], b_out_ans [N_PORTS];
  int                 checks = 0, failures = 0;

  clos_switch #(.STAGE(0)) dut_a (
    .clk, .rst_n, .in_req(a_in_req), .in_data(a_in_data), .in_ans(a_in_ans),
    .out_req(a_out_req), .out_data(a_out_data), .out_ans(a_out_ans)
  );
  clos_switch #(.STAGE(2)) dut_b (
    .clk, .rst_n, .in_req(b_in_req), .in_data(b_in_data), .in_ans(b_in_ans),
    .out_req(b_out_req), .out_data(b_out_data), .out_ans(b_out_ans)
  );

  always_comb
    for (int o = 0; o < N_PORTS; o++) begin
      a_out_ans[o] = a_out_req[o] ? a_mode[o] : ANS_NONE;
      b_out_ans[o] = b_out_req[o] ? ANS_ACK : ANS_NONE;
    end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycles until the answer on input i of switch a (or b) is not None
  task automatic wait_ans(input bit sw_b, input int i, output int cycles);
    cycles = 0;
    while (((sw_b ? b_in_ans[i] : a_in_ans[i]) == ANS_NONE) && cycles < 50) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  int c, c1, c2;

  initial begin
    rst_n = 1'b0;
    a_in_req = '0; b_in_req = '0;
    for (int i = 0; i < N_PORTS; i++) begin
      a_in_data[i] = '0; b_in_data[i] = '0; a_mode[i] = ANS_ACK;
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- first stage ----
    a_in_data[0] = 8'h05;          // probe: output address 5
    a_in_req[0]  = 1'b1;
    wait_ans(0, 0, c);
    check(a_in_ans[0] == ANS_ACK, "lone probe gets Ack");
    check(c == 3, $sformatf("setup through one switch takes 3 cycles (got %0d)", c));
    check(a_out_req == 4'b0001, "lone probe holds output 0");
    a_in_data[0] = 8'hC3;
    #1 check(a_out_data[0] == 8'hC3, "data crosses at once");

    a_in_data[1] = 8'h0E; a_in_data[2] = 8'h0F;
    a_in_req[1] = 1'b1; a_in_req[2] = 1'b1;
    fork
      wait_ans(0, 1, c1);
      wait_ans(0, 2, c2);
    join
    check(a_in_ans[1] == ANS_ACK && a_in_ans[2] == ANS_ACK, "two probes both get Ack");
    check(a_out_req == 4'b0111, "outputs 0..2 held");
    a_in_data[1] = 8'h11; a_in_data[2] = 8'h22;
    #1 check(a_out_data[1] == 8'h11 && a_out_data[2] == 8'h22, "input 1 on output 1, input 2 on output 2");

    a_mode[3] = ANS_BACK;          // the path beyond output 3 is blocked
    a_in_data[3] = 8'h09;
    a_in_req[3] = 1'b1;
    wait_ans(0, 3, c);
    check(a_in_ans[3] == ANS_BACK, "blocked probe answered Back");
    check(a_out_req[3] == 1'b0, "blocked link released");
    a_in_req[3] = 1'b0;
    a_mode[3] = ANS_ACK;
    @(negedge clk);
    @(negedge clk);
    check(a_in_ans[3] == ANS_NONE, "answer withdrawn after Req drops");

    a_in_req[1] = 1'b0;            // release phase
    @(negedge clk);
    @(negedge clk);
    check(a_out_req == 4'b0101, "output 1 released");
    a_in_req[3] = 1'b1;            // output 1 is now the first free one
    wait_ans(0, 3, c);
    check(a_in_ans[3] == ANS_ACK && a_out_req == 4'b0111, "freed output reused");
    a_in_data[3] = 8'h33;
    #1 check(a_out_data[1] == 8'h33, "input 3 on output 1");
    a_in_req = '0;
    repeat (3) @(negedge clk);
    check(a_out_req == 4'b0000, "all released");

    // ---- last stage ----
    for (int i = 0; i < N_PORTS; i++) b_in_data[i] = 8'(4'(4'h8 + (3 - i)));   // terminals 3,2,1,0
    b_in_req = 4'b1111;
    repeat (6) @(negedge clk);
    for (int i = 0; i < N_PORTS; i++) check(b_in_ans[i] == ANS_ACK, "last stage: every probe Ack");
    for (int i = 0; i < N_PORTS; i++) b_in_data[i] = 8'(8'hA0 + i);
    #1;
    for (int i = 0; i < N_PORTS; i++)
      check(b_out_data[3 - i] == 8'(8'hA0 + i), "last stage: input i on terminal 3-i");
    b_in_req[2] = 1'b0;            // frees terminal 1
    b_in_req[1] = 1'b0;
    @(negedge clk);
    b_in_data[1] = 8'h80;          // terminal 0 is held by input 3
    @(negedge clk);
    @(negedge clk);
    b_in_req[1] = 1'b1;
    wait_ans(1, 1, c);
    check(b_in_ans[1] == ANS_BACK, "last stage: held terminal answered Back");
    b_in_req = '0;
    repeat (3) @(negedge clk);
    check(b_out_req == 4'b0000, "last stage: all released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
