// tb_router_fsm: self-checking test of router_fsm.
// The controller is driven directly through scripted packet scenarios, and
// its state outputs, write strobe, suspend_data and rst_int_reg are compared
// every cycle with the values expected for the state it should be in:
//   1. header into an empty FIFO, payload, FIFO full in the middle of the
//      payload, load after full, parity, parity check;
//   2. header for a FIFO that is not empty (wait till empty);
//   3. FIFO full when the parity byte comes (parity loaded after full);
//   4. parity check waiting for parity_done.
module tb_router_fsm;
  logic clk = 1'b0;
  logic resetn, pkt_valid, fifo_full, fifo_empty, parity_done, low_pkt_valid;
  logic suspend_data, write_enb_reg, detect_add, ld_state, lp_state, laf_state;
  logic lfd_state, full_state, rst_int_reg;
  int   checks = 0, failures = 0;

  router_fsm dut (
    .clk, .resetn, .pkt_valid, .fifo_full, .fifo_empty, .parity_done,
    .low_pkt_valid, .suspend_data, .write_enb_reg, .detect_add, .ld_state,
    .lp_state, .laf_state, .lfd_state, .full_state, .rst_int_reg
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected state, by name: D decode, W wait till empty, F first data,
  // L load data, P parity, U full, A after full, C check parity.
  task automatic expect_state(input byte st, input bit we, input string what);
    bit ok;
    ok = (detect_add == (st == "D")) && (lfd_state == (st == "F")) &&
         (ld_state == (st == "L")) && (lp_state == (st == "P")) &&
         (full_state == (st == "U")) && (laf_state == (st == "A")) &&
         (rst_int_reg == (st == "C")) &&
         (suspend_data == !(st == "D" || st == "L")) &&
         (write_enb_reg == we);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: expected state %c we=%0b, got dec=%0b lfd=%0b ld=%0b lp=%0b full=%0b laf=%0b chk=%0b susp=%0b we=%0b",
               what, st, we, detect_add, lfd_state, ld_state, lp_state, full_state,
               laf_state, rst_int_reg, suspend_data, write_enb_reg);
    end
  endtask

  // Set inputs, check the state outputs for this cycle, then clock.
  task automatic step(input bit pv, input bit ff, input bit fe, input bit pd,
                      input bit lpv, input byte st, input bit we, input string what);
    pkt_valid = pv; fifo_full = ff; fifo_empty = fe; parity_done = pd; low_pkt_valid = lpv;
    #1;
    expect_state(st, we, what);
    @(negedge clk);
  endtask

  initial begin
    resetn = 1'b0;
    pkt_valid = 0; fifo_full = 0; fifo_empty = 1; parity_done = 0; low_pkt_valid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    resetn = 1'b1;
    // 1: normal packet with a full FIFO in the middle
    step(0, 0, 1, 0, 0, "D", 0, "idle in decode");
    step(1, 0, 1, 0, 0, "D", 0, "header taken");
    step(1, 0, 0, 0, 0, "F", 1, "header written");
    step(1, 0, 0, 0, 0, "L", 1, "payload 1 written");
    step(1, 1, 0, 0, 0, "L", 0, "payload 2 held, FIFO full");
    step(1, 1, 0, 0, 0, "U", 0, "full state");
    step(1, 1, 0, 0, 0, "U", 0, "full state holds");
    step(1, 0, 0, 0, 0, "U", 0, "FIFO has room again");
    step(1, 0, 0, 0, 0, "A", 1, "held byte written");
    step(1, 0, 0, 0, 0, "L", 1, "payload 3 written");
    step(0, 0, 0, 0, 0, "L", 0, "parity byte taken");
    step(0, 0, 0, 0, 1, "P", 1, "parity written");
    step(0, 0, 0, 1, 0, "C", 0, "check parity");
    step(0, 0, 1, 0, 0, "D", 0, "back to decode");
    // 2: destination FIFO not empty
    step(1, 0, 0, 0, 0, "D", 0, "header for a busy FIFO");
    step(1, 0, 0, 0, 0, "W", 0, "wait till empty");
    step(1, 0, 0, 0, 0, "W", 0, "still waiting");
    step(1, 0, 1, 0, 0, "W", 0, "FIFO empty");
    step(1, 0, 0, 0, 0, "F", 1, "header written");
    step(0, 0, 0, 0, 0, "L", 0, "empty payload, parity byte");
    // 3: FIFO full when the parity byte must be written
    step(0, 1, 0, 0, 1, "P", 0, "parity blocked by full FIFO");
    step(0, 1, 0, 0, 1, "U", 0, "full state");
    step(0, 0, 0, 0, 1, "U", 0, "room again");
    step(0, 0, 0, 0, 1, "A", 1, "parity written after full");
    // 4: check waits for parity_done
    step(0, 0, 1, 0, 0, "C", 0, "check, parity not done");
    step(0, 0, 1, 1, 0, "C", 0, "check, parity done");
    step(0, 0, 1, 0, 0, "D", 0, "decode");
    // reset from the middle of a packet
    step(1, 0, 1, 0, 0, "D", 0, "header");
    step(1, 0, 1, 0, 0, "F", 1, "first data");
    resetn = 1'b0;
    @(negedge clk);
    resetn = 1'b1;
    step(0, 0, 1, 0, 0, "D", 0, "decode after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
