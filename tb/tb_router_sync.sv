// tb_router_sync: self-checking test of router_sync.
// Random full/empty vectors, addresses, detect_add and write_enb_reg are
// applied.  A model keeps the address registered while detect_add was high.
// Checked each cycle: the one-hot write enable, the full and empty flags
// steered back to the controller (empty taken from the live address during
// detect_add), and vld_out = not empty for every channel.
module tb_router_sync;
  localparam int unsigned N = 4;

  logic         clk = 1'b0;
  logic         resetn, detect_add, write_enb_reg;
  logic [1:0]   data;
  logic [N-1:0] full, empty, write_enb, vld_out;
  logic         fifo_full, fifo_empty;
  int           checks = 0, failures = 0;

  router_sync #(.N_CH(N)) dut (
    .clk, .resetn, .data, .detect_add, .full, .empty, .write_enb_reg,
    .fifo_full, .fifo_empty, .write_enb, .vld_out
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
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0]   addr_m;
  logic [N-1:0] exp_we;
  int           seen [N];

  initial begin
    resetn = 1'b0; detect_add = 1'b0; write_enb_reg = 1'b0; data = '0;
    full = '0; empty = '1;
    addr_m = '0;
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    resetn = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      detect_add    = ($urandom_range(3) == 0);
      write_enb_reg = ($urandom_range(1) == 0);
      data          = 2'($urandom);
      full          = N'($urandom);
      empty         = N'($urandom);
      #1;
      exp_we = write_enb_reg ? (N'(1) << addr_m) : '0;
      check(write_enb == exp_we, "write enable steering");
      check(fifo_full == full[addr_m], "fifo_full mux");
      check(fifo_empty == (detect_add ? empty[data] : empty[addr_m]), "fifo_empty mux");
      check(vld_out == ~empty, "vld_out");
      if (write_enb_reg) seen[addr_m]++;
      @(posedge clk);
      if (detect_add) addr_m = data;
      @(negedge clk);
    end
    foreach (seen[i]) check(seen[i] > 0, "every channel written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
