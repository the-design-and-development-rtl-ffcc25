// tb_flow_control: checks the start/stop state sequence 0-1-2-3-4-0, that
// claim_mem rises before tx_enable and falls with it, that the register
// values are copied at start and held while running, and that the run bit is
// seen through the two-flop synchroniser. Twenty start/stop cycles with random
// register values and run lengths follow.
module tb_flow_control;
  import radar_pkg::*;
  logic clk = 0, rst = 1, run_async = 0;
  logic [31:0] pri_reg = 0, delay_reg = 0, pri, delay;
  logic [15:0] len_reg = 0, wave_len;
  logic claim_mem, tx_enable;
  fc_state_t state;
  int checks = 0, failures = 0;

  flow_control dut (.clk, .rst, .run_async, .pri_reg, .delay_reg, .len_reg,
                    .claim_mem, .tx_enable, .pri, .delay, .wave_len, .state);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  fc_state_t seen[$];
  always @(posedge clk) #1 if (seen.size() == 0 || seen[$] != state) seen.push_back(state);

  initial begin
    int n;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (10) @(posedge clk);
    #1;
    check(state == FC_WAIT_START && !claim_mem && !tx_enable, "idle after reset");
    pri_reg = 32'd12345; delay_reg = 32'd678; len_reg = 16'd930;
    @(negedge clk) run_async = 1;
    // run is synchronised (2 flops), then states 0, 1 and 2 take one clock each
    n = 0;
    while (!tx_enable && n < 20) begin @(posedge clk); #1; n++;
    end
    check(n == 5, $sformatf("tx_enable %0d clocks after run, want 5", n));
    check(claim_mem, "memory not claimed while enabled");
    check(pri == 32'd12345 && delay == 32'd678 && wave_len == 16'd930, "registers not buffered");
    // registers changed while running are not taken
    pri_reg = 32'd1; delay_reg = 32'd2; len_reg = 16'd3;
    repeat (20) @(posedge clk);
    #1;
    check(pri == 32'd12345 && delay == 32'd678 && wave_len == 16'd930, "running values changed");
    check(state == FC_WAIT_STOP, "not waiting for stop");
    @(negedge clk) run_async = 0;
    n = 0;
    while (tx_enable && n < 20) begin @(posedge clk); #1; n++; end
    check(n == 4, $sformatf("tx_enable fell %0d clocks after stop, want 4", n));
    check(!claim_mem, "memory not freed at stop");
    @(posedge clk); #1;
    check(state == FC_WAIT_START, "not back in state 0");
    check(seen.size() == 6 && seen[0] == FC_WAIT_START && seen[1] == FC_CLAIM &&
          seen[2] == FC_ENABLE && seen[3] == FC_WAIT_STOP && seen[4] == FC_RELEASE &&
          seen[5] == FC_WAIT_START, "state sequence");
    // restart takes the new values
    @(negedge clk) run_async = 1;
    repeat (6) @(posedge clk);
    #1;
    check(tx_enable && pri == 32'd1 && delay == 32'd2 && wave_len == 16'd3, "restart values");
    @(negedge clk) run_async = 0;
    repeat (8) @(posedge clk);
    // random start/stop cycles: claim_mem leads tx_enable by one clock at
    // start, both fall together at stop, and each start takes fresh values
    for (int r = 0; r < 20; r++) begin
      logic [31:0] p, d;
      logic [15:0] l;
      bit claim_first;
      p = $urandom; d = $urandom; l = 16'($urandom);
      pri_reg = p; delay_reg = d; len_reg = l;
      @(negedge clk) run_async = 1;
      claim_first = 0;
      n = 0;
      while (!tx_enable && n < 20) begin
        @(posedge clk); #1; n++;
        if (claim_mem && !tx_enable) claim_first = 1;
      end
      check(claim_first && n == 5, $sformatf("cycle %0d: start order/latency %0d", r, n));
      check(pri == p && delay == d && wave_len == l, $sformatf("cycle %0d: buffered values", r));
      repeat ($urandom_range(1, 30)) @(posedge clk);
      @(negedge clk) run_async = 0;
      n = 0;
      while (tx_enable && n < 20) begin @(posedge clk); #1; n++; end
      check(n == 4 && !claim_mem, $sformatf("cycle %0d: stop", r));
      repeat ($urandom_range(2, 10)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
