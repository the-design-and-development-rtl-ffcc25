// tb_rx_delay: checks that the receive trigger follows the transmit trigger
// by max(delay,1) clocks, that it is one cycle wide, that triggers during a
// running delay are ignored and that clear abandons a running delay. Thirty
// random delays, each triggered right after the previous one fired, follow.
module tb_rx_delay;
  logic clk = 0, rst = 1, clear = 0, tx_trigger = 0;
  logic [31:0] delay = 0;
  logic rx_trigger;
  int checks = 0, failures = 0;

  rx_delay dut (.clk, .rst, .clear, .tx_trigger, .delay, .rx_trigger);

  always #2.5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic measure(input int d, output int n);
    delay = d;
    @(negedge clk) tx_trigger = 1;
    @(negedge clk) tx_trigger = 0;   // sampled at the posedge in between
    n = 0;
    while (!rx_trigger && n < 5000) begin @(posedge clk); #0.1; n++; end
  endtask

  initial begin
    int n, want;
    int ds[] = '{0, 1, 2, 3, 8, 40, 257, 1000};
    repeat (3) @(posedge clk);
    #0.1 rst = 0;
    foreach (ds[i]) begin
      measure(ds[i], n);
      want = (ds[i] < 1) ? 1 : ds[i];
      // n counts edges after the sampling edge's half-cycle; the sampling
      // posedge itself is the first of the "n" edges below
      check(n == want, $sformatf("delay %0d: rx after %0d edges, want %0d", ds[i], n, want));
      @(posedge clk); #0.1;
      check(!rx_trigger, "rx_trigger wider than one cycle");
      repeat (5) @(posedge clk);
    end
    // second trigger while counting is ignored
    delay = 30;
    @(negedge clk) tx_trigger = 1;
    @(negedge clk) tx_trigger = 0;
    repeat (10) @(negedge clk);
    tx_trigger = 1;
    @(negedge clk) tx_trigger = 0;
    n = 0;
    while (!rx_trigger) begin @(posedge clk); #0.1; n++; end
    check(n == 30 - 11, $sformatf("retrigger restarted the delay (%0d)", n));
    n = 0;
    repeat (100) begin @(posedge clk); #0.1; if (rx_trigger) n++; end
    check(n == 0, "extra rx_trigger from ignored trigger");
    // clear mid-delay abandons the timer
    @(negedge clk) tx_trigger = 1;
    @(negedge clk) tx_trigger = 0;
    repeat (5) @(negedge clk);
    clear = 1;
    @(negedge clk) clear = 0;
    n = 0;
    repeat (100) begin @(posedge clk); #0.1; if (rx_trigger) n++; end
    check(n == 0, "clear did not abandon the delay");
    // random delays, each started as soon as the previous one has fired
    for (int r = 0; r < 30; r++) begin
      int d;
      d = $urandom_range(1, 3000);
      measure(d, n);
      check(n == d, $sformatf("random delay %0d: rx after %0d edges", d, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
