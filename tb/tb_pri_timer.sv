// tb_pri_timer: checks the PRI timer's trigger spacing, first-trigger time,
// stop behaviour and the "reached or passed" rule when the PRI is lowered.
module tb_pri_timer;
  logic clk = 0, rst = 1, tx_enable = 0;
  logic [31:0] pri = 32'd7;
  logic tx_trigger;
  int checks = 0, failures = 0;
  int cyc = 0;

  pri_timer dut (.clk, .rst, .tx_enable, .pri, .tx_trigger);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Returns the number of clocks until tx_trigger is seen high (limit 1000).
  task automatic wait_trigger(output int n);
    n = 0;
    do begin @(posedge clk); #1; n++; end while (!tx_trigger && n < 1000);
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // disabled: no trigger for a long time
    repeat (50) begin @(posedge clk); #1; check(!tx_trigger, "trigger while disabled"); end
    for (int p = 1; p <= 12; p += 5) begin
      pri = p;
      tx_enable = 1;
      wait_trigger(n);
      check(n == p, $sformatf("first trigger after %0d clocks, want %0d", n, p));
      for (int k = 0; k < 4; k++) begin
        wait_trigger(n);
        check(n == p, $sformatf("PRI %0d: spacing %0d", p, n));
      end
      // trigger is exactly one cycle wide
      @(posedge clk); #1;
      if (p > 1) check(!tx_trigger, "trigger longer than one cycle");
      tx_enable = 0;
      repeat (3) @(posedge clk);
      #1;
    end
    // large PRI
    pri = 32'd300;
    tx_enable = 1;
    wait_trigger(n);
    check(n == 300, $sformatf("PRI 300: first after %0d", n));
    // lower the PRI below the current count: fires on the next clock
    repeat (100) @(posedge clk);
    #1 pri = 32'd20;
    @(posedge clk); #1;
    check(tx_trigger, "lowered PRI should fire at once");
    wait_trigger(n);
    check(n == 20, $sformatf("after lowering, spacing %0d", n));
    tx_enable = 0;
    repeat (400) begin @(posedge clk); #1; check(!tx_trigger, "trigger after stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
