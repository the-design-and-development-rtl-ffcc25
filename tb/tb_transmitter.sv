// tb_transmitter: checks that one trigger sends exactly wave_len samples from
// addresses 0..wave_len-1 in order, two clocks after the trigger edge, that
// triggers during a pulse are ignored and that a zero length sends nothing.
module tb_transmitter;
  logic clk = 0, rst = 1, tx_trigger = 0;
  logic [15:0] wave_len = 0;
  logic [12:0] wave_addr;
  logic [31:0] wave_data, dac_data;
  logic dac_valid, tx_active, tx_started;
  logic [31:0] mem [8096];
  int checks = 0, failures = 0;

  transmitter dut (.clk, .rst, .tx_trigger, .wave_len, .wave_addr, .wave_data,
                   .dac_data, .dac_valid, .tx_active, .tx_started);

  always #5 clk = ~clk;
  always_ff @(posedge clk) wave_data <= mem[wave_addr];   // 1-cycle BRAM

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Fire one trigger and check the pulse that follows.
  task automatic pulse(input int len, input bit retrigger);
    int n, first;
    wave_len = len;
    @(negedge clk) tx_trigger = 1;
    @(negedge clk) tx_trigger = 0;
    n = 0; first = -1;
    for (int c = 1; c < len + 20; c++) begin
      @(posedge clk); #1;
      if (retrigger && c == 4) tx_trigger = 1;
      if (retrigger && c == 5) tx_trigger = 0;
      if (dac_valid) begin
        if (first < 0) first = c;
        check(dac_data == mem[n], $sformatf("sample %0d: %h want %h", n, dac_data, mem[n]));
        n++;
      end
    end
    check(n == len, $sformatf("sent %0d samples, want %0d", n, len));
    if (len > 0) check(first == 1, $sformatf("first sample %0d clocks after trigger edge", first + 1));
  endtask

  initial begin
    foreach (mem[i]) mem[i] = {16'(i * 7 + 3), 16'(i ^ 16'h5a5a)};
    repeat (3) @(posedge clk);
    #1 rst = 0;
    pulse(1, 0);
    pulse(5, 0);
    pulse(37, 1);
    pulse(0, 0);
    pulse(8096, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
