// tb_receiver: checks that one receive trigger captures exactly wave_len
// consecutive ADC samples starting the clock after the trigger, marks the
// last one, pulses rx_done once, and ignores triggers during a capture.
module tb_receiver;
  logic clk = 0, rst = 1, rx_trigger = 0;
  logic [15:0] wave_len = 0;
  logic [31:0] adc_data = 0, data_out;
  logic we_out, last_out, rx_done, rx_active;
  int checks = 0, failures = 0;

  receiver dut (.clk, .rst, .rx_trigger, .wave_len, .adc_data, .we_out,
                .data_out, .last_out, .rx_done, .rx_active);

  always #5 clk = ~clk;
  // the ADC stream is a running sample number
  always_ff @(posedge clk) adc_data <= adc_data + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic capture(input int len, input bit retrigger);
    int n, dones, lasts;
    logic [31:0] start_val, prev;
    wave_len = len;
    @(negedge clk) rx_trigger = 1;
    start_val = adc_data;           // value present at the sampling edge
    @(negedge clk) rx_trigger = 0;
    n = 0; dones = 0; lasts = 0;
    for (int c = 0; c < len + 20; c++) begin
      @(posedge clk); #1;
      if (retrigger && c == 3) rx_trigger = 1;
      if (retrigger && c == 4) rx_trigger = 0;
      if (we_out) begin
        // first captured sample is the one present one clock after the trigger
        check(data_out == start_val + 1 + n, $sformatf("sample %0d = %0d want %0d",
              n, data_out, start_val + 1 + n));
        if (last_out) begin
          lasts++;
          check(n == len - 1, $sformatf("last_out on sample %0d of %0d", n, len));
        end
        n++;
      end
      if (rx_done) begin
        dones++;
        check(n == len, "rx_done before the last sample");
      end
    end
    check(n == len, $sformatf("captured %0d, want %0d", n, len));
    check(dones == (len > 0 ? 1 : 0), $sformatf("rx_done pulses %0d", dones));
    check(lasts == (len > 0 ? 1 : 0), $sformatf("last_out count %0d", lasts));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    capture(1, 0);
    capture(6, 0);
    capture(50, 1);
    capture(0, 0);
    capture(8096, 0);
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
