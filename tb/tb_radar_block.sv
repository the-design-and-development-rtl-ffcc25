// tb_radar_block: runs the radar core with 100 MHz, 200 MHz and a 100 MHz ADC
// clock, the DAC output looped back to the ADC input, and checks: the
// trigger spacing equals the PRI, each pulse sends wave_len samples, the
// capture window starts the programmed delay (5 ns steps) after the trigger
// plus the fixed synchroniser offset, the captured samples are the looped-back
// waveform, rx_done follows each capture, and pulse_count counts pulses and
// restarts from zero at the next enable.
module tb_radar_block;
  logic clk_100 = 0, clk_200 = 0, rst = 1, tx_enable = 0;
  logic [31:0] pri = 0, delay = 0;
  logic [15:0] wave_len = 0;
  logic [12:0] wave_addr;
  logic [31:0] wave_data, dac_data, adc_data, data_out;
  logic dac_valid, clk_out, we_out, last_out, rx_done, tx_trigger, tx_active, rx_active;
  logic [15:0] pulse_count;
  logic [31:0] mem [8096];
  int checks = 0, failures = 0;

  radar_block dut (
    .clk_100, .clk_200, .clk_adc(clk_100), .rst, .tx_enable, .pri, .delay, .wave_len,
    .wave_addr, .wave_data, .dac_data, .dac_valid, .adc_data, .clk_out, .we_out,
    .data_out, .last_out, .rx_done, .pulse_count, .tx_trigger, .tx_active, .rx_active
  );

  always #5   clk_100 = ~clk_100;
  always #2.5 clk_200 = ~clk_200;
  always_ff @(posedge clk_100) wave_data <= mem[wave_addr];
  assign adc_data = dac_valid ? dac_data : 32'h0;   // loop-back

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // event monitors
  realtime t_trig[$], t_first_rx[$];
  int n_tx, n_rx, n_done, n_trig;
  logic [31:0] rx_buf[$];
  bit in_capture;
  always @(posedge clk_100) if (!rst) begin
    if (tx_trigger) begin t_trig.push_back($realtime); n_trig++; end
    if (dac_valid) n_tx++;
    if (we_out) begin
      if (!in_capture) t_first_rx.push_back($realtime);
      in_capture = !last_out;
      rx_buf.push_back(data_out);
      n_rx++;
    end
    if (rx_done) n_done++;
  end

  task automatic run_case(input int p, input int d, input int len, input int npulses);
    realtime lag, want;
    int off;
    pri = p; delay = d; wave_len = len;
    t_trig.delete(); t_first_rx.delete(); rx_buf.delete();
    n_tx = 0; n_rx = 0; n_done = 0; n_trig = 0; in_capture = 0;
    @(negedge clk_100) tx_enable = 1;
    wait (n_trig == npulses);
    @(negedge clk_100) tx_enable = 0;
    // stopping ends new pulses only: the last echo is still captured
    repeat (len + d + 40) @(posedge clk_100);
    check(pulse_count == 16'(npulses), $sformatf("pulse_count %0d want %0d", pulse_count, npulses));
    for (int i = 1; i < t_trig.size(); i++)
      check(t_trig[i] - t_trig[i-1] == p * 10.0, $sformatf("PRI spacing %0t", t_trig[i] - t_trig[i-1]));
    check(n_tx == npulses * len, $sformatf("sent %0d samples", n_tx));
    check(n_rx == npulses * len, $sformatf("captured %0d samples", n_rx));
    check(n_done == npulses, $sformatf("rx_done %0d", n_done));
    check(t_first_rx.size() == npulses, "capture windows");
    // capture window start relative to the trigger
    want = d * 5.0;
    for (int i = 0; i < t_first_rx.size() && i < t_trig.size(); i++) begin
      lag = t_first_rx[i] - t_trig[i];
      check(lag >= want + 20.0 && lag <= want + 80.0,
            $sformatf("delay %0d: first capture %0t after trigger", d, lag));
    end
    // captured data: the looped-back waveform shifted by the window offset
    // (samples before the window are lost, after the pulse end come zeros)
    off = -1;
    for (int k = 0; k < len; k++) if (rx_buf[0] == mem[k]) off = k;
    if (rx_buf[0] == 0) off = len;
    check(off >= 0, "first captured sample is not from the waveform");
    if (off >= 0)
      for (int j = 0; j < npulses; j++)
        for (int k = 0; k < len; k++)
          check(rx_buf[j*len + k] == ((k + off < len) ? mem[k + off] : 32'h0),
                $sformatf("pulse %0d sample %0d", j, k));
  endtask

  initial begin
    foreach (mem[i]) mem[i] = {16'(i + 1), 16'(16'hA000 + i)};
    repeat (5) @(posedge clk_100);
    #1 rst = 0;
    run_case(100, 0, 60, 3);
    run_case(300, 10, 100, 4);
    run_case(500, 40, 200, 2);
    run_case(2000, 101, 1000, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk_100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
