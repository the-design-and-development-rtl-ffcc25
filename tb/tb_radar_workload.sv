// tb_radar_workload: the whole design at its default sizes running the
// largest workload the radar is specified for, at the timing measured on the
// hardware: 8096-sample pulses (32 384 bytes each), a 500 us PRI and a 40 us
// receive delay.
//
// The MAC model accepts bytes at Gigabit line rate and then holds ready low
// for 24 byte times after each frame (preamble, CRC and inter-frame gap), so
// the link is as fast as a real 1 Gb/s port and no faster. Checks: the
// transmit pulses start exactly 500 us apart; reception starts 40 us after
// transmission plus the fixed synchroniser offset (under 100 ns); every
// pulse arrives as 65 packets (64 full, the last with 96 samples and 29
// zeros) carrying its own pulse number; every sample matches the looped-back
// waveform; and the output FIFO never overflows, i.e. the link empties the
// buffer before the next pulse arrives.
module tb_radar_workload;
  import radar_pkg::*;

  localparam int LEN = 8096, PRI = 50000, DLY = 8000, NPULSES = 3;
  localparam int PER = ((LEN + 124) / 125) * 125;

  logic clk_100 = 0, clk_200 = 0, adc_clk = 0, gige_clk = 0, gpmc_clk = 0, rst = 1;
  logic [9:0]  gpmc_a;
  logic [15:0] gpmc_d_in, gpmc_d_out;
  logic        gpmc_d_oe, gpmc_nadv, gpmc_nwe, gpmc_noe;
  logic [7:0]  gpmc_ncs;
  logic [31:0] dac_data, adc_data;
  logic        dac_valid;
  logic [7:0]  mac_data;
  logic        mac_valid, mac_sof, mac_eof, mac_ready;
  logic        uart_txd, uart_rxd = 1, dbg_tx_start = 0, dbg_tx_busy;
  logic [6:0]  dbg_tx_char = 0, dbg_rx_char;
  logic        dbg_rx_valid, dbg_rx_parity_err, dbg_rx_frame_err;
  logic        tx_active, rx_active, tx_trigger, claim_mem, tx_enable;
  logic [15:0] pulse_count;
  logic        write_refused, fifo_full, fifo_overflow, pkt_done, pkt_padded;
  logic [2:0]  run_state;

  control_block dut (.*);

  gpmc_host host (
    .clk(gpmc_clk), .a(gpmc_a), .d(gpmc_d_in), .ncs(gpmc_ncs), .nadv(gpmc_nadv),
    .nwe(gpmc_nwe), .noe(gpmc_noe), .fpga_d(gpmc_d_out), .fpga_d_oe(gpmc_d_oe)
  );

  always #5    clk_100  = ~clk_100;
  always #2.5  clk_200  = ~clk_200;
  initial begin #2.5; forever #5 adc_clk = ~adc_clk; end
  always #4    gige_clk = ~gige_clk;
  always #10   gpmc_clk = ~gpmc_clk;

  assign adc_data = dac_valid ? dac_data : 32'h0;   // loop-back

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] wave_val(input int i);
    return {16'(i * 5 + 3), 16'(16'h4000 ^ i)};
  endfunction

  // transmit / receive start times, as a scope on tx_active and rx_active
  realtime t_tx[$], t_rx[$];
  bit tx_q = 0, rx_q = 0;
  int n_overflow = 0;
  always @(posedge clk_100) if (!rst) begin
    if (tx_active && !tx_q) t_tx.push_back($realtime);
    tx_q = tx_active;
  end
  always @(posedge adc_clk) if (!rst) begin
    if (rx_active && !rx_q) t_rx.push_back($realtime);
    rx_q = rx_active;
    if (fifo_overflow) n_overflow++;
  end

  // Gigabit MAC model: one byte per 8 ns, 24 idle byte times after a frame
  int gap = 0;
  assign mac_ready = (gap == 0);
  logic [7:0]  frame[$];
  logic [31:0] stream[$];
  int          frame_pnum[$];
  bit          frame_pad[$];
  realtime     t_last_byte;
  always @(posedge gige_clk)
    if (mac_valid && mac_ready && mac_eof) gap <= 24;
    else if (gap > 0)                      gap <= gap - 1;
  always @(posedge gige_clk) if (!rst) begin
    if (mac_valid && mac_ready) begin
      frame.push_back(mac_data);
      if (mac_eof) begin
        check(frame.size() == 544, $sformatf("frame length %0d", frame.size()));
        if (frame.size() == 544) begin
          frame_pnum.push_back(int'({frame[42], frame[43]}));
          for (int w = 0; w < 125; w++)
            stream.push_back({frame[44+4*w], frame[45+4*w], frame[46+4*w], frame[47+4*w]});
        end
        frame.delete();
        t_last_byte = $realtime;
      end
    end
    if (pkt_done) frame_pad.push_back(pkt_padded);
  end

  initial begin
    int k0, bad;
    repeat (20) @(posedge gpmc_clk);
    rst = 0;
    repeat (20) @(posedge gpmc_clk);
    host.write16(29'(ADDR_PRI_LO), 16'(PRI));
    host.write16(29'(ADDR_PRI_HI), 16'(PRI >> 16));
    host.write16(29'(ADDR_DLY_LO), 16'(DLY));
    host.write16(29'(ADDR_DLY_HI), 16'(DLY >> 16));
    host.write16(29'(ADDR_LEN), 16'(LEN));
    for (int i = 0; i < LEN; i++) begin
      host.write16(29'(int'(ADDR_WAVE) + 2*i),     wave_val(i)[15:0]);
      host.write16(29'(int'(ADDR_WAVE) + 2*i + 1), wave_val(i)[31:16]);
    end
    host.write16(29'(ADDR_CTRL), 16'h0001);
    wait (t_tx.size() == NPULSES);
    host.write16(29'(ADDR_CTRL), 16'h0000);
    wait (!tx_enable);
    // let the last pulse be received and sent
    wait (frame_pad.size() == NPULSES * PER / 125);
    repeat (2000) @(posedge gige_clk);

    check(t_tx.size() == NPULSES && t_rx.size() == NPULSES,
          $sformatf("%0d transmit and %0d receive windows", t_tx.size(), t_rx.size()));
    for (int p = 1; p < t_tx.size(); p++)
      check(t_tx[p] - t_tx[p-1] == PRI * 10.0,
            $sformatf("PRI %0t, want 500 us", t_tx[p] - t_tx[p-1]));
    for (int p = 0; p < t_rx.size() && p < t_tx.size(); p++)
      check(t_rx[p] - t_tx[p] >= DLY * 5.0 && t_rx[p] - t_tx[p] <= DLY * 5.0 + 100.0,
            $sformatf("receive delay %0t, want 40 us", t_rx[p] - t_tx[p]));
    check(n_overflow == 0, $sformatf("%0d samples lost in the output FIFO", n_overflow));
    check(stream.size() == NPULSES * PER,
          $sformatf("received %0d samples, want %0d", stream.size(), NPULSES * PER));
    for (int p = 0; p < NPULSES && stream.size() >= (p + 1) * PER; p++) begin
      k0 = -1; bad = 0;
      for (int k = 0; k < LEN; k++) if (stream[p*PER] == wave_val(k)) k0 = k;
      // 40 us at 10 ns per sample is 4000 samples into the pulse
      check(k0 >= 4000 && k0 <= 4010, $sformatf("pulse %0d: window offset %0d", p, k0));
      for (int i = 0; i < PER; i++) begin
        logic [31:0] want;
        want = (i < LEN && k0 >= 0 && k0 + i < LEN) ? wave_val(k0 + i) : 32'h0;
        if (stream[p*PER + i] != want) bad++;
      end
      check(bad == 0, $sformatf("pulse %0d: %0d wrong samples", p, bad));
      for (int f = 0; f < PER / 125; f++) begin
        check(frame_pnum[p*PER/125 + f] == p + 1, "pulse number");
        check(frame_pad[p*PER/125 + f] == (f == PER/125 - 1), "padding flag");
      end
    end
    $display("pulses %0d, packets %0d, last packet of a pulse ends %0t after its transmit start",
             t_tx.size(), frame_pad.size(), t_last_byte - t_tx[t_tx.size() - 1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge gpmc_clk);     // 20 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
