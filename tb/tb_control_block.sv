// tb_control_block: end-to-end test of the whole radar gateware at its
// default sizes.
//
// A GPMC host model plays the ARM: it writes a parameter frame (PRI, receive
// delay, wave length, waveform) and reads it back, then sets the run bit.
// The DAC output is looped back to the ADC input, as with the loop-back
// mezzanine card, and a MAC model takes the UDP byte stream with a randomly
// stalling ready signal. Every Ethernet frame is parsed and checked: length
// 544 bytes, Ethernet/IPv4/UDP header fields and IPv4 header checksum, pulse
// number, and the samples against the waveform.
//
// Run 1 (930-sample pulse, PRI 6000 x 10 ns, delay 40 x 5 ns, 3 pulses):
// trigger spacing, refused writes while running, stop, per-pulse packets
// (7 full + 1 padded) and the received samples.
// Run 2 (8096-sample pulse, PRI 10000 x 10 ns, 3 pulses): the data rate is
// above what the link can carry, so the output FIFO fills and overflows;
// the first pulse must still arrive complete, and everything must drain.
// The debug serial port is looped back on itself and must return a
// character.
//
// Each mechanism is counted and one that never happened counts a failure.
module tb_control_block;
  import radar_pkg::*;

  logic clk_100 = 0, clk_200 = 0, adc_clk = 0, gige_clk = 0, gpmc_clk = 0, rst = 1;
  logic [9:0]  gpmc_a;
  logic [15:0] gpmc_d_in, gpmc_d_out;
  logic        gpmc_d_oe, gpmc_nadv, gpmc_nwe, gpmc_noe;
  logic [7:0]  gpmc_ncs;
  logic [31:0] dac_data, adc_data;
  logic        dac_valid;
  logic [7:0]  mac_data;
  logic        mac_valid, mac_sof, mac_eof, mac_ready = 0;
  logic        uart_txd, uart_rxd, dbg_tx_start = 0, dbg_tx_busy;
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
  initial begin #2.5; forever #5 adc_clk = ~adc_clk; end   // 100 MHz, shifted
  always #4    gige_clk = ~gige_clk;                       // 125 MHz
  always #10   gpmc_clk = ~gpmc_clk;                       // 50 MHz

  assign adc_data = dac_valid ? dac_data : 32'h0;          // loop-back
  assign uart_rxd = uart_txd;                              // serial loop-back

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] wave_val(input int run_no, input int i);
    return {16'(i * 3 + 1 + run_no * 16'h4000), 16'(16'h8000 ^ i)};
  endfunction

  // ---------------- monitors and mechanism counters ----------------
  int n_trig = 0, n_refused = 0, n_stall = 0, n_overflow = 0, n_full_pkt = 0,
      n_pad_pkt = 0, n_readback = 0, n_claims = 0, n_uart = 0, n_fifo_full = 0;
  realtime t_last_trig = 0, min_spacing = 1e12, max_spacing = 0;
  bit claim_q = 0, ovf_q = 0, full_q = 0;

  always @(posedge clk_100) if (!rst) begin
    if (tx_trigger) begin
      if (n_trig > 0 && $realtime - t_last_trig < 1e6) begin
        if ($realtime - t_last_trig < min_spacing) min_spacing = $realtime - t_last_trig;
        if ($realtime - t_last_trig > max_spacing) max_spacing = $realtime - t_last_trig;
      end
      t_last_trig = $realtime;
      n_trig++;
    end
    if (claim_mem && !claim_q) n_claims++;
    claim_q = claim_mem;
  end
  always @(posedge gpmc_clk) if (!rst && write_refused) n_refused++;
  always @(posedge adc_clk) if (!rst) begin
    if (fifo_overflow && !ovf_q) n_overflow++;
    if (fifo_full && !full_q) n_fifo_full++;
    ovf_q = fifo_overflow;
    full_q = fifo_full;
  end
  always @(posedge clk_100) if (!rst && dbg_rx_valid) begin
    n_uart++;
    check(dbg_rx_char == 7'h41 && !dbg_rx_parity_err && !dbg_rx_frame_err,
          $sformatf("debug port returned %h", dbg_rx_char));
  end

  // ---------------- MAC model ----------------
  bit random_ready = 1;
  always @(posedge gige_clk) mac_ready <= random_ready ? ($urandom_range(0, 7) != 0) : 1'b1;

  logic [7:0]  frame[$];
  logic [31:0] stream[$];      // payload samples in arrival order
  int          frame_pnum[$];
  bit          frame_pad[$];
  int          n_frames = 0;

  function automatic logic [15:0] be16(input int p);
    return {frame[p], frame[p+1]};
  endfunction

  task automatic check_frame();
    logic [31:0] sum;
    check(frame.size() == 544, $sformatf("frame length %0d", frame.size()));
    if (frame.size() != 544) return;
    check({frame[0], frame[1], frame[2], frame[3], frame[4], frame[5]} == 48'h00a0d1ad03bb,
          "destination MAC");
    check({frame[6], frame[7], frame[8], frame[9], frame[10], frame[11]} == 48'h0037ffff3737,
          "source MAC");
    check(be16(12) == 16'h0800 && frame[14] == 8'h45 && frame[23] == 8'd17,
          "EtherType / IP version / protocol");
    check(be16(16) == 16'd530 && be16(38) == 16'd510, "IP and UDP lengths");
    check({frame[26], frame[27], frame[28], frame[29]} == {8'd192, 8'd168, 8'd0, 8'd1} &&
          {frame[30], frame[31], frame[32], frame[33]} == {8'd192, 8'd168, 8'd0, 8'd3},
          "IP addresses");
    check(be16(34) == 16'd2001 && be16(36) == 16'd2001, "UDP ports");
    sum = 0;
    for (int i = 14; i < 34; i += 2) sum += 32'(be16(i));
    while (sum > 32'hffff) sum = (sum & 32'hffff) + (sum >> 16);
    check(sum == 32'hffff, "IPv4 header checksum");
    frame_pnum.push_back(int'(be16(42)));
    for (int w = 0; w < 125; w++)
      stream.push_back({frame[44 + 4*w], frame[45 + 4*w], frame[46 + 4*w], frame[47 + 4*w]});
  endtask

  always @(posedge gige_clk) if (!rst) begin
    if (mac_valid && !mac_ready) n_stall++;
    if (mac_valid && mac_ready) begin
      if (mac_sof) begin
        check(frame.size() == 0, "start of frame inside a frame");
        frame.delete();
      end
      frame.push_back(mac_data);
      if (mac_eof) begin
        check_frame();
        frame.delete();
        n_frames++;
      end
    end
    if (pkt_done) begin
      frame_pad.push_back(pkt_padded);
      if (pkt_padded) n_pad_pkt++; else n_full_pkt++;
    end
  end

  // ---------------- host sequences ----------------
  task automatic write_frame(input int run_no, input int pri, input int dly, input int len);
    host.write16(29'(ADDR_PRI_LO), 16'(pri));
    host.write16(29'(ADDR_PRI_HI), 16'(pri >> 16));
    host.write16(29'(ADDR_DLY_LO), 16'(dly));
    host.write16(29'(ADDR_DLY_HI), 16'(dly >> 16));
    host.write16(29'(ADDR_LEN), 16'(len));
    for (int i = 0; i < len; i++) begin
      host.write16(29'(int'(ADDR_WAVE) + 2*i),     wave_val(run_no, i)[15:0]);
      host.write16(29'(int'(ADDR_WAVE) + 2*i + 1), wave_val(run_no, i)[31:16]);
    end
  endtask

  task automatic expect_read(input logic [28:0] adr, input logic [15:0] want, input string what);
    logic [15:0] q;
    bit drv;
    host.read16(adr, q, drv);
    check(drv && q == want, $sformatf("read %s = %h (driven %0d) want %h", what, q, drv, want));
    if (drv && q == want) n_readback++;
  endtask

  task automatic wait_idle_output();
    // wait until no packet has been in progress for a while
    int quiet;
    quiet = 0;
    while (quiet < 4000) begin
      @(posedge gige_clk);
      if (mac_valid || dut.fifo_count != 0) quiet = 0; else quiet++;
    end
  endtask

  task automatic check_pulses(input int run_no, input int npulses, input int len);
    int per, first_k, pos;
    per = ((len + 124) / 125) * 125;
    check(stream.size() == npulses * per, $sformatf("received %0d samples want %0d",
          stream.size(), npulses * per));
    check(frame_pnum.size() == npulses * per / 125, "frame count");
    for (int p = 0; p < npulses && stream.size() >= (p + 1) * per; p++) begin
      // the capture window opens after the waveform has started, at an
      // offset set by the receive delay: find it from the first sample
      first_k = -1;
      for (int k = 0; k < len; k++) if (stream[p*per] == wave_val(run_no, k)) first_k = k;
      check(first_k >= 20 && first_k <= 30, $sformatf("pulse %0d: window offset %0d", p, first_k));
      for (int i = 0; i < per; i++) begin
        logic [31:0] want;
        pos = p * per + i;
        if (i >= len) want = 0;                            // padding
        else if (first_k + i < len) want = wave_val(run_no, first_k + i);
        else want = 0;                                     // after the pulse
        if (stream[pos] != want) begin
          check(0, $sformatf("pulse %0d sample %0d = %h want %h", p, i, stream[pos], want));
          break;
        end
      end
      checks++;
      for (int f = 0; f < per / 125; f++) begin
        check(frame_pnum[p * per / 125 + f] == p + 1,
              $sformatf("frame pulse number %0d want %0d", frame_pnum[p * per / 125 + f], p + 1));
        check(frame_pad[p * per / 125 + f] == (f == per / 125 - 1) && (len % 125 != 0),
              "padding flag");
      end
    end
  endtask

  initial begin
    int trig_at_stop, n1, pad1;
    repeat (20) @(posedge gpmc_clk);
    rst = 0;
    repeat (20) @(posedge gpmc_clk);

    // debug serial port: send 'A' and receive it back
    @(negedge clk_100) begin dbg_tx_start = 1; dbg_tx_char = 7'h41; end
    @(negedge clk_100) dbg_tx_start = 0;

    // ---------------- run 1: 930-sample pulse ----------------
    write_frame(1, 6000, 40, 930);
    expect_read(29'(ADDR_PRI_LO), 16'd6000, "PRI low");
    expect_read(29'(ADDR_PRI_HI), 16'd0, "PRI high");
    expect_read(29'(ADDR_DLY_LO), 16'd40, "delay low");
    expect_read(29'(ADDR_LEN), 16'd930, "length");
    for (int j = 0; j < 6; j++) begin
      int i;
      i = (j == 0) ? 0 : (j == 5) ? 929 : $urandom_range(0, 929);
      expect_read(29'(int'(ADDR_WAVE) + 2*i), wave_val(1, i)[15:0], "wave real");
      expect_read(29'(int'(ADDR_WAVE) + 2*i + 1), wave_val(1, i)[31:16], "wave imag");
    end
    check(n_trig == 0 && !tx_enable, "no pulses before the run bit");

    host.write16(29'(ADDR_CTRL), 16'h0001);
    wait (claim_mem);
    expect_read(29'(ADDR_CTRL), 16'h0001, "control");
    // writes while running are refused
    n1 = n_refused;
    host.write16(29'(ADDR_PRI_LO), 16'd77);
    host.write16(29'(int'(ADDR_WAVE) + 10), 16'hdead);
    repeat (4) @(posedge gpmc_clk);
    check(n_refused == n1 + 2, $sformatf("refused writes %0d want 2", n_refused - n1));
    expect_read(29'(ADDR_PRI_LO), 16'd6000, "PRI low after refused write");
    expect_read(29'(int'(ADDR_WAVE) + 10), wave_val(1, 5)[15:0], "wave after refused write");

    wait (n_trig == 3);
    host.write16(29'(ADDR_CTRL), 16'h0000);
    wait (!tx_enable);
    trig_at_stop = n_trig;
    check(trig_at_stop == 3, $sformatf("%0d pulses before stop", trig_at_stop));
    repeat (15000) @(posedge clk_100);           // 2.5 PRIs
    check(n_trig == trig_at_stop, "pulses after stop");
    check(!claim_mem && run_state == FC_WAIT_START, "memory released after stop");
    check(min_spacing == 60000.0 && max_spacing == 60000.0,
          $sformatf("PRI spacing %0t..%0t want 60 us", min_spacing, max_spacing));
    check(pulse_count == 16'd3, $sformatf("pulse count %0d", pulse_count));
    wait_idle_output();
    check_pulses(1, 3, 930);
    check(n_overflow == 0, "overflow at low rate");
    pad1 = n_pad_pkt;

    // ---------------- run 2: 8096 samples, short PRI ----------------
    stream.delete(); frame_pnum.delete(); frame_pad.delete();
    write_frame(2, 10000, 0, 8096);
    expect_read(29'(ADDR_LEN), 16'd8096, "length");
    expect_read(29'(int'(ADDR_WAVE) + 2*8095 + 1), wave_val(2, 8095)[31:16], "last wave word");
    host.write16(29'(ADDR_CTRL), 16'h0001);
    wait (n_trig == trig_at_stop + 3);
    host.write16(29'(ADDR_CTRL), 16'h0000);
    wait (!tx_enable);
    wait_idle_output();
    check(n_overflow > 0, "no overflow at 8096 samples every 100 us");
    check(stream.size() >= 8096 && stream.size() % 125 == 0, "run 2 stream length");
    // the first pulse met an empty FIFO and must arrive whole
    begin
      int k0, bad;
      k0 = -1; bad = 0;
      for (int k = 0; k < 8096; k++) if (stream[0] == wave_val(2, k)) k0 = k;
      check(k0 >= 0 && k0 <= 10, $sformatf("run 2 window offset %0d", k0));
      for (int i = 0; i < 8096 && k0 >= 0; i++)
        if (stream[i] != ((k0 + i < 8096) ? wave_val(2, k0 + i) : 32'h0)) bad++;
      check(bad == 0, $sformatf("run 2 first pulse: %0d wrong samples", bad));
    end
    check(frame_pad.size() > 0 && frame_pad[frame_pad.size() - 1], "last packet padded");
    check(dut.fifo_count == 0 && !mac_valid, "output drained");

    // ---------------- mechanisms ----------------
    check(n_trig >= 6,       $sformatf("pulses: %0d", n_trig));
    check(n_claims == 2,     $sformatf("claim/release cycles: %0d", n_claims));
    check(n_readback > 10,   $sformatf("readbacks: %0d", n_readback));
    check(n_refused >= 2,    $sformatf("refused writes: %0d", n_refused));
    check(n_full_pkt > 0,    $sformatf("full packets: %0d", n_full_pkt));
    check(pad1 > 0 && n_pad_pkt > pad1, $sformatf("padded packets: %0d", n_pad_pkt));
    check(n_stall > 0,       $sformatf("MAC stalls: %0d", n_stall));
    check(n_fifo_full > 0,   $sformatf("FIFO full: %0d", n_fifo_full));
    check(n_overflow > 0,    $sformatf("FIFO overflows: %0d", n_overflow));
    check(n_uart == 1,       $sformatf("debug characters: %0d", n_uart));
    $display("pulses %0d, frames %0d (%0d full, %0d padded), MAC stalls %0d, overflows %0d, refused writes %0d",
             n_trig, n_frames, n_full_pkt, n_pad_pkt, n_stall, n_overflow, n_refused);
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
