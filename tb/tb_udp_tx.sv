// tb_udp_tx: feeds the UDP block from a FIFO model and takes its byte stream
// with a MAC model whose ready signal is randomly withheld. Checks every
// frame's length (544 bytes), the fixed Ethernet/IPv4/UDP header against
// values built here independently (including the IPv4 header checksum,
// verified by summing the received header), the pulse number, that full
// packets carry the next 125 FIFO words in order and that a flush sends the
// remaining words padded with zero samples. Also checks that no packet starts
// before a payload's worth of data or a flush is present.
module tb_udp_tx;
  localparam int N = 125;
  logic clk = 0, rst = 1;
  logic [13:0] fifo_count;
  logic fifo_rd, flush = 0, mac_valid, mac_sof, mac_eof, mac_ready = 0;
  logic [31:0] fifo_data;
  logic [15:0] pulse_no = 16'd7;
  logic [7:0] mac_data;
  logic pkt_done, pkt_padded;
  int checks = 0, failures = 0;

  udp_tx dut (.clk, .rst, .fifo_count, .fifo_rd, .fifo_data, .flush, .pulse_no,
              .mac_data, .mac_valid, .mac_sof, .mac_eof, .mac_ready, .pkt_done, .pkt_padded);

  always #4 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // FIFO model: one-cycle read latency
  logic [31:0] q[$];
  logic [31:0] sent_words[$];   // what the FIFO gave out, in order
  assign fifo_count = 14'(q.size());
  always @(posedge clk) if (!rst) begin
    if (fifo_rd) begin
      if (q.size() == 0) begin failures++; $display("FAIL: read from empty FIFO"); end
      else begin fifo_data <= q[0]; sent_words.push_back(q[0]); void'(q.pop_front()); end
    end
  end

  // MAC model
  logic [7:0] frame[$];
  logic [7:0] frames[$][$];
  always @(posedge clk) mac_ready <= ($urandom_range(0, 4) != 0);
  always @(posedge clk) if (!rst && mac_valid && mac_ready) begin
    if (mac_sof) begin
      check(frame.size() == 0, "sof inside a frame");
      frame.delete();
    end
    frame.push_back(mac_data);
    if (mac_eof) begin frames.push_back(frame); frame.delete(); end
  end

  logic [7:0] hdr[42];
  function automatic void build_header();
    logic [7:0] h[$];
    logic [31:0] s;
    h = '{8'h00, 8'ha0, 8'hd1, 8'had, 8'h03, 8'hbb,     // destination MAC
          8'h00, 8'h37, 8'hff, 8'hff, 8'h37, 8'h37,     // source MAC
          8'h08, 8'h00,
          8'h45, 8'h00, 8'h02, 8'h12,                   // total length 530
          8'h00, 8'h00, 8'h00, 8'h00, 8'h40, 8'h11, 8'h00, 8'h00,
          8'd192, 8'd168, 8'd0, 8'd1, 8'd192, 8'd168, 8'd0, 8'd3,
          8'h07, 8'hd1, 8'h07, 8'hd1,                   // ports 2001
          8'h01, 8'hfe, 8'h00, 8'h00};                  // UDP length 510
    s = 0;
    for (int i = 14; i < 34; i += 2) s += {h[i], h[i+1]};
    while (s > 32'hffff) s = (s & 32'hffff) + (s >> 16);
    h[24] = ~s[15:8]; h[25] = ~s[7:0];
    foreach (hdr[i]) hdr[i] = h[i];
  endfunction

  int word_ptr = 0;   // next word expected in the payload stream

  task automatic check_frame(input int idx, input int nwords, input logic [15:0] pn);
    logic [31:0] s;
    check(frames[idx].size() == 544, $sformatf("frame %0d length %0d", idx, frames[idx].size()));
    if (frames[idx].size() != 544) return;
    for (int i = 0; i < 42; i++)
      check(frames[idx][i] == hdr[i], $sformatf("frame %0d header byte %0d = %h want %h",
            idx, i, frames[idx][i], hdr[i]));
    s = 0;
    for (int i = 14; i < 34; i += 2) s += {frames[idx][i], frames[idx][i+1]};
    while (s > 32'hffff) s = (s & 32'hffff) + (s >> 16);
    check(s == 32'hffff, "IPv4 header checksum does not verify");
    check({frames[idx][42], frames[idx][43]} == pn, $sformatf("pulse number %0d", {frames[idx][42], frames[idx][43]}));
    for (int w = 0; w < N; w++) begin
      logic [31:0] got, want;
      got = {frames[idx][44+4*w], frames[idx][45+4*w], frames[idx][46+4*w], frames[idx][47+4*w]};
      want = (w < nwords) ? sent_words[word_ptr + w] : 32'h0;
      check(got == want, $sformatf("frame %0d word %0d = %h want %h", idx, w, got, want));
    end
    word_ptr += nwords;
  endtask

  int n_done = 0, n_pad = 0;
  always @(posedge clk) if (!rst && pkt_done) begin n_done++; if (pkt_padded) n_pad++; end

  initial begin
    build_header();
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // less than a payload: nothing is sent
    for (int i = 0; i < 100; i++) q.push_back($urandom);
    repeat (300) @(posedge clk);
    check(frames.size() == 0 && !mac_valid, "packet started without a full payload");
    // top up to 2.5 payloads: two full packets
    for (int i = 0; i < 2 * N + N / 2 - 100; i++) q.push_back($urandom);
    wait (frames.size() == 2);
    repeat (300) @(posedge clk);
    check(frames.size() == 2, "third packet without flush");
    check_frame(0, N, 16'd7);
    check_frame(1, N, 16'd7);
    // flush: the remaining 62 words plus 63 zero samples
    pulse_no = 16'd8;
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    wait (frames.size() == 3);
    check_frame(2, N / 2, 16'd8);
    check(q.size() == 0, "FIFO not emptied by the flush");
    // flush with an empty FIFO sends nothing
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    repeat (700) @(posedge clk);
    check(frames.size() == 3, "flush of an empty FIFO sent a packet");
    // a stream of 3 payloads + 1 word arriving while sending, then flush
    for (int i = 0; i < 3 * N + 1; i++) q.push_back(32'h8000_0000 | i);
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    wait (frames.size() == 7);
    repeat (3) @(posedge clk);
    check_frame(3, N, 16'd8);
    check_frame(4, N, 16'd8);
    check_frame(5, N, 16'd8);
    check_frame(6, 1, 16'd8);
    check(n_done == 7 && n_pad == 2, $sformatf("pkt_done %0d padded %0d", n_done, n_pad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
