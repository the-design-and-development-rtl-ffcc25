// tb_async_fifo: writes on a 100 MHz clock and reads on a 125 MHz clock with
// random gaps, checking order and contents, the one-cycle read latency, the
// fill count, the full flag and that writes while full are dropped and
// reported as overflow.
module tb_async_fifo;
  localparam int DEPTH = 16;
  logic wclk = 0, rclk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [31:0] wdata = 0, rdata;
  logic wfull, overflow, rempty;
  logic [4:0] rcount;
  int checks = 0, failures = 0;

  async_fifo #(.DW(32), .DEPTH(DEPTH)) dut (
    .wclk, .wrst(rst), .wr_en, .wdata, .wfull, .overflow,
    .rclk, .rrst(rst), .rd_en, .rdata, .rempty, .rcount
  );

  always #5 wclk = ~wclk;
  always #4 rclk = ~rclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] model[$];
  int n_over = 0, n_push = 0;

  // writer: random words, drops counted when full
  task automatic write_words(input int n, input int gap);
    for (int i = 0; i < n; i++) begin
      @(negedge wclk);
      wr_en = 1; wdata = $urandom;
      if (!wfull) begin model.push_back(wdata); n_push++; end
      @(negedge wclk) wr_en = 0;
      repeat (gap) @(negedge wclk);
    end
  endtask

  always @(posedge wclk) if (!rst && overflow) n_over++;

  // reader
  int n_read = 0;
  bit reading = 0;
  always @(negedge rclk) begin
    rd_en <= reading && !rempty && ($urandom_range(0, 3) != 0);
  end
  logic rd_d = 0;
  always @(posedge rclk) begin
    rd_d <= rd_en && !rempty;
    if (rd_d) begin
      check(model.size() > 0, "read with empty model");
      if (model.size() > 0) begin
        logic [31:0] w;
        w = model.pop_front();
        check(rdata == w, $sformatf("read %h want %h", rdata, w));
      end
      n_read++;
    end
  end

  initial begin
    repeat (4) @(posedge wclk);
    #1 rst = 0;
    // fill without reading: full after DEPTH words, later writes dropped
    write_words(DEPTH + 5, 0);
    repeat (6) @(posedge rclk);
    #1;
    check(wfull, "not full after DEPTH writes");
    check(rcount == 5'(DEPTH), $sformatf("rcount %0d", rcount));
    check(n_over == 5, $sformatf("overflow pulses %0d want 5", n_over));
    check(model.size() == DEPTH, "model size");
    // drain and stream
    reading = 1;
    write_words(200, 1);
    wait (model.size() == 0);
    repeat (10) @(posedge rclk);
    #1;
    check(rempty && rcount == 0, "not empty at end");
    check(n_read == n_push && n_push > DEPTH + 150, $sformatf("read %0d of %0d words", n_read, n_push));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
