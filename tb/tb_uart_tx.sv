// tb_uart_tx: samples the serial line in the middle of each bit and checks
// the frame: start bit 0, 7 data bits LSB first, even parity, two stop bits
// of 1, each CLKS_PER_BIT clocks long; ASCII 'A' gives the line sequence
// 0 1000001 0 11. Also checks busy and the idle-high line.
module tb_uart_tx;
  localparam int CPB = 8;
  logic clk = 0, rst = 1, start = 0;
  logic [6:0] data = 0;
  logic txd, busy;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .start, .data, .txd, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send_and_check(input logic [6:0] ch);
    logic [10:0] want;
    logic [10:0] got;
    int ones;
    ones = $countones(ch);
    want = {2'b11, 1'(ones % 2), ch, 1'b0};   // sent LSB first
    @(negedge clk) begin start = 1; data = ch; end
    @(negedge clk) start = 0;
    // the frame began at the edge that sampled start; sample mid-bit
    repeat (CPB / 2 - 1) @(negedge clk);
    for (int b = 0; b < 11; b++) begin
      got[b] = txd;
      check(busy, "busy low during frame");
      repeat (CPB) @(negedge clk);
    end
    check(got == want, $sformatf("char %h: line %b want %b", ch, got, want));
    repeat (CPB) @(negedge clk);
    check(!busy && txd, "line not idle after frame");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (5) @(posedge clk);
    check(txd && !busy, "idle line");
    send_and_check(7'h41);   // 'A'
    send_and_check(7'h00);
    send_and_check(7'h7f);
    send_and_check(7'h2a);
    for (int i = 0; i < 10; i++) send_and_check(7'($urandom));
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
