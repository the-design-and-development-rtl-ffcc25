// tb_uart_rx: drives serial frames (start bit, 7 data bits LSB first,
// parity, two stop bits) into the receiver and checks the received
// character, the parity-error flag for a wrong parity bit, the framing-error
// flag for a low stop bit, and that a short glitch is not taken as a start.
// Twenty random characters with random parity and stop-bit errors follow.
module tb_uart_rx;
  localparam int CPB = 8;
  logic clk = 0, rst = 1, rxd = 1;
  logic [6:0] data;
  logic valid, parity_err, frame_err;
  int checks = 0, failures = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rxd, .data, .valid, .parity_err, .frame_err);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int n_valid = 0;
  logic [6:0] last_data;
  logic last_perr, last_ferr;
  always @(posedge clk) if (!rst && valid) begin
    n_valid++; last_data = data; last_perr = parity_err; last_ferr = frame_err;
  end

  task automatic send(input logic [6:0] ch, input bit bad_parity, input bit bad_stop);
    logic [10:0] bits;
    bits = {2'b11 ^ {1'b0, bad_stop}, 1'(^ch) ^ bad_parity, ch, 1'b0};
    for (int b = 0; b < 11; b++) begin
      rxd = bits[b];
      repeat (CPB) @(negedge clk);
    end
    rxd = 1;
    repeat (2 * CPB) @(negedge clk);
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 12; i++) begin
      logic [6:0] ch;
      ch = (i == 0) ? 7'h41 : 7'($urandom);
      n = n_valid;
      send(ch, 0, 0);
      check(n_valid == n + 1, "no character received");
      check(last_data == ch && !last_perr && !last_ferr,
            $sformatf("got %h perr %0d ferr %0d want %h", last_data, last_perr, last_ferr, ch));
    end
    n = n_valid;
    send(7'h55, 1, 0);
    check(n_valid == n + 1 && last_perr && last_data == 7'h55, "parity error not flagged");
    n = n_valid;
    send(7'h33, 0, 1);
    check(n_valid == n + 1 && last_ferr, "framing error not flagged");
    // random characters with random parity and stop-bit errors
    for (int i = 0; i < 20; i++) begin
      logic [6:0] ch;
      bit bp, bs;
      ch = 7'($urandom); bp = 1'($urandom); bs = 1'($urandom);
      n = n_valid;
      send(ch, bp, bs);
      check(n_valid == n + 1 && last_data == ch && last_perr == bp && last_ferr == bs,
            $sformatf("random %h perr %0d/%0d ferr %0d/%0d", ch, last_perr, bp, last_ferr, bs));
    end
    // glitch shorter than half a bit
    n = n_valid;
    rxd = 0;
    repeat (2) @(negedge clk);
    rxd = 1;
    repeat (20 * CPB) @(negedge clk);
    check(n_valid == n, "glitch taken as a character");
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
