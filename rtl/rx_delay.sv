// rx_delay: receive delay timer.
//
// Runs on the 200 MHz delay clock, giving 5 ns steps. A tx_trigger (already
// in this clock domain) starts a counter; when the counter reaches the delay
// value a one-cycle rx_trigger is produced and the block waits for the next
// transmit trigger. rx_trigger rises max(delay,1) clock edges after the edge
// that sampled tx_trigger. Triggers that arrive while a delay is running are
// ignored (the delay is expected to be shorter than the PRI). A one-cycle
// clear (given when the radar is started) abandons a running delay; stopping
// the radar does not, so the echo of the last pulse is still received.
//
// Follows the original design: a counter on a 200 MHz clock that counts to
// the delay register after each transmit trigger and then triggers the
// receiver. Own choices: the clear input and ignoring triggers while busy.
module rx_delay #(
  parameter int unsigned DELAY_W = radar_pkg::DELAY_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               clear,
  input  logic               tx_trigger,
  input  logic [DELAY_W-1:0] delay,
  output logic               rx_trigger
);
  logic               busy;
  logic [DELAY_W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      busy       <= 1'b0;
      count      <= '0;
      rx_trigger <= 1'b0;
    end else begin
      rx_trigger <= 1'b0;
      if (!busy) begin
        if (tx_trigger) begin
          busy  <= 1'b1;
          count <= DELAY_W'(1);
        end
      end else if (count >= delay) begin
        busy       <= 1'b0;
        rx_trigger <= 1'b1;
      end else begin
        count <= count + 1'b1;
      end
    end
  end
endmodule
