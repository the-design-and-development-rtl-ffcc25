// uart_tx: debug serial transmitter.
//
// Sends one character per start request in the frame used by the debug
// port: a start bit (line low), 7 data bits least significant first, a
// parity bit and two stop bits (line high), each CLKS_PER_BIT clocks long.
// Parity is even (the number of ones in data plus parity is even), as in the
// example frame for ASCII 'A' where the parity bit is 0. The line idles high.
// start is taken only when busy is low; busy stays high for the 11 bit times
// of the frame.
//
// Follows the original design: start bit, 7 data bits, parity bit and two
// stop bits. Own choices: the bit rate (CLKS_PER_BIT, 115 200 baud at
// 100 MHz) and the request/busy handshake.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868,   // 115 200 baud at 100 MHz
  parameter int unsigned DATA_BITS    = 7
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [DATA_BITS-1:0] data,
  output logic                 txd,
  output logic                 busy
);
  localparam int unsigned FRAME_BITS = 1 + DATA_BITS + 1 + 2;

  logic [FRAME_BITS-1:0]           shreg;
  logic [$clog2(FRAME_BITS+1)-1:0] bits_left;
  logic [$clog2(CLKS_PER_BIT)-1:0] tick;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      tick      <= '0;
    end else if (bits_left == '0) begin
      if (start) begin
        // LSB is sent first: start bit, data, parity, two stop bits.
        shreg     <= {2'b11, ^data, data, 1'b0};
        bits_left <= $bits(bits_left)'(FRAME_BITS);
        tick      <= '0;
      end
    end else if (tick == $bits(tick)'(CLKS_PER_BIT - 1)) begin
      tick      <= '0;
      shreg     <= {1'b1, shreg[FRAME_BITS-1:1]};
      bits_left <= bits_left - 1'b1;
    end else begin
      tick <= tick + 1'b1;
    end
  end

  assign busy = bits_left != '0;
  assign txd  = busy ? shreg[0] : 1'b1;
endmodule
