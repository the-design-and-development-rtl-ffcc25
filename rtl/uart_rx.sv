// uart_rx: debug serial receiver.
//
// Receives the same frame as uart_tx: it waits for a start bit (falling
// edge of the idle-high line), checks it again half a bit later, then
// samples the 7 data bits, the parity bit and the first stop bit in the
// middle of each bit time. At the end it pulses valid for one clock with the
// character on data; parity_err flags a parity mismatch (even parity) and
// frame_err a low stop bit. The input passes through a two-flop synchroniser.
//
// Follows the original design: the receiver waits for a start bit and uses
// the transmitter's frame. Own choices: the oversampling scheme, the error
// flags and the bit rate (CLKS_PER_BIT).
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned DATA_BITS    = 7
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 rxd,
  output logic [DATA_BITS-1:0] data,
  output logic                 valid,
  output logic                 parity_err,
  output logic                 frame_err
);
  typedef enum logic [1:0] {R_IDLE, R_START, R_BITS} rstate_t;
  rstate_t state;

  logic rx;
  logic [$clog2(CLKS_PER_BIT)-1:0] tick;
  logic [$clog2(DATA_BITS+3)-1:0]  nbit;
  logic [DATA_BITS+1:0]            shreg;  // data, parity, stop

  sync_ff #(.W(1)) u_sync (.clk, .rst, .d(rxd), .q(rx));

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= R_IDLE;
      tick       <= '0;
      nbit       <= '0;
      shreg      <= '0;
      data       <= '0;
      valid      <= 1'b0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        R_IDLE: begin
          tick <= '0;
          if (!rx) state <= R_START;
        end
        R_START: begin
          if (tick == $bits(tick)'(CLKS_PER_BIT / 2 - 1)) begin
            tick  <= '0;
            nbit  <= '0;
            state <= rx ? R_IDLE : R_BITS;   // glitch: back to idle
          end else begin
            tick <= tick + 1'b1;
          end
        end
        R_BITS: begin
          if (tick == $bits(tick)'(CLKS_PER_BIT - 1)) begin
            tick  <= '0;
            shreg <= {rx, shreg[DATA_BITS+1:1]};
            if (nbit == $bits(nbit)'(DATA_BITS + 1)) begin
              state      <= R_IDLE;
              valid      <= 1'b1;
              data       <= shreg[DATA_BITS:1];
              parity_err <= ^shreg[DATA_BITS+1:1];
              frame_err  <= !rx;
            end else begin
              nbit <= nbit + 1'b1;
            end
          end else begin
            tick <= tick + 1'b1;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
