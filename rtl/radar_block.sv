// radar_block: the core pulsed-radar timing and data path.
//
// Holds the four radar functions and the pulse counter:
//   pri_timer   (100 MHz)  produces a transmit trigger every PRI periods while
//                          tx_enable is high;
//   transmitter (100 MHz)  sends the stored pulse to the DAC on each trigger;
//   rx_delay    (200 MHz)  is started by the same trigger and, after the delay
//                          value in 5 ns steps, produces the receive trigger;
//   receiver    (ADC clock) then captures wave_len ADC samples for the output
//                          memory.
// The transmit trigger crosses into the 200 MHz domain and the receive
// trigger into the ADC clock domain through toggle synchronisers; each
// crossing adds three destination cycles, so the time from the transmit
// trigger to the first captured sample is the programmed delay plus a small
// fixed offset (about 30 ns with 100 MHz and 200 MHz clocks).
// pulse_count is a 16-bit count of pulses sent, cleared when transmitting is
// enabled; it is used to number the output packets. clk_out forwards the ADC
// clock that writes the output memory.
// tx_enable, pri, delay and wave_len must be stable while running; the flow
// controller guarantees that by buffering them at start.
//
// Follows the original design: the four functions (PRI timer, transmitter,
// receive delay, receiver), the 100 MHz / 200 MHz / ADC clocking, the
// separate output clock and the 16-bit pulse counter. Own choices: the
// pulse synchronisers between the clock domains.
module radar_block #(
  parameter int unsigned PRI_W    = radar_pkg::PRI_W,
  parameter int unsigned DELAY_W  = radar_pkg::DELAY_W,
  parameter int unsigned LEN_W    = radar_pkg::LEN_W,
  parameter int unsigned ADDR_W   = $clog2(radar_pkg::WAVE_DEPTH),
  parameter int unsigned DW       = radar_pkg::SAMPLE_W,
  parameter int unsigned PCOUNT_W = radar_pkg::PCOUNT_W
) (
  input  logic                clk_100,
  input  logic                clk_200,
  input  logic                clk_adc,
  input  logic                rst,
  input  logic                tx_enable,
  input  logic [PRI_W-1:0]    pri,
  input  logic [DELAY_W-1:0]  delay,
  input  logic [LEN_W-1:0]    wave_len,
  output logic [ADDR_W-1:0]   wave_addr,
  input  logic [DW-1:0]       wave_data,
  output logic [DW-1:0]       dac_data,
  output logic                dac_valid,
  input  logic [DW-1:0]       adc_data,
  output logic                clk_out,
  output logic                we_out,
  output logic [DW-1:0]       data_out,
  output logic                last_out,
  output logic                rx_done,
  output logic [PCOUNT_W-1:0] pulse_count,
  output logic                tx_trigger,
  output logic                tx_active,
  output logic                rx_active
);
  logic tx_started;
  logic tx_trigger_200, rx_trigger_200, rx_trigger_adc;
  logic enable_200, enable_200_d, clear_200;
  logic tx_enable_d;

  pri_timer #(.PRI_W(PRI_W)) u_pri (
    .clk(clk_100), .rst, .tx_enable, .pri, .tx_trigger
  );

  transmitter #(.LEN_W(LEN_W), .ADDR_W(ADDR_W), .DW(DW)) u_tx (
    .clk(clk_100), .rst, .tx_trigger, .wave_len, .wave_addr, .wave_data,
    .dac_data, .dac_valid, .tx_active, .tx_started
  );

  sync_ff #(.W(1)) u_en_sync (
    .clk(clk_200), .rst, .d(tx_enable), .q(enable_200)
  );

  pulse_sync u_txtrig_sync (
    .src_clk(clk_100), .src_rst(rst), .src_pulse(tx_trigger),
    .dst_clk(clk_200), .dst_rst(rst), .dst_pulse(tx_trigger_200)
  );

  // The delay timer is cleared when transmitting is enabled (start).
  always_ff @(posedge clk_200) begin
    if (rst) enable_200_d <= 1'b0;
    else     enable_200_d <= enable_200;
  end
  assign clear_200 = enable_200 && !enable_200_d;

  rx_delay #(.DELAY_W(DELAY_W)) u_delay (
    .clk(clk_200), .rst, .clear(clear_200), .tx_trigger(tx_trigger_200),
    .delay, .rx_trigger(rx_trigger_200)
  );

  pulse_sync u_rxtrig_sync (
    .src_clk(clk_200), .src_rst(rst), .src_pulse(rx_trigger_200),
    .dst_clk(clk_adc), .dst_rst(rst), .dst_pulse(rx_trigger_adc)
  );

  receiver #(.LEN_W(LEN_W), .DW(DW)) u_rx (
    .clk(clk_adc), .rst, .rx_trigger(rx_trigger_adc), .wave_len, .adc_data,
    .we_out, .data_out, .last_out, .rx_done, .rx_active
  );

  // Pulse counter: cleared on the rising edge of tx_enable (start), then
  // counts every pulse whose transmission begins.
  always_ff @(posedge clk_100) begin
    if (rst) begin
      tx_enable_d <= 1'b0;
      pulse_count <= '0;
    end else begin
      tx_enable_d <= tx_enable;
      if (tx_enable && !tx_enable_d) pulse_count <= '0;
      else if (tx_started)           pulse_count <= pulse_count + 1'b1;
    end
  end

  assign clk_out = clk_adc;
endmodule
