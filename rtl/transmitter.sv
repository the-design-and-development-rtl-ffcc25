// transmitter: sends one stored pulse to the DAC side per transmit trigger.
//
// Idle until tx_trigger; then it reads wave_len samples from consecutive wave
// memory addresses 0, 1, 2, ... and presents them on dac_data with dac_valid
// high, one 32-bit complex sample (real part in bits 15:0, imaginary part in
// bits 31:16) per clock. The wave memory has a one-cycle read latency, so
// dac_valid rises one clock after the edge that samples tx_trigger and stays
// high for exactly
// wave_len cycles. Triggers that arrive while a pulse is being sent are
// ignored; a wave length of zero sends nothing. tx_active is high while the
// block is busy (the "transmitting" scope signal).
//
// Follows the original design: on a trigger, samples are read from
// sequential addresses until the wave length is reached, at 100 MHz.
// Own choices: the valid flag and the busy/started outputs.
module transmitter #(
  parameter int unsigned LEN_W  = radar_pkg::LEN_W,
  parameter int unsigned ADDR_W = $clog2(radar_pkg::WAVE_DEPTH),
  parameter int unsigned DW     = radar_pkg::SAMPLE_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              tx_trigger,
  input  logic [LEN_W-1:0]  wave_len,
  output logic [ADDR_W-1:0] wave_addr,
  input  logic [DW-1:0]     wave_data,
  output logic [DW-1:0]     dac_data,
  output logic              dac_valid,
  output logic              tx_active,
  output logic              tx_started
);
  logic             sending;
  logic [LEN_W-1:0] count;
  logic             rd_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      sending    <= 1'b0;
      count      <= '0;
      rd_valid   <= 1'b0;
      tx_started <= 1'b0;
    end else begin
      rd_valid   <= sending;
      tx_started <= 1'b0;
      if (!sending) begin
        count <= '0;
        if (tx_trigger && wave_len != '0) begin
          sending    <= 1'b1;
          tx_started <= 1'b1;
        end
      end else if (count == wave_len - 1'b1) begin
        sending <= 1'b0;
        count   <= '0;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

  assign wave_addr = ADDR_W'(count);
  assign dac_data  = rd_valid ? wave_data : '0;
  assign dac_valid = rd_valid;
  assign tx_active = sending | rd_valid;
endmodule
