// receiver: captures one pulse from the ADC side per receive trigger.
//
// Runs on the ADC clock. Idle until rx_trigger; from the next clock on it
// takes adc_data on each of wave_len consecutive cycles and writes it to the
// output memory (we_out, data_out). The last sample of the pulse is marked
// with last_out, and rx_done pulses one cycle later to tell the Ethernet
// side that the pulse is complete, so a partly filled packet can be sent
// instead of waiting for more data. Triggers during a capture are ignored.
// rx_active is high while capturing (the "receiving" scope signal).
//
// Follows the original design: the idle/capture state machine started by the
// receive trigger, capturing wave-length samples, and the Rx_Done flag.
// Own choices: last_out and the one-cycle timing of rx_done.
module receiver #(
  parameter int unsigned LEN_W = radar_pkg::LEN_W,
  parameter int unsigned DW    = radar_pkg::SAMPLE_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             rx_trigger,
  input  logic [LEN_W-1:0] wave_len,
  input  logic [DW-1:0]    adc_data,
  output logic             we_out,
  output logic [DW-1:0]    data_out,
  output logic             last_out,
  output logic             rx_done,
  output logic             rx_active
);
  logic             capturing;
  logic [LEN_W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      capturing <= 1'b0;
      count     <= '0;
      we_out    <= 1'b0;
      data_out  <= '0;
      last_out  <= 1'b0;
      rx_done   <= 1'b0;
    end else begin
      we_out   <= 1'b0;
      last_out <= 1'b0;
      rx_done  <= last_out & we_out;
      if (!capturing) begin
        count <= '0;
        if (rx_trigger && wave_len != '0) capturing <= 1'b1;
      end else begin
        we_out   <= 1'b1;
        data_out <= adc_data;
        if (count == wave_len - 1'b1) begin
          last_out  <= 1'b1;
          capturing <= 1'b0;
          count     <= '0;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

  assign rx_active = capturing;
endmodule
