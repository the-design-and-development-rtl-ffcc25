// control_block: top level of the pulsed radar gateware.
//
// The ARM host writes a parameter frame (start/stop, PRI, receive delay, wave
// length, waveform; layout in radar_pkg) over its GPMC memory bus. gpmc_bus
// turns the bus accesses into Wishbone cycles; param_regs keeps the
// registers and passes the waveform into wave_mem. When the run bit is set,
// flow_control claims the wave memory, copies the registers and enables
// transmitting. radar_block then fires a pulse every PRI (10 ns steps), sends
// the stored waveform to the DAC port, and after the receive delay (5 ns
// steps) captures the same number of ADC samples into the output FIFO.
// udp_tx packs the FIFO contents into UDP packets (16-bit pulse number plus
// 125 samples) for the Ethernet MAC; at the end of each received pulse it
// sends the rest of the buffer padded with zeros.
//
// Clock domains: gpmc_clk (bus side of the registers and wave memory),
// clk_100 (PRI timer, transmitter, flow control, debug UART), clk_200
// (receive delay), adc_clk (receiver, FIFO write side) and gige_clk (FIFO
// read side, UDP). rst is synchronous in every domain and must be held for
// at least four cycles of the slowest clock.
//
// Not in this module: the differential clock buffer and clock manager (the
// clocks arrive ready), the Ethernet MAC and PHY (the byte stream is brought
// out on mac_*), and the DAC/ADC mezzanine cards (dac_* and adc_data are
// brought out; for a loop-back test connect dac_data to adc_data). The GPMC
// data pins are split into d_in, d_out and d_oe for an external tri-state
// pad. A debug serial port (7 data bits, even parity, 2 stop bits) is
// brought out on uart_* with its character interface on dbg_*.
//
// Follows the original design: the control block as a container that wires
// the bus gateway, parameter registers, input memory, radar block, output
// FIFO and UDP block together and holds the start/stop state machine. Own
// choices: the clock-domain crossings for rx_done and the pulse count, and
// the debug port's character interface (the original only names the GPIO and
// LED debug pins, which are not included).
module control_block (
  input  logic        clk_100,
  input  logic        clk_200,
  input  logic        adc_clk,
  input  logic        gige_clk,
  input  logic        gpmc_clk,
  input  logic        rst,
  // ARM GPMC bus
  input  logic [9:0]  gpmc_a,
  input  logic [15:0] gpmc_d_in,
  output logic [15:0] gpmc_d_out,
  output logic        gpmc_d_oe,
  input  logic [7:0]  gpmc_ncs,
  input  logic        gpmc_nadv,
  input  logic        gpmc_nwe,
  input  logic        gpmc_noe,
  // DAC / ADC sample ports
  output logic [31:0] dac_data,
  output logic        dac_valid,
  input  logic [31:0] adc_data,
  // byte stream to the Gigabit Ethernet MAC
  output logic [7:0]  mac_data,
  output logic        mac_valid,
  output logic        mac_sof,
  output logic        mac_eof,
  input  logic        mac_ready,
  // debug serial port
  output logic        uart_txd,
  input  logic        uart_rxd,
  input  logic        dbg_tx_start,
  input  logic [6:0]  dbg_tx_char,
  output logic        dbg_tx_busy,
  output logic [6:0]  dbg_rx_char,
  output logic        dbg_rx_valid,
  output logic        dbg_rx_parity_err,
  output logic        dbg_rx_frame_err,
  // status
  output logic        tx_active,
  output logic        rx_active,
  output logic        tx_trigger,
  output logic        claim_mem,
  output logic        tx_enable,
  output logic [15:0] pulse_count,
  output logic        write_refused,
  output logic [2:0]  run_state,
  output logic        fifo_full,
  output logic        fifo_overflow,
  output logic        pkt_done,
  output logic        pkt_padded
);
  import radar_pkg::*;

  localparam int unsigned WAVE_AW = $clog2(WAVE_DEPTH);
  localparam int unsigned FIFO_DEPTH = 8192;
  localparam int unsigned FIFO_AW = $clog2(FIFO_DEPTH);

  // ---------------- ARM side (gpmc_clk) ----------------
  wb_if #(.AW(BUS_AW), .DW(BUS_DW)) wb_bus  (.clk(gpmc_clk), .rst);
  wb_if #(.AW(BUS_AW), .DW(BUS_DW)) wb_wave (.clk(gpmc_clk), .rst);

  logic               run;
  logic [PRI_W-1:0]   pri_reg, pri;
  logic [DELAY_W-1:0] delay_reg, delay;
  logic [LEN_W-1:0]   len_reg, wave_len;

  gpmc_bus u_gpmc (
    .clk(gpmc_clk), .rst, .a(gpmc_a), .d_in(gpmc_d_in), .d_out(gpmc_d_out),
    .d_oe(gpmc_d_oe), .ncs(gpmc_ncs), .nadv(gpmc_nadv), .nwe(gpmc_nwe),
    .noe(gpmc_noe), .wb(wb_bus.master)
  );

  param_regs u_regs (
    .rst, .s(wb_bus.slave), .m(wb_wave.master), .claim_mem_async(claim_mem),
    .run, .pri_reg, .delay_reg, .len_reg, .write_refused
  );

  logic [WAVE_AW-1:0] wave_addr;
  logic [31:0]        wave_data;

  wave_mem u_wave (
    .rst_a(rst), .wb(wb_wave.slave), .clk_b(clk_100), .addr_b(wave_addr),
    .q_b(wave_data)
  );

  // ---------------- radar (clk_100 / clk_200 / adc_clk) ----------------
  fc_state_t fc_state;

  flow_control u_flow (
    .clk(clk_100), .rst, .run_async(run), .pri_reg, .delay_reg, .len_reg,
    .claim_mem, .tx_enable, .pri, .delay, .wave_len, .state(fc_state)
  );

  logic        clk_out, we_out, last_out, rx_done;
  logic [31:0] rx_data;

  assign run_state = fc_state;

  radar_block u_radar (
    .clk_100, .clk_200, .clk_adc(adc_clk), .rst, .tx_enable, .pri, .delay,
    .wave_len, .wave_addr, .wave_data, .dac_data, .dac_valid, .adc_data,
    .clk_out, .we_out, .data_out(rx_data), .last_out, .rx_done, .pulse_count,
    .tx_trigger, .tx_active, .rx_active
  );

  // ---------------- output memory and UDP (gige_clk) ----------------
  logic               fifo_rd, fifo_empty;
  logic [31:0]        fifo_q;
  logic [FIFO_AW:0]   fifo_count;
  logic               flush_gige;
  logic [15:0]        pulse_no_gige;

  async_fifo #(.DW(32), .DEPTH(FIFO_DEPTH)) u_outmem (
    .wclk(clk_out), .wrst(rst), .wr_en(we_out), .wdata(rx_data),
    .wfull(fifo_full), .overflow(fifo_overflow),
    .rclk(gige_clk), .rrst(rst), .rd_en(fifo_rd), .rdata(fifo_q),
    .rempty(fifo_empty), .rcount(fifo_count)
  );

  // Rx_Done travels through four synchroniser stages, two more than the
  // FIFO's write pointer, so the flush never overtakes the last sample.
  pulse_sync #(.STAGES(4)) u_done_sync (
    .src_clk(clk_out), .src_rst(rst), .src_pulse(rx_done),
    .dst_clk(gige_clk), .dst_rst(rst), .dst_pulse(flush_gige)
  );

  gray_sync #(.W(16)) u_pnum_sync (
    .src_clk(clk_100), .src_rst(rst), .src_count(pulse_count),
    .dst_clk(gige_clk), .dst_rst(rst), .dst_count(pulse_no_gige)
  );

  udp_tx #(.FIFO_AW(FIFO_AW)) u_udp (
    .clk(gige_clk), .rst, .fifo_count, .fifo_rd, .fifo_data(fifo_q),
    .flush(flush_gige), .pulse_no(pulse_no_gige), .mac_data, .mac_valid,
    .mac_sof, .mac_eof, .mac_ready, .pkt_done, .pkt_padded
  );

  // ---------------- debug serial port (clk_100) ----------------
  uart_tx u_dbg_tx (
    .clk(clk_100), .rst, .start(dbg_tx_start), .data(dbg_tx_char),
    .txd(uart_txd), .busy(dbg_tx_busy)
  );

  uart_rx u_dbg_rx (
    .clk(clk_100), .rst, .rxd(uart_rxd), .data(dbg_rx_char),
    .valid(dbg_rx_valid), .parity_err(dbg_rx_parity_err),
    .frame_err(dbg_rx_frame_err)
  );
endmodule
