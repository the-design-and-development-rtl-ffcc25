// radar_pkg: widths, register-frame layout and state encodings shared by the
// pulsed radar gateware.
//
// The ARM host writes one parameter frame over the 16-bit GPMC bus. Word
// offsets below are 16-bit word addresses from the start of the FPGA address
// space:
//   word 0      start/stop register (bit 0: 1 = run, 0 = stop)
//   words 1-2   PRI, low half first, in 100 MHz clock periods
//   words 3-4   receive delay, low half first, in 200 MHz clock periods
//   word 5      wave length, in 32-bit complex samples
//   words 6..   waveform, two words per sample: real part (bits 15:0) first,
//               then imaginary part (bits 31:16)
// The field order and sizes (2, 4, 4, 2 bytes, then the waveform) follow the
// frame layout of the design; the half-word order inside 32-bit fields and the
// meaning of bit 0 of the start/stop word are this implementation's choice.
package radar_pkg;

  // Register widths: PRI and delay counters are 32 bits, wave length 16 bits.
  localparam int unsigned PRI_W   = 32;
  localparam int unsigned DELAY_W = 32;
  localparam int unsigned LEN_W   = 16;
  localparam int unsigned SAMPLE_W = 32;
  localparam int unsigned PCOUNT_W = 16;

  // Largest pulse: 8096 complex 16-bit samples (32 384 bytes).
  localparam int unsigned WAVE_DEPTH = 8096;

  // GPMC-side Wishbone address: {cs number (3), A[10:1] (10), D[16:1] (16)},
  // a 16-bit word address.
  localparam int unsigned BUS_AW = 29;
  localparam int unsigned BUS_DW = 16;

  // Word offsets of the parameter frame.
  localparam logic [BUS_AW-1:0] ADDR_CTRL    = 'd0;
  localparam logic [BUS_AW-1:0] ADDR_PRI_LO  = 'd1;
  localparam logic [BUS_AW-1:0] ADDR_PRI_HI  = 'd2;
  localparam logic [BUS_AW-1:0] ADDR_DLY_LO  = 'd3;
  localparam logic [BUS_AW-1:0] ADDR_DLY_HI  = 'd4;
  localparam logic [BUS_AW-1:0] ADDR_LEN     = 'd5;
  localparam logic [BUS_AW-1:0] ADDR_WAVE    = 'd6;

  // Main control state machine (states 0 to 4 of the control flow chart).
  typedef enum logic [2:0] {
    FC_WAIT_START = 3'd0,  // wait for the start bit
    FC_CLAIM      = 3'd1,  // claim wave memory, buffer register values
    FC_ENABLE     = 3'd2,  // enable transmitting
    FC_WAIT_STOP  = 3'd3,  // wait for the stop bit
    FC_RELEASE    = 3'd4   // disable transmitting, free the bus
  } fc_state_t;

endpackage
