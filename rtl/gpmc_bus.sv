// gpmc_bus: FPGA side of the ARM-FPGA bus (the ARM's General Purpose Memory
// Controller in multiplexed address/data mode).
//
// Everything is clocked by the bus clock that the GPMC drives. An access
// starts with one chip-select line (ncs, active low) and nadv low: the 10
// address pins and the 16 data pins together carry a 26-bit word address.
// The number of the asserted chip-select line is put in front of it, giving
// a 29-bit address, so that the address space seen on the FPGA is continuous
// and starts at zero. If nwe then goes low, the data pins are captured on
// the first clock edge with nwe low and written with one Wishbone write
// cycle. If noe goes low, one Wishbone read is issued on the first clock
// edge with noe low; the word is in the read register three clocks later and
// is driven onto the pins (d_out with d_oe) for as long as noe stays low.
// The ARM's GPMC read timing must therefore sample the data no earlier than
// the fourth rising edge after noe falls. Wishbone slaves must acknowledge
// within one clock for a write to finish before the next access.
// The chip-select prefix, the order {cs, A, D} of the address bits and the
// access-time rule are this implementation's choices.
//
// Follows the original design: latching the multiplexed address on nADV,
// adding three bits from the active chip select, and a Wishbone output.
// Departure: the original drives the data pins at all times except while nWE
// is low; here they are driven only while the FPGA is selected and nOE is
// low, which avoids driving against the ARM.
module gpmc_bus #(
  parameter int unsigned NCS = 8,
  parameter int unsigned AW  = 10,
  parameter int unsigned DW  = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] a,
  input  logic [DW-1:0] d_in,
  output logic [DW-1:0] d_out,
  output logic          d_oe,
  input  logic [NCS-1:0] ncs,
  input  logic          nadv,
  input  logic          nwe,
  input  logic          noe,
  wb_if.master          wb
);
  localparam int unsigned CSW = $clog2(NCS);

  logic           cs_active;
  logic [CSW-1:0] cs_num;
  logic [CSW+AW+DW-1:0] addr;
  logic [DW-1:0]  wr_data, rd_data;
  logic           rd_seen, wr_seen;
  logic           busy, busy_we;

  // Lowest-numbered asserted chip select wins (only one is low at a time).
  always_comb begin
    cs_active = 1'b0;
    cs_num    = '0;
    for (int i = NCS - 1; i >= 0; i--) begin
      if (!ncs[i]) begin
        cs_active = 1'b1;
        cs_num    = CSW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      addr    <= '0;
      wr_data <= '0;
      rd_data <= '0;
      wr_seen <= 1'b0;
      rd_seen <= 1'b0;
      busy    <= 1'b0;
      busy_we <= 1'b0;
    end else begin
      if (busy && wb.ack) begin
        busy <= 1'b0;
        if (!busy_we) rd_data <= wb.dat_r;
      end

      if (cs_active && !nadv) begin
        // address phase
        addr    <= {cs_num, a, d_in};
        wr_seen <= 1'b0;
        rd_seen <= 1'b0;
      end else if (!cs_active) begin
        wr_seen <= 1'b0;
        rd_seen <= 1'b0;
      end else if (!busy) begin
        if (!nwe && !wr_seen) begin
          // first clock edge of the data phase: one Wishbone write
          wr_data <= d_in;
          wr_seen <= 1'b1;
          busy    <= 1'b1;
          busy_we <= 1'b1;
        end else if (!noe && !rd_seen) begin
          // output enable seen: one Wishbone read into the read register
          rd_seen <= 1'b1;
          busy    <= 1'b1;
          busy_we <= 1'b0;
        end
      end
    end
  end

  assign wb.cyc   = busy;
  assign wb.stb   = busy;
  assign wb.we    = busy_we;
  assign wb.adr   = addr;
  assign wb.dat_w = wr_data;

  assign d_out = rd_data;
  assign d_oe  = cs_active && !noe;
endmodule
