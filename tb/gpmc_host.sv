// gpmc_host: testbench stand-in for the ARM's General Purpose Memory
// Controller in multiplexed address/data mode. write16/read16 perform one
// 16-bit access to a 29-bit word address {cs number, A[10:1], D[16:1]}:
// chip select and nadv low for one clock with the address on the pins, then
// for a write nwe low for two clocks with the data on the pins, or for a
// read noe low for five clocks, the data being taken from the FPGA on the
// fifth rising edge. Signals change on the falling edge of the bus clock.
module gpmc_host (
  input  logic        clk,
  output logic [9:0]  a,
  output logic [15:0] d,
  output logic [7:0]  ncs,
  output logic        nadv,
  output logic        nwe,
  output logic        noe,
  input  logic [15:0] fpga_d,
  input  logic        fpga_d_oe
);
  initial begin
    a = '0; d = '0; ncs = '1; nadv = 1; nwe = 1; noe = 1;
  end

  task automatic addr_phase(input logic [28:0] adr);
    @(negedge clk);
    ncs = ~(8'd1 << adr[28:26]);
    nadv = 0;
    a = adr[25:16];
    d = adr[15:0];
    @(negedge clk);
    nadv = 1;
  endtask

  task automatic write16(input logic [28:0] adr, input logic [15:0] data);
    addr_phase(adr);
    d = data;
    nwe = 0;
    repeat (2) @(negedge clk);
    nwe = 1;
    ncs = '1;
    @(negedge clk);
  endtask

  task automatic read16(input logic [28:0] adr, output logic [15:0] data,
                        output bit driven);
    addr_phase(adr);
    d = 'x;
    noe = 0;
    repeat (5) @(posedge clk);
    data = fpga_d;
    driven = fpga_d_oe;
    @(negedge clk);
    noe = 1;
    ncs = '1;
    @(negedge clk);
  endtask
endmodule
