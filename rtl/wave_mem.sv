// wave_mem: dual-clock block RAM holding the transmit waveform.
//
// Port A is a Wishbone slave on the bus clock with 16-bit words: half-word
// address 2k+0 is the real part (bits 15:0) of sample k, 2k+1 the imaginary
// part (bits 31:16). Reads and writes are acknowledged one clock after the
// request; addresses beyond the memory read zero and ignore writes. Port B is
// a 32-bit read port on the radar clock with a one-cycle read latency, used
// by the transmitter. DEPTH defaults to 8096 samples (32 384 bytes), the
// longest pulse the radar must send.
//
// Follows the original design: a dual-port block RAM behind a Wishbone
// wrapper, 16-bit writes from the bus clock and 32-bit reads at 100 MHz.
// Own choices: the half-word address mapping and the out-of-range rule.
module wave_mem #(
  parameter int unsigned DEPTH  = radar_pkg::WAVE_DEPTH,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              rst_a,
  wb_if.slave               wb,
  input  logic              clk_b,
  input  logic [ADDR_W-1:0] addr_b,
  output logic [31:0]       q_b
);
  logic [31:0] mem [DEPTH];

  logic [ADDR_W:0]   hw_addr;
  logic [ADDR_W-1:0] word;
  logic              upper, in_range, req;

  assign hw_addr  = wb.adr[ADDR_W:0];
  assign word     = hw_addr[ADDR_W:1];
  assign upper    = hw_addr[0];
  assign in_range = (wb.adr >> (ADDR_W + 1)) == 0 && 32'(word) < DEPTH;
  assign req      = wb.cyc && wb.stb && !wb.ack;

  always_ff @(posedge wb.clk) begin
    if (rst_a) begin
      wb.ack   <= 1'b0;
      wb.dat_r <= '0;
    end else begin
      wb.ack <= req;
      if (req) begin
        if (!in_range)  wb.dat_r <= '0;
        else if (upper) wb.dat_r <= mem[word][31:16];
        else            wb.dat_r <= mem[word][15:0];
      end
    end
  end

  always_ff @(posedge wb.clk) begin
    if (req && wb.we && in_range) begin
      if (upper) mem[word][31:16] <= wb.dat_w;
      else       mem[word][15:0]  <= wb.dat_w;
    end
  end

  always_ff @(posedge clk_b) begin
    q_b <= mem[addr_b];
  end
endmodule
