// async_fifo: dual-clock FIFO used as the radar's output memory.
//
// The receiver writes samples on the ADC clock; the Ethernet block reads them
// on its own clock. Read and write pointers are kept in binary and Gray code;
// each side sees the other's Gray pointer through a two-flop synchroniser,
// so the flags are conservative: wfull may stay high, and rcount may stay
// low, for a few cycles after the other side moved. A write while full is
// dropped and reported on overflow (one pulse per lost word): this is how
// data is lost when pulses arrive faster than the network can empty the
// buffer. Reads have a one-cycle latency: rdata is valid the cycle after
// rd_en. rcount is the number of words the read side can see.
// DEPTH must be a power of two; the default 8192 words holds one full
// 8096-sample pulse. Each word is one 32-bit complex sample.
// Follows the original design: a dual-clock output buffer for one pulse of up
// to 8096 samples between the receiver and the Ethernet block. Own choices:
// the Gray-code pointer scheme, the depth rounded up from 8096 to 8192, the
// overflow flag and the read count used by the packet builder.
module async_fifo #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          wfull,
  output logic          overflow,

  input  logic          rclk,
  input  logic          rrst,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          rempty,
  output logic [AW:0]   rcount
);
  logic [DW-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_r, rgray_w;   // other side's Gray pointer, synchronised
  logic [AW:0] wbin_r, rbin_w;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  sync_ff #(.W(AW+1)) u_r2w (.clk(wclk), .rst(wrst), .d(rgray), .q(rgray_w));
  assign rbin_w = gray2bin(rgray_w);
  assign wfull  = (wbin - rbin_w) == (AW+1)'(DEPTH);

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin     <= '0;
      wgray    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && wfull;
      if (wr_en && !wfull) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  // ---------------- read side ----------------
  sync_ff #(.W(AW+1)) u_w2r (.clk(rclk), .rst(rrst), .d(wgray), .q(wgray_r));
  assign wbin_r = gray2bin(wgray_r);
  assign rcount = wbin_r - rbin;
  assign rempty = (rcount == '0);

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (rd_en && !rempty) begin
      rbin  <= rbin + 1'b1;
      rgray <= bin2gray(rbin + 1'b1);
    end
  end

  always_ff @(posedge rclk) begin
    if (rd_en && !rempty) rdata <= mem[rbin[AW-1:0]];
  end

  // Reading an empty FIFO is a protocol error of the reader.
  a_no_underflow: assert property (@(posedge rclk) disable iff (rrst) rd_en |-> !rempty)
    else $error("async_fifo: read while empty");
endmodule
