// wb_if: a classic single-transfer Wishbone bundle (cyc, stb, we, adr,
// dat_w, dat_r, ack). The slave answers a request with a one-cycle ack; the
// master holds cyc/stb/we/adr/dat_w steady until it sees ack. No bursts,
// no byte selects (every transfer is one full data word). rst only
// switches the handshake assertion off while the bus is being reset.
//
// Wishbone is the bus the original design uses between its blocks; the
// single-transfer subset and the assertion are this implementation's.
interface wb_if #(
  parameter int unsigned AW = 29,
  parameter int unsigned DW = 16
) (
  input logic clk,
  input logic rst
);
  logic          cyc;
  logic          stb;
  logic          we;
  logic [AW-1:0] adr;
  logic [DW-1:0] dat_w;
  logic [DW-1:0] dat_r;
  logic          ack;

  modport master (input clk, output cyc, stb, we, adr, dat_w, input dat_r, ack);
  modport slave  (input clk, input cyc, stb, we, adr, dat_w, output dat_r, ack);

  // A master must not change the request while it waits for ack.
  property p_hold;
    @(posedge clk) disable iff (rst) (cyc && stb && !ack) |=> (cyc && stb && $stable(adr) && $stable(we));
  endproperty
  a_hold: assert property (p_hold) else $error("wb_if: request changed before ack");
endinterface
