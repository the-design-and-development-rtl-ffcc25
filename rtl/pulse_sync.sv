// pulse_sync: carries single-cycle event pulses from one clock domain to
// another. Each source pulse flips a toggle flop; the toggle passes through
// STAGES destination flops and every change seen at the end becomes one
// destination-cycle pulse. Latency is STAGES+1 destination edges. Source
// pulses must be at least STAGES+2 destination cycles apart to be counted
// separately; in this design triggers are a pulse repetition interval apart.
//
// A helper of this implementation, not a block of the original design.
module pulse_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);
  logic toggle;
  logic synced, synced_d;

  always_ff @(posedge src_clk) begin
    if (src_rst) toggle <= 1'b0;
    else if (src_pulse) toggle <= ~toggle;
  end

  sync_ff #(.W(1), .STAGES(STAGES)) u_sync (
    .clk(dst_clk), .rst(dst_rst), .d(toggle), .q(synced)
  );

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      synced_d  <= 1'b0;
      dst_pulse <= 1'b0;
    end else begin
      synced_d  <= synced;
      dst_pulse <= synced ^ synced_d;
    end
  end
endmodule
