// gray_sync: carries a counter that steps by one into another clock domain.
// The count is converted to Gray code and registered in the source domain,
// passed through a two-flop synchroniser (only one bit changes per step, so
// every sampled value is a real count) and converted back to binary.
// The destination sees each value three destination edges late.
//
// A helper of this implementation, not a block of the original design.
module gray_sync #(
  parameter int unsigned W = 16
) (
  input  logic         src_clk,
  input  logic         src_rst,
  input  logic [W-1:0] src_count,
  input  logic         dst_clk,
  input  logic         dst_rst,
  output logic [W-1:0] dst_count
);
  logic [W-1:0] gray_src, gray_dst;

  always_ff @(posedge src_clk) begin
    if (src_rst) gray_src <= '0;
    else         gray_src <= src_count ^ (src_count >> 1);
  end

  sync_ff #(.W(W)) u_sync (.clk(dst_clk), .rst(dst_rst), .d(gray_src), .q(gray_dst));

  always_comb begin
    dst_count[W-1] = gray_dst[W-1];
    for (int i = int'(W) - 2; i >= 0; i--) dst_count[i] = dst_count[i+1] ^ gray_dst[i];
  end
endmodule
