// sync_ff: two-flop synchroniser for a level signal (or a bus whose bits may
// be sampled independently, e.g. a Gray-coded count). The output follows the
// input two destination clock edges later. Reset clears both stages.
//
// A helper of this implementation, not a block of the original design.
module sync_ff #(
  parameter int unsigned W = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] stage [STAGES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < STAGES; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < STAGES; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[STAGES-1];
endmodule
