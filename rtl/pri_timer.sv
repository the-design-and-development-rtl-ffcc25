// pri_timer: pulse repetition interval timer.
//
// While tx_enable is high a counter runs at the system clock (100 MHz); when
// it reaches the PRI value a one-cycle tx_trigger is produced and the count
// starts again, so triggers come exactly PRI clock periods apart (PRI = 50 000
// gives 500 us). The first trigger comes PRI periods after tx_enable rises,
// which leaves the front end time for any pre-pulse setup. When tx_enable is
// low the counter is held at zero and no triggers are produced.
//
// Following the design, the comparison is "reached or passed", so that if the
// PRI is lowered below the current count the next trigger fires at once.
// A PRI of 0 is treated as 1 (a trigger every cycle); that guard is this
// implementation's own choice.
module pri_timer #(
  parameter int unsigned PRI_W = radar_pkg::PRI_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tx_enable,
  input  logic [PRI_W-1:0] pri,
  output logic             tx_trigger
);
  logic [PRI_W-1:0] count;
  logic [PRI_W-1:0] goal;

  // Trigger when count+1 reaches PRI: count runs 0 .. PRI-1.
  assign goal = (pri == '0) ? '0 : pri - 1'b1;

  always_ff @(posedge clk) begin
    if (rst || !tx_enable) begin
      count      <= '0;
      tx_trigger <= 1'b0;
    end else if (count >= goal) begin
      count      <= '0;
      tx_trigger <= 1'b1;
    end else begin
      count      <= count + 1'b1;
      tx_trigger <= 1'b0;
    end
  end
endmodule
