// flow_control: the radar's main control state machine (states 0-4).
//
//   0 WAIT_START  wait until the start/stop register reads "run";
//   1 CLAIM       claim the wave memory (ARM writes are then refused) and
//                 copy PRI, delay and wave length into working registers;
//   2 ENABLE      raise tx_enable, which starts the PRI timer from zero;
//   3 WAIT_STOP   run until the start/stop register reads "stop";
//   4 RELEASE     drop tx_enable and free the memory, back to 0.
// The run bit comes from the bus clock domain and is synchronised here (two
// flops). The parameter registers are only sampled in state 1, two or more
// cycles after the run bit changed, when they are stable, so they need no
// further synchronisation. Buffering the values at start means that changes
// written while running take effect only at the next start.
//
// Follows the original design: the states (wait for start, claim memory and
// buffer the registers, enable transmitting, wait for stop, release) and
// their order. Own choices: the state encoding and the synchroniser.
module flow_control #(
  parameter int unsigned PRI_W   = radar_pkg::PRI_W,
  parameter int unsigned DELAY_W = radar_pkg::DELAY_W,
  parameter int unsigned LEN_W   = radar_pkg::LEN_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               run_async,
  input  logic [PRI_W-1:0]   pri_reg,
  input  logic [DELAY_W-1:0] delay_reg,
  input  logic [LEN_W-1:0]   len_reg,
  output logic               claim_mem,
  output logic               tx_enable,
  output logic [PRI_W-1:0]   pri,
  output logic [DELAY_W-1:0] delay,
  output logic [LEN_W-1:0]   wave_len,
  output radar_pkg::fc_state_t state
);
  import radar_pkg::*;

  logic run;

  sync_ff #(.W(1)) u_run_sync (.clk, .rst, .d(run_async), .q(run));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= FC_WAIT_START;
      claim_mem <= 1'b0;
      tx_enable <= 1'b0;
      pri       <= '0;
      delay     <= '0;
      wave_len  <= '0;
    end else begin
      unique case (state)
        FC_WAIT_START: if (run) state <= FC_CLAIM;
        FC_CLAIM: begin
          claim_mem <= 1'b1;
          pri       <= pri_reg;
          delay     <= delay_reg;
          wave_len  <= len_reg;
          state     <= FC_ENABLE;
        end
        FC_ENABLE: begin
          tx_enable <= 1'b1;
          state     <= FC_WAIT_STOP;
        end
        FC_WAIT_STOP: if (!run) state <= FC_RELEASE;
        FC_RELEASE: begin
          tx_enable <= 1'b0;
          claim_mem <= 1'b0;
          state     <= FC_WAIT_START;
        end
        default: state <= FC_WAIT_START;
      endcase
    end
  end
endmodule
