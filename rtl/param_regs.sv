// param_regs: the radar's register control (parameter frame decoder).
//
// A Wishbone slave on the bus clock that maps the parameter frame (see
// radar_pkg) onto registers: word 0 start/stop (bit 0 = run), words 1-2 PRI,
// 3-4 receive delay, 5 wave length, and from word 6 on the waveform, which is
// passed on to the wave memory through a second Wishbone port (half-word
// address = word - 6). Because the frame is written from word 0 upward, a
// one-word write only touches start/stop, and a short frame updates only the
// leading parameters.
// While claim_mem is high (the radar is running) every write except to the
// start/stop word is acknowledged but dropped, so neither the waveform nor
// the parameters can change under a running pulse; the stop command can
// still be written. write_refused pulses for each dropped write. Reads return
// the stored values; unmapped addresses read zero. Register accesses are
// acknowledged one clock after the request, waveform accesses when the wave
// memory acknowledges. claim_mem comes from the radar clock domain and is
// synchronised here.
//
// Follows the original design: the frame layout and the rule that the ARM
// may not change the waveform while the radar runs. Own choice: in the
// original, claiming the memory turns the bus's data pins to output, so the
// bus becomes read-only; here writes are dropped instead, except to the
// start/stop word, so that the stop command can always be given.
module param_regs #(
  parameter int unsigned PRI_W   = radar_pkg::PRI_W,
  parameter int unsigned DELAY_W = radar_pkg::DELAY_W,
  parameter int unsigned LEN_W   = radar_pkg::LEN_W,
  parameter int unsigned DEPTH   = radar_pkg::WAVE_DEPTH
) (
  input  logic               rst,
  wb_if.slave                s,
  wb_if.master               m,
  input  logic               claim_mem_async,
  output logic               run,
  output logic [PRI_W-1:0]   pri_reg,
  output logic [DELAY_W-1:0] delay_reg,
  output logic [LEN_W-1:0]   len_reg,
  output logic               write_refused
);
  import radar_pkg::*;

  logic              claimed;
  logic              is_reg, is_wave, fwd, req_l;
  logic [BUS_AW-1:0] wave_off;
  logic              ack_l;
  logic [15:0]       rdata_l;
  logic [31:0]       pri32, dly32;

  sync_ff #(.W(1)) u_claim_sync (
    .clk(s.clk), .rst, .d(claim_mem_async), .q(claimed)
  );

  assign is_reg   = s.adr < ADDR_WAVE;
  assign wave_off = s.adr - ADDR_WAVE;
  assign is_wave  = !is_reg && wave_off < BUS_AW'(2 * DEPTH);
  // Forward to the wave memory unless it is a write refused by the claim.
  assign fwd      = is_wave && !(s.we && claimed);
  assign req_l    = s.cyc && s.stb && !fwd && !ack_l;

  assign m.cyc   = s.cyc && fwd;
  assign m.stb   = s.stb && fwd;
  assign m.we    = s.we;
  assign m.adr   = wave_off;
  assign m.dat_w = s.dat_w;

  assign s.ack   = fwd ? m.ack   : ack_l;
  assign s.dat_r = fwd ? m.dat_r : rdata_l;

  assign pri32 = 32'(pri_reg);
  assign dly32 = 32'(delay_reg);

  always_ff @(posedge s.clk) begin
    if (rst) begin
      ack_l         <= 1'b0;
      rdata_l       <= '0;
      run           <= 1'b0;
      pri_reg       <= '0;
      delay_reg     <= '0;
      len_reg       <= '0;
      write_refused <= 1'b0;
    end else begin
      ack_l         <= req_l;
      write_refused <= 1'b0;
      if (req_l) begin
        if (s.we) begin
          if (claimed && s.adr != ADDR_CTRL) begin
            write_refused <= 1'b1;
          end else begin
            unique case (s.adr)
              ADDR_CTRL:   run       <= s.dat_w[0];
              ADDR_PRI_LO: pri_reg   <= PRI_W'({pri32[31:16], s.dat_w});
              ADDR_PRI_HI: pri_reg   <= PRI_W'({s.dat_w, pri32[15:0]});
              ADDR_DLY_LO: delay_reg <= DELAY_W'({dly32[31:16], s.dat_w});
              ADDR_DLY_HI: delay_reg <= DELAY_W'({s.dat_w, dly32[15:0]});
              ADDR_LEN:    len_reg   <= LEN_W'(s.dat_w);
              default: ;
            endcase
          end
        end else begin
          unique case (s.adr)
            ADDR_CTRL:   rdata_l <= {15'd0, run};
            ADDR_PRI_LO: rdata_l <= pri32[15:0];
            ADDR_PRI_HI: rdata_l <= pri32[31:16];
            ADDR_DLY_LO: rdata_l <= dly32[15:0];
            ADDR_DLY_HI: rdata_l <= dly32[31:16];
            ADDR_LEN:    rdata_l <= 16'(len_reg);
            default:     rdata_l <= '0;
          endcase
        end
      end
    end
  end
endmodule
