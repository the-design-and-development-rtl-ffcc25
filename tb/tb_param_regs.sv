// tb_param_regs: drives the register control block as a Wishbone master and
// checks the frame decoding (start/stop, PRI, delay and wave length halves),
// read-back, forwarding of waveform words to the wave memory with the frame
// offset removed, and that while the memory is claimed every write except
// the start/stop word is dropped and reported.
module tb_param_regs;
  import radar_pkg::*;
  logic clk = 0, rst = 1, claim = 0;
  logic run, write_refused;
  logic [31:0] pri_reg, delay_reg;
  logic [15:0] len_reg;
  int checks = 0, failures = 0, refused = 0;

  wb_if #(.AW(29), .DW(16)) s (.clk, .rst);
  wb_if #(.AW(29), .DW(16)) m (.clk, .rst);

  param_regs dut (.rst, .s(s.slave), .m(m.master), .claim_mem_async(claim),
                  .run, .pri_reg, .delay_reg, .len_reg, .write_refused);

  // wave memory stand-in: 16-bit words, ack one clock after the request
  logic [15:0] wmem [logic [28:0]];
  int n_wave_wr = 0;
  always_ff @(posedge clk) begin
    m.ack <= m.cyc && m.stb && !m.ack;
    if (m.cyc && m.stb && !m.ack) begin
      if (m.we) begin wmem[m.adr] = m.dat_w; n_wave_wr++; end
      else m.dat_r <= wmem.exists(m.adr) ? wmem[m.adr] : 16'hDEAD;
    end
  end

  always #6 clk = ~clk;
  always @(posedge clk) if (!rst && write_refused) refused++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic xfer(input bit we, input logic [28:0] adr, input logic [15:0] wd,
                      output logic [15:0] rd);
    int n = 0;
    @(negedge clk);
    s.cyc = 1; s.stb = 1; s.we = we; s.adr = adr; s.dat_w = wd;
    do begin @(posedge clk); #1; n++; end while (!s.ack && n < 10);
    check(n <= 2, $sformatf("ack after %0d clocks", n));
    rd = s.dat_r;
    @(posedge clk); #1;
    s.cyc = 0; s.stb = 0; s.we = 0;
  endtask

  initial begin
    logic [15:0] rd;
    s.cyc = 0; s.stb = 0; s.we = 0; s.adr = 0; s.dat_w = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // full frame: stop, PRI = 0x0001_86A0 (100 000), delay = 0x0000_0028, len = 930
    xfer(1, 0, 16'h0000, rd);
    xfer(1, 1, 16'h86A0, rd);
    xfer(1, 2, 16'h0001, rd);
    xfer(1, 3, 16'h0028, rd);
    xfer(1, 4, 16'h0000, rd);
    xfer(1, 5, 16'd930, rd);
    for (int k = 0; k < 8; k++) xfer(1, 29'(6 + k), 16'(16'h1000 + k), rd);
    check(!run, "run set by stop word");
    check(pri_reg == 32'd100000, $sformatf("PRI %0d", pri_reg));
    check(delay_reg == 32'd40, $sformatf("delay %0d", delay_reg));
    check(len_reg == 16'd930, $sformatf("len %0d", len_reg));
    for (int k = 0; k < 8; k++)
      check(wmem.exists(29'(k)) && wmem[29'(k)] == 16'(16'h1000 + k), $sformatf("wave word %0d", k));
    // read-back
    xfer(0, 1, 0, rd); check(rd == 16'h86A0, "read PRI low");
    xfer(0, 2, 0, rd); check(rd == 16'h0001, "read PRI high");
    xfer(0, 3, 0, rd); check(rd == 16'h0028, "read delay low");
    xfer(0, 5, 0, rd); check(rd == 16'd930, "read len");
    xfer(0, 6 + 3, 0, rd); check(rd == 16'h1003, "read wave word 3");
    xfer(0, 29'(6 + 2 * 8096), 0, rd); check(rd == 16'h0, "read beyond wave");
    // start, then claim: writes other than start/stop are refused
    xfer(1, 0, 16'h0001, rd);
    check(run, "run not set");
    claim = 1;
    repeat (3) @(posedge clk);
    xfer(1, 1, 16'h0005, rd);
    xfer(1, 5, 16'h0007, rd);
    xfer(1, 6, 16'hFFFF, rd);
    check(pri_reg == 32'd100000 && len_reg == 16'd930, "register changed while claimed");
    check(wmem[29'(0)] == 16'h1000, "wave changed while claimed");
    check(refused == 3, $sformatf("refused %0d writes, want 3", refused));
    xfer(0, 6, 0, rd); check(rd == 16'h1000, "wave readable while claimed");
    xfer(1, 0, 16'h0000, rd);
    check(!run, "stop refused while claimed");
    claim = 0;
    repeat (3) @(posedge clk);
    xfer(1, 2, 16'h0000, rd);
    check(pri_reg == 32'h86A0, "PRI high write after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
