// tb_wave_mem: writes half-words through the Wishbone port, reads them back
// there, reads whole 32-bit samples on the radar port (one-cycle latency)
// and checks the real/imaginary placement and out-of-range handling.
module tb_wave_mem;
  logic clk_a = 0, clk_b = 0, rst = 1;
  logic [12:0] addr_b = 0;
  logic [31:0] q_b;
  int checks = 0, failures = 0;

  wb_if #(.AW(29), .DW(16)) wb (.clk(clk_a), .rst);
  wave_mem dut (.rst_a(rst), .wb(wb.slave), .clk_b, .addr_b, .q_b);

  always #6 clk_a = ~clk_a;
  always #5 clk_b = ~clk_b;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wb_xfer(input bit we, input logic [28:0] adr, input logic [15:0] wd,
                         output logic [15:0] rd);
    int n = 0;
    @(negedge clk_a);
    wb.cyc = 1; wb.stb = 1; wb.we = we; wb.adr = adr; wb.dat_w = wd;
    do begin @(posedge clk_a); #1; n++; end while (!wb.ack && n < 10);
    check(n == 1, $sformatf("ack after %0d clocks", n));
    rd = wb.dat_r;
    @(posedge clk_a); #1;            // transfer ends at the edge that samples ack
    wb.cyc = 0; wb.stb = 0; wb.we = 0;
  endtask

  function automatic logic [31:0] pat(int k);
    return {16'(k * 3 + 1), 16'(k ^ 16'h1234)};
  endfunction

  initial begin
    logic [15:0] rd;
    int idx[] = '{0, 1, 2, 100, 4095, 8094, 8095};
    wb.cyc = 0; wb.stb = 0; wb.we = 0; wb.adr = 0; wb.dat_w = 0;
    repeat (3) @(posedge clk_a);
    #1 rst = 0;
    foreach (idx[i]) begin
      wb_xfer(1, 29'(2 * idx[i]),     pat(idx[i])[15:0],  rd);
      wb_xfer(1, 29'(2 * idx[i] + 1), pat(idx[i])[31:16], rd);
    end
    foreach (idx[i]) begin
      wb_xfer(0, 29'(2 * idx[i] + 1), 16'h0, rd);
      check(rd == pat(idx[i])[31:16], $sformatf("bus read imag %0d", idx[i]));
      wb_xfer(0, 29'(2 * idx[i]), 16'h0, rd);
      check(rd == pat(idx[i])[15:0], $sformatf("bus read real %0d", idx[i]));
    end
    // rewrite only the imaginary half of sample 100
    wb_xfer(1, 29'(201), 16'hBEEF, rd);
    // radar port
    foreach (idx[i]) begin
      @(negedge clk_b) addr_b = 13'(idx[i]);
      @(posedge clk_b); #1;
      check(q_b == (idx[i] == 100 ? {16'hBEEF, pat(100)[15:0]} : pat(idx[i])),
            $sformatf("radar read %0d: %h", idx[i], q_b));
    end
    // beyond the memory: reads zero, writes ignored
    wb_xfer(1, 29'(2 * 8096), 16'hFFFF, rd);
    wb_xfer(0, 29'(2 * 8096), 16'h0, rd);
    check(rd == 0, "out-of-range read");
    wb_xfer(0, 29'(0), 16'h0, rd);
    check(rd == pat(0)[15:0], "out-of-range write wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk_a);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
