// tb_gpmc_bus: connects the GPMC bus block to a Wishbone memory model and
// drives it with GPMC write and read accesses on several chip selects.
// Checks that the Wishbone address is {cs number, A, D}, that each write
// produces exactly one Wishbone write with the bus data, that reads return
// the stored word on the data pins with the output enable active only while
// noe is low.
module tb_gpmc_bus;
  logic clk = 0, rst = 1;
  logic [9:0] a;
  logic [15:0] d_in, d_out;
  logic d_oe;
  logic [7:0] ncs;
  logic nadv, nwe, noe;
  int checks = 0, failures = 0;

  wb_if #(.AW(29), .DW(16)) wb (.clk, .rst);
  gpmc_bus dut (.clk, .rst, .a, .d_in, .d_out, .d_oe, .ncs, .nadv, .nwe, .noe,
                .wb(wb.master));
  gpmc_host host (.clk, .a, .d(d_in), .ncs, .nadv, .nwe, .noe,
                  .fpga_d(d_out), .fpga_d_oe(d_oe));

  always #6 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Wishbone memory model with a one-clock ack
  logic [15:0] mem [logic [28:0]];
  int n_wr = 0;
  logic [28:0] last_wr_adr;
  always_ff @(posedge clk) begin
    wb.ack <= wb.cyc && wb.stb && !wb.ack;
    if (wb.cyc && wb.stb && !wb.ack) begin
      if (wb.we) begin mem[wb.adr] = wb.dat_w; n_wr++; last_wr_adr = wb.adr; end
      else wb.dat_r <= mem.exists(wb.adr) ? mem[wb.adr] : 16'h0000;
    end
  end

  // the data pins are driven only during a read
  always @(posedge clk) if (!rst) begin
    if (d_oe && noe) begin failures++; $display("FAIL: d_oe without noe"); end
  end

  initial begin
    static logic [28:0] adrs[] = '{29'h0, 29'h1, 29'h5, 29'h3FF_FFFF, 29'h400_0000 | 29'h123,
                            29'h1C00_0000 | 29'h2_0001, 29'h0ABC_DEF};
    logic [15:0] rd;
    bit drv;
    int n_prev;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    foreach (adrs[i]) begin
      n_prev = n_wr;
      host.write16(adrs[i], 16'(16'hC000 + i * 17));
      repeat (2) @(posedge clk);
      check(n_wr == n_prev + 1, $sformatf("write %0d: %0d wishbone writes", i, n_wr - n_prev));
      check(last_wr_adr == adrs[i], $sformatf("write %0d: address %h want %h", i, last_wr_adr, adrs[i]));
      check(mem.exists(adrs[i]) && mem[adrs[i]] == 16'(16'hC000 + i * 17), $sformatf("write %0d data", i));
    end
    foreach (adrs[i]) begin
      n_prev = n_wr;
      host.read16(adrs[i], rd, drv);
      check(drv, $sformatf("read %0d: data pins not driven", i));
      check(rd == 16'(16'hC000 + i * 17), $sformatf("read %0d: %h", i, rd));
      check(n_wr == n_prev, "read caused a write");
    end
    // back-to-back write then read of the same address
    host.write16(29'h42, 16'h5AA5);
    host.read16(29'h42, rd, drv);
    check(rd == 16'h5AA5, "read after write");
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
