// tb_boot_loader: runs the boot loader at its default sizes (8 KiB memory,
// 100 MHz -> 20 MHz clock, default boot image) with a model of the
// processor's SPI master clocked by the generated processor clock (SCLK is
// that clock divided by two, 10 MHz).
//
// Checked: the processor clock period is 50 ns; the processor stays in reset
// while boot_init is high and leaves it after boot_init falls; a READ from
// address 0 returns the four words of the boot image (written out here) and
// zeros after them; WRITE_ENABLE + PAGE_PROGRAM into the second half of the
// memory followed by a READ returns the written bytes; READ_STATUS returns
// the write enable latch.
module tb_boot_loader;
  timeunit 1ns; timeprecision 1ps;

  logic clk_100 = 0, rst = 1, boot_init = 1;
  logic clk_proc, processor_rst;
  logic sclk = 0, scs_n = 1, mosi = 0, miso, miso_oe;
  int checks = 0, failures = 0;

  boot_loader dut (.clk_100, .rst, .boot_init, .clk_proc, .processor_rst,
                   .sclk, .scs_n, .mosi, .miso, .miso_oe);

  always #5 clk_100 = ~clk_100;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic xfer(input logic [7:0] tx, output logic [7:0] rx);
    for (int i = 7; i >= 0; i--) begin
      mosi = tx[i];
      @(posedge clk_proc) sclk = 1;
      rx[i] = miso;
      @(posedge clk_proc) sclk = 0;
    end
  endtask
  task automatic cs_low();  @(posedge clk_proc) scs_n = 0; endtask
  task automatic cs_high(); @(posedge clk_proc) scs_n = 1; repeat (3) @(posedge clk_proc); endtask
  task automatic header(input logic [7:0] c, input logic [23:0] a);
    logic [7:0] d;
    xfer(c, d); xfer(a[23:16], d); xfer(a[15:8], d); xfer(a[7:0], d);
  endtask

  localparam logic [31:0] IMAGE [4] = '{32'h00100093, 32'h00000113, 32'h00110133, 32'hffdff06f};

  initial begin
    logic [7:0] d, s;
    logic [31:0] w;
    logic [7:0] pb [6];
    realtime t0;
    repeat (4) @(negedge clk_100);
    rst = 0;
    // processor clock
    @(posedge clk_proc); t0 = $realtime;
    @(posedge clk_proc);
    checks++;
    if ($realtime - t0 != 50.0) begin
      failures++; $display("FAIL processor clock period %0.1f", $realtime - t0);
    end
    repeat (20) @(posedge clk_proc);
    check(processor_rst, 1, "held in reset by boot_init");
    boot_init = 0;
    repeat (10) @(posedge clk_proc);
    check(processor_rst, 0, "reset released");
    // boot read
    cs_low();
    header(8'h03, 24'h0);
    for (int k = 0; k < 8; k++) begin
      for (int b = 0; b < 4; b++) begin xfer(8'h00, d); w = {w[23:0], d}; end
      check(w, (k < 4) ? IMAGE[k] : 32'h0, "boot image word");
    end
    cs_high();
    // write enable, status, program, read back
    cs_low(); xfer(8'h06, d); cs_high();
    cs_low(); xfer(8'h05, d); xfer(8'h00, s); cs_high();
    check(s, 8'h02, "status WEL");
    foreach (pb[k]) pb[k] = 8'($urandom);
    cs_low(); header(8'h02, 24'h1001);
    foreach (pb[k]) xfer(pb[k], d);
    cs_high();
    cs_low(); header(8'h03, 24'h1000);
    xfer(8'h00, d); check(d, 8'h00, "byte before programmed ones");
    foreach (pb[k]) begin xfer(8'h00, d); check(d, pb[k], "programmed byte"); end
    cs_high();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
