// tb_boot_4k_image: the largest program the setup has to hold, at default
// sizes. A processor model clocked by the generated 20 MHz clock writes a
// 4 KiB image into the emulated flash over SPI, 16 pages of 256 bytes, each
// after WRITE_ENABLE, and polls READ_STATUS after each page as a real flash
// driver would. It then boots the image back with one continuous READ from
// address 0 and compares every byte. The image is generated here, byte i =
// (i * 37 + (i >> 8) * 11) ^ 8'h5A, so it has no period shorter than a page.
// Also checks that the 4 KiB above the image kept their reset value of zero.
module tb_boot_4k_image;
  timeunit 1ns; timeprecision 1ps;

  localparam int IMG = 4096;

  logic clk_100 = 0, rst = 1, boot_init = 1;
  logic proc_clk, proc_rst;
  logic spi_sclk = 0, spi_scs_n = 1, spi_mosi = 0, spi_miso, spi_miso_oe;
  logic uart_tx_ready, uart_rx_valid, uart_rx_parity_err, uart_rx_frame_err, uart_txd;
  logic [7:0] uart_rx_data;
  int checks = 0, failures = 0;

  fpga_test_top dut (
    .clk_100, .rst, .boot_init, .proc_clk, .proc_rst,
    .spi_sclk, .spi_scs_n, .spi_mosi, .spi_miso, .spi_miso_oe,
    .uart_tx_data(8'h00), .uart_tx_valid(1'b0), .uart_tx_ready,
    .uart_rx_data, .uart_rx_valid, .uart_rx_parity_err, .uart_rx_frame_err,
    .uart_txd, .uart_rxd(1'b1));

  always #5 clk_100 = ~clk_100;

  initial begin
    #40ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0h exp=%0h at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [7:0] img(input int i);
    return 8'((i * 37 + (i >> 8) * 11)) ^ 8'h5A;
  endfunction

  task automatic xfer(input logic [7:0] tx, output logic [7:0] rx);
    for (int i = 7; i >= 0; i--) begin
      spi_mosi = tx[i];
      @(posedge proc_clk) spi_sclk = 1;
      rx[i] = spi_miso;
      @(posedge proc_clk) spi_sclk = 0;
    end
  endtask
  task automatic cs_low();  @(posedge proc_clk) spi_scs_n = 0; endtask
  task automatic cs_high(); @(posedge proc_clk) spi_scs_n = 1; repeat (3) @(posedge proc_clk); endtask
  task automatic header(input logic [7:0] c, input logic [23:0] a);
    logic [7:0] d;
    xfer(c, d); xfer(a[23:16], d); xfer(a[15:8], d); xfer(a[7:0], d);
  endtask

  int cyc = 0;
  always @(posedge proc_clk) cyc++;

  initial begin
    logic [7:0] d, s;
    int bad = 0, c0, c1;
    repeat (4) @(negedge clk_100);
    rst = 0;
    repeat (20) @(negedge clk_100);
    boot_init = 0;
    @(negedge proc_rst);
    // program 16 pages
    for (int p = 0; p < IMG / 256; p++) begin
      cs_low(); xfer(8'h06, d); cs_high();
      cs_low(); header(8'h02, 24'(p * 256));
      for (int k = 0; k < 256; k++) xfer(img(p * 256 + k), d);
      cs_high();
      cs_low(); xfer(8'h05, d); xfer(8'h00, s); cs_high();
      check(s, 8'h00, "status after page: not busy, WEL clear");
    end
    // boot read of image plus the following 4 KiB
    cs_low(); header(8'h03, 24'h0);
    c0 = cyc;
    for (int i = 0; i < 2 * IMG; i++) begin
      xfer(8'h00, d);
      check(d, (i < IMG) ? img(i) : 8'h00, "boot byte");
    end
    c1 = cyc;
    cs_high();
    $display("read %0d bytes in %0d processor clocks", 2 * IMG, c1 - c0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
