// tb_fpga_test_top: end-to-end run of the FPGA test setup at its default
// sizes (no parameter overrides). A behavioural model of the microcontroller
// (the device under test) is written into this testbench: clocked by the
// 20 MHz processor clock the setup generates, it waits for its reset to be
// released, boots by reading its program over SPI (SCLK = 10 MHz), uses the
// flash as data memory (write enable, page program, status, read back), and
// then sends a "Hello" message through the UART port, whose serial output is
// looped back into the UART receiver as a PC terminal would echo it. One
// frame with a wrong parity bit and one with a low stop bit are injected.
//
// Every mechanism of the setup is counted, and one that never happened is a
// failure: boot held by boot_init, reset release, FSM MOSI_Mode -> MISO_Mode
// and back, memory word fetches on word boundaries, byte writes, a program
// refused without write enable, a page wrap, a status read, UART frames sent
// and received, and both receive error flags.
module tb_fpga_test_top;
  timeunit 1ns; timeprecision 1ps;
  import flash_pkg::*;

  logic clk_100 = 0, rst = 1, boot_init = 1;
  logic proc_clk, proc_rst;
  logic spi_sclk = 0, spi_scs_n = 1, spi_mosi = 0, spi_miso, spi_miso_oe;
  logic [7:0] uart_tx_data = '0;
  logic uart_tx_valid = 0, uart_tx_ready;
  logic [7:0] uart_rx_data;
  logic uart_rx_valid, uart_rx_parity_err, uart_rx_frame_err;
  logic uart_txd, uart_rxd;
  logic inject = 0, inject_line = 1;
  int checks = 0, failures = 0;

  fpga_test_top dut (
    .clk_100, .rst, .boot_init, .proc_clk, .proc_rst,
    .spi_sclk, .spi_scs_n, .spi_mosi, .spi_miso, .spi_miso_oe,
    .uart_tx_data, .uart_tx_valid, .uart_tx_ready,
    .uart_rx_data, .uart_rx_valid, .uart_rx_parity_err, .uart_rx_frame_err,
    .uart_txd, .uart_rxd);

  assign uart_rxd = inject ? inject_line : uart_txd;

  always #5 clk_100 = ~clk_100;

  initial begin
    #20ms;
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

  // ---------------------------------------------------- mechanism counters
  int n_boot_hold = 0, n_rst_release = 0, n_to_miso = 0, n_to_mosi = 0;
  int n_fetch = 0, n_write = 0, n_refused = 0, n_wrap = 0, n_status = 0;
  int n_tx = 0, n_rx = 0, n_par_err = 0, n_frm_err = 0;

  always @(posedge clk_100) if (!rst) begin
    if (boot_init && proc_rst) n_boot_hold++;
    if ($fell(proc_rst)) n_rst_release++;
    if (dut.u_booter.u_spi.state == MISO_MODE && $past(dut.u_booter.u_spi.state) == MOSI_MODE)
      n_to_miso++;
    if (dut.u_booter.u_spi.state == MOSI_MODE && $past(dut.u_booter.u_spi.state) == MISO_MODE)
      n_to_mosi++;
    if (dut.u_booter.spi_read) n_fetch++;
    if (dut.u_booter.spi_write) n_write++;
  end
  always @(posedge proc_clk) begin
    if (!proc_rst && uart_tx_valid && uart_tx_ready) n_tx++;
    if (!proc_rst && uart_rx_valid) begin
      n_rx++;
      if (uart_rx_parity_err) n_par_err++;
      if (uart_rx_frame_err) n_frm_err++;
    end
  end

  // ------------------------------------------- microcontroller SPI master
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
  task automatic status(output logic [7:0] s);
    logic [7:0] d;
    cs_low(); xfer(CMD_READ_STATUS, d); xfer(8'h00, s); cs_high();
    n_status++;
  endtask
  task automatic page_program(input logic [23:0] a, input logic [7:0] b []);
    logic [7:0] d;
    cs_low(); header(CMD_PAGE_PROGRAM, a);
    foreach (b[k]) xfer(b[k], d);
    cs_high();
  endtask
  task automatic read_bytes(input logic [23:0] a, ref logic [7:0] b []);
    logic [7:0] d;
    cs_low(); header(CMD_READ, a);
    foreach (b[k]) begin xfer(8'h00, d); b[k] = d; end
    cs_high();
  endtask

  // the processor's UART use: send one byte, wait until it is echoed back
  task automatic uart_send(input logic [7:0] c);
    @(posedge proc_clk);
    while (!uart_tx_ready) @(posedge proc_clk);
    uart_tx_data = c; uart_tx_valid = 1;
    @(posedge proc_clk); uart_tx_valid = 0;
  endtask

  task automatic inject_frame(input logic [7:0] c, input bit bad_par, input bit bad_stop);
    localparam time BIT_T = 1042 * 50ns;
    inject = 1;
    inject_line = 0; #BIT_T;
    for (int k = 0; k < 8; k++) begin inject_line = c[k]; #BIT_T; end
    inject_line = (^c) ^ bad_par; #BIT_T;
    inject_line = ~bad_stop; #BIT_T;
    inject_line = 1; #(2 * BIT_T);
    inject = 0;
  endtask

  localparam logic [31:0] IMAGE [4] = '{32'h00100093, 32'h00000113, 32'h00110133, 32'hffdff06f};
  logic [7:0] rx_log [$];
  always @(posedge proc_clk) if (!proc_rst && uart_rx_valid) rx_log.push_back(uart_rx_data);

  initial begin
    logic [7:0] s;
    logic [7:0] buf8 [];
    logic [7:0] wr [];
    string msg = "Hello";
    repeat (4) @(negedge clk_100);
    rst = 0;
    // ---- boot held, then released
    repeat (200) @(negedge clk_100);
    check(proc_rst, 1, "no boot while boot_init is high");
    boot_init = 0;
    @(negedge proc_rst);
    // ---- boot: read the program
    buf8 = new[32];
    read_bytes(24'h0, buf8);
    for (int k = 0; k < 8; k++)
      check({buf8[4*k], buf8[4*k+1], buf8[4*k+2], buf8[4*k+3]},
            (k < 4) ? IMAGE[k] : 32'h0, "boot program word");
    // ---- flash as data memory
    wr = new[5];
    foreach (wr[k]) wr[k] = 8'(8'h30 + k);
    page_program(24'h1800, wr);                       // no write enable: refused
    buf8 = new[5];
    read_bytes(24'h1800, buf8);
    check(buf8[0], 8'h00, "program refused without write enable");
    if (buf8[0] == 8'h00) n_refused++;
    cs_low(); begin logic [7:0] d; xfer(CMD_WRITE_EN, d); end cs_high();
    status(s);
    check(s, 8'h02, "write enable latch set");
    page_program(24'h18fd, wr);                       // crosses the page end: wraps
    status(s);
    check(s, 8'h00, "latch cleared after program");
    buf8 = new[3];
    read_bytes(24'h18fd, buf8);
    foreach (buf8[k]) check(buf8[k], wr[k], "programmed byte at page end");
    buf8 = new[2];
    read_bytes(24'h1800, buf8);
    check(buf8[0], wr[3], "wrapped byte 0");
    check(buf8[1], wr[4], "wrapped byte 1");
    if (buf8[0] == wr[3] && buf8[1] == wr[4]) n_wrap++;
    // ---- UART: "Hello" echoed back from the PC side
    foreach (msg[i]) uart_send(msg[i]);
    while (rx_log.size() < msg.len()) @(posedge proc_clk);
    foreach (msg[i]) check(rx_log[i], msg[i], "UART echo");
    // ---- UART receive errors
    repeat (2000) @(posedge proc_clk);
    inject_frame(8'hA5, 1, 0);
    check(uart_rx_parity_err, 1, "parity error flagged");
    inject_frame(8'h5A, 0, 1);
    check(uart_rx_frame_err, 1, "frame error flagged");
    inject_frame(8'h3C, 0, 0);
    check({uart_rx_parity_err, uart_rx_frame_err}, 2'b00, "clean frame");
    check(rx_log[rx_log.size() - 1], 8'h3C, "clean frame data");
    // ---- every mechanism happened
    check(n_boot_hold > 0, 1, "boot hold");
    check(n_rst_release, 1, "reset release");
    check(n_to_miso > 0, 1, "MOSI_Mode -> MISO_Mode");
    check(n_to_mosi > 0, 1, "MISO_Mode -> MOSI_Mode");
    check(n_fetch > 8, 1, "word fetches");
    check(n_write, 5, "byte writes");
    check(n_refused, 1, "refused program");
    check(n_wrap, 1, "page wrap");
    check(n_status > 0, 1, "status read");
    check(n_tx, 5, "UART frames sent");
    check(n_rx, 8, "UART frames received");
    check(n_par_err, 1, "parity errors");
    check(n_frm_err, 1, "frame errors");
    $display("boot_hold_cycles=%0d releases=%0d to_miso=%0d to_mosi=%0d fetches=%0d writes=%0d",
             n_boot_hold, n_rst_release, n_to_miso, n_to_mosi, n_fetch, n_write);
    $display("refused=%0d wraps=%0d status=%0d tx=%0d rx=%0d par_err=%0d frm_err=%0d",
             n_refused, n_wrap, n_status, n_tx, n_rx, n_par_err, n_frm_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
