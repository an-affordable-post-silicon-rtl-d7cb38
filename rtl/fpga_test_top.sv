// fpga_test_top: the FPGA side of the post-silicon test setup.
//
// The processor booter (boot_loader) emulates the SPI flash with the test
// program, clocks the RISC-V microcontroller at 20 MHz and releases its
// reset when boot_init falls. The microcontroller's core is the device under
// test and is not part of this RTL: its clock, reset and SPI pins are brought
// out as ports here, so that either a model of the microcontroller or, for
// chip testing, the fabricated part on FPGA pins can be connected to them.
// The microcontroller's UART port (19200 baud, 8 data bits, even parity, 1
// stop bit) is included: its transmitter and receiver run on the processor
// clock and reset, their byte side is brought out where the core would
// connect, and their serial lines go to the PC link. The 8-bit GPIO port of
// the microcontroller is not modelled.
//
// Which blocks exist and how they connect follows the framework; the ports
// of the core-side UART interface are this design's choice.
module fpga_test_top #(
  parameter int unsigned MEM_BYTES = 8192,
  parameter string       INIT_FILE = "rtl/boot_image.hex",
  parameter int unsigned CLK_DIV   = 5,
  parameter int unsigned RST_HOLD  = 16,
  parameter int unsigned CLK_HZ    = 20_000_000,  // processor clock
  parameter int unsigned BAUD      = 19_200
) (
  input  logic       clk_100,        // FPGA board clock, 100 MHz
  input  logic       rst,            // FPGA reset, synchronous, active high
  input  logic       boot_init,      // high: hold the microcontroller in reset
  // to the microcontroller (device under test)
  output logic       proc_clk,       // 20 MHz
  output logic       proc_rst,       // active high
  input  logic       spi_sclk,
  input  logic       spi_scs_n,
  input  logic       spi_mosi,
  output logic       spi_miso,
  output logic       spi_miso_oe,
  // UART port, core side
  input  logic [7:0] uart_tx_data,
  input  logic       uart_tx_valid,
  output logic       uart_tx_ready,
  output logic [7:0] uart_rx_data,
  output logic       uart_rx_valid,
  output logic       uart_rx_parity_err,
  output logic       uart_rx_frame_err,
  // UART port, serial lines to the PC
  output logic       uart_txd,
  input  logic       uart_rxd
);

  boot_loader #(
    .MEM_BYTES(MEM_BYTES), .INIT_FILE(INIT_FILE),
    .CLK_DIV(CLK_DIV), .RST_HOLD(RST_HOLD)
  ) u_booter (
    .clk_100, .rst, .boot_init,
    .clk_proc(proc_clk), .processor_rst(proc_rst),
    .sclk(spi_sclk), .scs_n(spi_scs_n), .mosi(spi_mosi),
    .miso(spi_miso), .miso_oe(spi_miso_oe));

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart_tx (
    .clk(proc_clk), .rst(proc_rst),
    .tx_data(uart_tx_data), .tx_valid(uart_tx_valid), .tx_ready(uart_tx_ready),
    .tx(uart_txd));

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart_rx (
    .clk(proc_clk), .rst(proc_rst), .rx(uart_rxd),
    .rx_data(uart_rx_data), .rx_valid(uart_rx_valid),
    .parity_err(uart_rx_parity_err), .frame_err(uart_rx_frame_err));

endmodule
