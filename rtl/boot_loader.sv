// boot_loader: the processor booter that sits next to the microcontroller in
// the FPGA test setup. It stands in for the external SPI flash the
// microcontroller boots from, generates the microcontroller's clock and
// starts the boot by releasing the microcontroller's reset.
//
// Three blocks make it up: clk_gen turns the 100 MHz board clock into the
// 20 MHz processor clock and hands the 100 MHz clock to the controller;
// flash_mem holds the test program, loaded from a hex image at start-up; and
// spi_controller answers the processor's SPI commands from that memory and
// drives processor_rst. While boot_init is high the processor is held in
// reset and cannot boot. Once it falls, processor_rst is released RST_HOLD
// fast-clock cycles later, and the processor's boot code can read the
// program over SPI. This partition and the signal names between the blocks
// follow the framework; sizes not stated there (memory capacity, reset hold)
// are this design's choices. Replacing the processor with the fabricated
// chip only means routing the SPI pins, processor clock and reset to FPGA
// pins.
module boot_loader #(
  parameter int unsigned MEM_BYTES = 8192,
  parameter string       INIT_FILE = "rtl/boot_image.hex",
  parameter int unsigned CLK_DIV   = 5,
  parameter int unsigned RST_HOLD  = 16
) (
  input  logic clk_100,        // FPGA board clock
  input  logic rst,            // synchronous, active high
  input  logic boot_init,      // high: keep the processor from booting
  output logic clk_proc,       // processor clock (clk_100 / CLK_DIV)
  output logic processor_rst,  // processor reset, active high
  input  logic sclk,
  input  logic scs_n,
  input  logic mosi,
  output logic miso,
  output logic miso_oe
);

  localparam int unsigned AW = $clog2(MEM_BYTES);

  logic          clk_fast;
  logic [AW-1:0] spi_addr;
  logic          spi_read, spi_write;
  logic [7:0]    mosi_data;
  logic [31:0]   data_out;

  clk_gen #(.DIV(CLK_DIV)) u_clk_gen (
    .clk_in(clk_100), .rst, .clk_fast, .clk_proc);

  flash_mem #(.MEM_BYTES(MEM_BYTES), .INIT_FILE(INIT_FILE)) u_mem (
    .clk(clk_fast), .spi_addr, .spi_read, .spi_write, .mosi_data, .data_out);

  spi_controller #(.MEM_BYTES(MEM_BYTES), .RST_HOLD(RST_HOLD)) u_spi (
    .clk(clk_fast), .rst, .boot_init, .processor_rst,
    .sclk, .scs_n, .mosi, .miso, .miso_oe,
    .spi_addr, .spi_read, .spi_write, .mosi_data, .data_out);

endmodule
