// flash_mem: the memory of the flash emulator, preloaded with the test
// program the processor boots from.
//
// Storage is an array of 32-bit words, one per line of the hex image that is
// loaded at start-up ($readmemh of INIT_FILE; words the file does not cover
// start as zero). Addresses are byte addresses, as on the SPI bus. Byte 4k+0
// is bits 31:24 of word k and byte 4k+3 bits 7:0, so streaming bytes in
// address order sends every word most significant bit first, as printed in
// the image. A read (spi_read high for one cycle) registers the whole word
// holding spi_addr on data_out one clock later and holds it until the next
// read; the SPI controller picks bits out of it. A write (spi_write high)
// stores mosi_data into the byte at spi_addr at the clock edge. A preloaded,
// readable and writable memory is what the framework describes; the word
// organisation, byte order and one-cycle read latency are this design's
// choices.
module flash_mem #(
  parameter int unsigned MEM_BYTES = 8192,               // capacity in bytes
  parameter string       INIT_FILE = "rtl/boot_image.hex", // "" for none
  localparam int unsigned AW = $clog2(MEM_BYTES)
) (
  input  logic          clk,
  input  logic [AW-1:0] spi_addr,    // byte address
  input  logic          spi_read,    // load the word holding spi_addr
  input  logic          spi_write,   // write mosi_data to byte spi_addr
  input  logic [7:0]    mosi_data,   // byte received on MOSI
  output logic [31:0]   data_out     // word read last
);

  localparam int unsigned WORDS = MEM_BYTES / 4;

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);

  end

  logic [AW-3:0] word_addr;
  logic [1:0]    lane;
  assign word_addr = spi_addr[AW-1:2];
  assign lane      = spi_addr[1:0];

  always_ff @(posedge clk) begin
    if (spi_write) mem[word_addr][8*(3-int'(lane)) +: 8] <= mosi_data;
    if (spi_read)  data_out <= mem[word_addr];
  end

endmodule
