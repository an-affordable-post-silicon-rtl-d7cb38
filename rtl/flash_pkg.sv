// flash_pkg: command codes, status bits and FSM states shared by the SPI
// flash emulator. The emulator answers the subset of a standard serial NOR
// flash command set that a processor needs to boot from it and to use it as
// secondary data memory: read, write enable/disable, page program and read
// status. The opcode values are the common JEDEC-style ones; the command set
// itself (reads and writes) follows the framework, the exact codes are this
// design's choice.
package flash_pkg;

  // Command opcodes (first byte of every SPI transaction, MSB first).
  localparam logic [7:0] CMD_PAGE_PROGRAM = 8'h02;
  localparam logic [7:0] CMD_READ         = 8'h03;
  localparam logic [7:0] CMD_WRITE_DIS    = 8'h04;
  localparam logic [7:0] CMD_READ_STATUS  = 8'h05;
  localparam logic [7:0] CMD_WRITE_EN     = 8'h06;

  // Length of the command byte and of the address that follows it.
  localparam int unsigned CMD_BITS  = 8;
  localparam int unsigned ADDR_BITS = 24;

  // Status register bits returned by READ_STATUS.
  localparam int unsigned SR_WIP = 0;  // write in progress (always 0 here)
  localparam int unsigned SR_WEL = 1;  // write enable latch

  // What the controller does once the command header has been received.
  typedef enum logic [2:0] {
    OP_NONE,         // unknown opcode: ignored until chip select rises
    OP_READ,         // stream memory bytes out on MISO
    OP_PROGRAM,      // write the MOSI bytes that follow into memory
    OP_READ_STATUS,  // stream the status register out on MISO
    OP_WRITE_EN,     // set the write enable latch
    OP_WRITE_DIS     // clear the write enable latch
  } flash_op_e;

  // The two states of the SPI controller FSM.
  typedef enum logic {
    MOSI_MODE = 1'b0,  // receiving command (and address) on MOSI
    MISO_MODE = 1'b1   // executing the received command
  } spi_state_e;

endpackage
