// spi_cmd_decoder: combinational decoder of the 8-bit flash command byte.
//
// It maps the opcode to the operation the SPI controller executes in its
// MISO_Mode state and says whether a 24-bit address follows the opcode, so
// that the controller knows how many header bits to collect before it leaves
// MOSI_Mode. A combinational command decoder is part of the framework's boot
// loader; the opcode set is the usual serial-flash one (see flash_pkg), which
// is this design's choice. Purely combinational, no clock.
module spi_cmd_decoder
  import flash_pkg::*;
(
  input  logic [7:0] cmd,        // received command byte
  output flash_op_e  op,         // operation to execute
  output logic       has_addr    // 1: a 24-bit address follows the opcode
);

  always_comb begin
    op       = OP_NONE;
    has_addr = 1'b0;
    unique case (cmd)
      CMD_READ:         begin op = OP_READ;        has_addr = 1'b1; end
      CMD_PAGE_PROGRAM: begin op = OP_PROGRAM;     has_addr = 1'b1; end
      CMD_READ_STATUS:  op = OP_READ_STATUS;
      CMD_WRITE_EN:     op = OP_WRITE_EN;
      CMD_WRITE_DIS:    op = OP_WRITE_DIS;
      default:          op = OP_NONE;
    endcase
  end

endmodule
