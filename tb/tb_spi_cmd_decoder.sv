// tb_spi_cmd_decoder: applies all 256 command bytes to spi_cmd_decoder and
// compares the decoded operation and the address flag with a table written
// out here from the opcode list of the flash command set.
module tb_spi_cmd_decoder;
  import flash_pkg::*;

  logic [7:0] cmd;
  flash_op_e  op;
  logic       has_addr;
  int checks = 0, failures = 0;

  spi_cmd_decoder dut (.cmd, .op, .has_addr);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flash_op_e exp_op;
    logic      exp_addr;
    for (int c = 0; c < 256; c++) begin
      cmd = 8'(c);
      #1;
      case (c)
        'h03:    begin exp_op = OP_READ;        exp_addr = 1; end
        'h02:    begin exp_op = OP_PROGRAM;     exp_addr = 1; end
        'h05:    begin exp_op = OP_READ_STATUS; exp_addr = 0; end
        'h06:    begin exp_op = OP_WRITE_EN;    exp_addr = 0; end
        'h04:    begin exp_op = OP_WRITE_DIS;   exp_addr = 0; end
        default: begin exp_op = OP_NONE;        exp_addr = 0; end
      endcase
      checks++;
      if (op !== exp_op || has_addr !== exp_addr) begin
        failures++;
        $display("FAIL cmd=%02h op=%0d exp=%0d has_addr=%0b exp=%0b",
                 c, op, exp_op, has_addr, exp_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
