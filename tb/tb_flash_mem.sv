// tb_flash_mem: checks the flash emulator memory. An instance loaded with
// the default boot image must return the image's words (written out here)
// and zero past its end; a small instance with no image takes random byte
// writes, and every word read back must match a reference array kept by the
// testbench, with byte 4k+0 in bits 31:24 of word k. Also checks the
// one-cycle read latency and that data_out holds between reads.
module tb_flash_mem;
  timeunit 1ns; timeprecision 1ps;

  localparam int SMALL = 256;
  logic clk = 0;
  int checks = 0, failures = 0;

  // default instance, preloaded
  logic [12:0] a_addr = '0;
  logic        a_rd = 0, a_wr = 0;
  logic [7:0]  a_wd = '0;
  logic [31:0] a_q;
  flash_mem dut_img (.clk, .spi_addr(a_addr), .spi_read(a_rd), .spi_write(a_wr),
                     .mosi_data(a_wd), .data_out(a_q));

  // small instance, empty
  logic [7:0]  b_addr = '0;
  logic        b_rd = 0, b_wr = 0;
  logic [7:0]  b_wd = '0;
  logic [31:0] b_q;
  flash_mem #(.MEM_BYTES(SMALL), .INIT_FILE("")) dut_small (
    .clk, .spi_addr(b_addr), .spi_read(b_rd), .spi_write(b_wr),
    .mosi_data(b_wd), .data_out(b_q));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%08h exp=%08h", what, got, exp);
    end
  endtask

  logic [7:0] ref_bytes [SMALL];
  localparam logic [31:0] IMAGE [4] = '{32'h00100093, 32'h00000113, 32'h00110133, 32'hffdff06f};

  initial begin
    for (int i = 0; i < SMALL; i++) ref_bytes[i] = 8'h00;
    @(negedge clk);
    // preloaded image, read with byte addresses of every lane
    for (int w = 0; w < 6; w++) begin
      a_addr = 13'(4 * w + (w % 4)); a_rd = 1;
      @(negedge clk); a_rd = 0;
      check32(a_q, (w < 4) ? IMAGE[w] : 32'h0, "image word");
      a_addr = 13'h1000;
      @(negedge clk);
      check32(a_q, (w < 4) ? IMAGE[w] : 32'h0, "data_out holds");
    end
    // last word of the full memory is zero
    a_addr = 13'h1ffc; a_rd = 1; @(negedge clk); a_rd = 0;
    check32(a_q, 32'h0, "last word");

    // random byte writes and read-back on the small instance
    for (int n = 0; n < 600; n++) begin
      int a;
      a = $urandom_range(0, SMALL - 1);
      if ($urandom_range(0, 1) == 1) begin
        b_addr = 8'(a); b_wd = 8'($urandom); b_wr = 1;
        ref_bytes[a] = b_wd;
        @(negedge clk); b_wr = 0;
      end else begin
        int w;
        w = a / 4;
        b_addr = 8'(a); b_rd = 1;
        @(negedge clk); b_rd = 0;
        check32(b_q, {ref_bytes[4*w], ref_bytes[4*w+1], ref_bytes[4*w+2], ref_bytes[4*w+3]},
                "read back");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
