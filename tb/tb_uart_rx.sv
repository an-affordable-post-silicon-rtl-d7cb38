// tb_uart_rx: the testbench generates serial frames (16 clocks per bit) with
// random data, and sometimes a wrong parity bit, a low stop bit or a short
// glitch in place of a start bit, and checks what uart_rx reports: the byte,
// parity_err, frame_err, and no byte at all for a glitch. rx_valid must come
// in the middle of the stop bit, 10.5 bit times after the start edge plus the
// four cycles of synchroniser, start detection and output register.
module tb_uart_rx;
  timeunit 1ns; timeprecision 1ps;

  localparam int BIT = 16;
  logic clk = 0, rst = 1, rx = 1;
  logic [7:0] rx_data;
  logic rx_valid, parity_err, frame_err;
  int checks = 0, failures = 0;
  int n_par = 0, n_frm = 0, n_glitch = 0;

  uart_rx #(.CLK_HZ(BIT * 1000), .BAUD(1000)) dut (.clk, .rst, .rx, .rx_data, .rx_valid, .parity_err, .frame_err);

  always #5 clk = ~clk;

  initial begin
    #5000000;
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

  int valid_cnt = 0;
  int valid_at;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rx_valid) begin valid_cnt++; valid_at = cyc; end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 60; n++) begin
      logic [7:0] b;
      logic bad_par, bad_stop;
      int n_before, start_cyc;
      b = 8'($urandom);
      bad_par  = ($urandom_range(0, 4) == 0);
      bad_stop = ($urandom_range(0, 4) == 0);
      n_before = valid_cnt;
      if ($urandom_range(0, 6) == 0) begin
        // glitch: 3 cycles low, must not start a frame
        rx = 0; repeat (3) @(negedge clk); rx = 1;
        repeat (12 * BIT) @(negedge clk);
        check(valid_cnt - n_before, 0, "glitch ignored");
        n_glitch++;
        continue;
      end
      start_cyc = cyc;
      rx = 0; repeat (BIT) @(negedge clk);
      for (int k = 0; k < 8; k++) begin rx = b[k]; repeat (BIT) @(negedge clk); end
      rx = (^b) ^ bad_par; repeat (BIT) @(negedge clk);
      rx = ~bad_stop; repeat (BIT) @(negedge clk);
      rx = 1; repeat (2 * BIT) @(negedge clk);
      check(valid_cnt - n_before, 1, "one byte per frame");
      check(rx_data, b, "data");
      check(parity_err, bad_par, "parity error flag");
      check(frame_err, bad_stop, "frame error flag");
      // 2 synchroniser cycles, 1 to detect the start edge, 1 to register rx_valid
      check(valid_at - start_cyc, 10 * BIT + BIT / 2 + 4, "valid in middle of stop bit");
      if (bad_par) n_par++;
      if (bad_stop) n_frm++;
    end
    checks++;
    if (n_par == 0 || n_frm == 0 || n_glitch == 0) begin
      failures++;
      $display("FAIL error cases not exercised par=%0d frm=%0d glitch=%0d", n_par, n_frm, n_glitch);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
