// tb_uart_tx: sends random bytes through uart_tx (16 clocks per bit to keep
// the run short) and decodes the serial line in the testbench by sampling
// each bit in its middle. Checks start bit, data, even parity and stop bit,
// that the frame lasts exactly 11 bit times (tx_ready low for 176 cycles) and
// that the line idles high. Also checks the default bit time: 20 MHz / 19200
// baud rounds to 1042 cycles per bit.
module tb_uart_tx;
  timeunit 1ns; timeprecision 1ps;

  localparam int BIT = 16;
  logic clk = 0, rst = 1;
  logic [7:0] tx_data = '0;
  logic tx_valid = 0, tx_ready, tx;
  int checks = 0, failures = 0;

  uart_tx #(.CLK_HZ(BIT * 1000), .BAUD(1000)) dut (.clk, .rst, .tx_data, .tx_valid, .tx_ready, .tx);

  // default-size instance, only its first bit time is measured
  logic [7:0] f_data = 8'h55;
  logic f_valid = 0, f_ready, f_tx;
  uart_tx dut_full (.clk, .rst, .tx_data(f_data), .tx_valid(f_valid), .tx_ready(f_ready), .tx(f_tx));

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

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(tx, 1, "idle high");
    check(tx_ready, 1, "ready when idle");
    for (int n = 0; n < 40; n++) begin
      logic [7:0] b;
      logic [10:0] line;
      int busy;
      b = 8'($urandom);
      tx_data = b; tx_valid = 1;
      @(negedge clk); tx_valid = 0;       // taken at the edge just passed
      // the start bit began at that edge; sample bit k in its middle
      busy = 1;
      for (int k = 0; k < 11; k++) begin
        repeat (BIT / 2 - (k == 0 ? 1 : 0)) @(negedge clk);
        line[k] = tx;
        if (k == 10) check(tx_ready, 0, "busy during stop bit");
        repeat (BIT / 2 + (k == 0 ? 1 : 0)) @(negedge clk);
      end
            check(line[0], 0, "start bit");
      check(line[8:1], b, "data");
      check(line[9], ^b, "even parity");
      check(line[10], 1, "stop bit");
      // 11*BIT cycles have passed since the byte was taken
      busy = 0;
      while (!tx_ready && busy < 100) begin @(negedge clk); busy++; end
      check(busy, 0, "frame ends after 11 bit times");
      check(tx, 1, "idle after frame");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    // default bit time
    f_valid = 1; @(negedge clk); f_valid = 0;
    begin
      int t;
      t = 0;
      while (f_tx == 0 && t < 5000) begin @(negedge clk); t++; end
      check(t, 1042, "default bit time (cycles)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
