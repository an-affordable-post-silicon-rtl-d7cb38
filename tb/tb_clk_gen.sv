// tb_clk_gen: runs clk_gen from a 100 MHz clock with the default divider
// (5) and with an even divider (4), and measures the period and high time of
// the divided clock: 50 ns / 25 ns (20 MHz, 50 % duty) and 40 ns / 20 ns.
// Also checks that the divided clock is held low in reset and that the fast
// clock output follows the input.
module tb_clk_gen;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst = 1;
  logic fast5, proc5, fast4, proc4;
  int checks = 0, failures = 0;

  clk_gen dut5 (.clk_in(clk), .rst, .clk_fast(fast5), .clk_proc(proc5));
  clk_gen #(.DIV(4)) dut4 (.clk_in(clk), .rst, .clk_fast(fast4), .clk_proc(proc4));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_real(input realtime got, input realtime exp, input string what);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s got=%0.3f exp=%0.3f", what, got, exp);
    end
  endtask

  task automatic measure(input int which, input realtime exp_per, input realtime exp_hi);
    realtime t_rise0, t_fall, t_rise1;
    for (int n = 0; n < 20; n++) begin
      if (which == 5) begin
        @(posedge proc5); t_rise0 = $realtime;
        @(negedge proc5); t_fall  = $realtime;
        @(posedge proc5); t_rise1 = $realtime;
      end else begin
        @(posedge proc4); t_rise0 = $realtime;
        @(negedge proc4); t_fall  = $realtime;
        @(posedge proc4); t_rise1 = $realtime;
      end
      check_real(t_rise1 - t_rise0, exp_per, "period");
      check_real(t_fall - t_rise0, exp_hi, "high time");
    end
  endtask

  initial begin
    repeat (10) begin
      @(negedge clk);
      checks++;
      if (proc5 !== 1'b0 || proc4 !== 1'b0) begin
        failures++;
        $display("FAIL divided clock not low in reset");
      end
      checks++;
      if (fast5 !== clk || fast4 !== clk) begin
        failures++;
        $display("FAIL fast clock does not follow input");
      end
    end
    rst = 0;
    fork
      measure(5, 50.0, 25.0);
      measure(4, 40.0, 20.0);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
