// tb_sync_edge_detect: drives a random line into sync_edge_detect and checks,
// cycle by cycle, that `level` is the input two clock edges late and that
// `rise`/`fall` pulse exactly when that delayed copy changes. Also checks the
// reset value for both settings of RESET_VALUE.
module tb_sync_edge_detect;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst = 1, din = 0;
  logic lvl0, r0, f0, lvl1, r1, f1;
  int checks = 0, failures = 0;
  int n_rise = 0, n_fall = 0;

  sync_edge_detect #(.RESET_VALUE(1'b0)) dut0 (.clk, .rst, .din, .level(lvl0), .rise(r0), .fall(f0));
  sync_edge_detect #(.RESET_VALUE(1'b1)) dut1 (.clk, .rst, .din, .level(lvl1), .rise(r1), .fall(f1));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b at %0t", what, got, exp, $time);
    end
  endtask

  logic hist [0:3];   // hist[k]: din sampled k+1 edges ago

  initial begin
    repeat (3) @(posedge clk);
    #1;
    check(lvl0, 1'b0, "reset level 0");
    check(lvl1, 1'b1, "reset level 1");
    check(r0 | f0 | r1 | f1, 1'b0, "no edge in reset");
    // start from a known line value for both instances
    din = 0;
    @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 4; k++) hist[k] = 0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = din;
      #1;
      if (i >= 3) begin
        check(lvl0, hist[1], "level");
        check(r0, hist[1] & ~hist[2], "rise");
        check(f0, ~hist[1] & hist[2], "fall");
        check(lvl1, hist[1], "level (reset 1)");
        if (r0) n_rise++;
        if (f0) n_fall++;
      end
      // hold the line for a random 1..4 cycles
      if ($urandom_range(0, 2) == 0) din = ~din;
    end
    checks++;
    if (n_rise < 10 || n_fall < 10) begin
      failures++;
      $display("FAIL too few edges: rise=%0d fall=%0d", n_rise, n_fall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
