// tb_spi_controller: drives spi_controller as an SPI mode-0 master would
// (SCLK 10 MHz against a 100 MHz controller clock) and serves its memory
// port from a reference memory kept in the testbench, which answers a read
// request one clock later with the word holding the address (byte 4k+0 in
// bits 31:24).
//
// Checked: processor_rst stays high while boot_init is high and falls
// RST_HOLD + 3 clocks after boot_init falls; READ from aligned and unaligned
// addresses across word boundaries returns the reference bytes, with the
// first data bit available at the first SCLK rising edge after the address;
// a long READ wraps at the end of memory; READ_STATUS shows the write enable
// latch; PAGE_PROGRAM writes only after WRITE_ENABLE, wraps inside its
// 256-byte page, and clears the latch at the end; WRITE_DISABLE clears it;
// MISO is only driven while a read is running. Reads, status and programming
// are repeated in SPI mode 3 (SCLK idling high). Counts how often each FSM
// transition and each command happened and fails if one never did.
module tb_spi_controller;
  timeunit 1ns; timeprecision 1ps;
  import flash_pkg::*;

  localparam int MEMB = 1024;
  localparam int HOLD = 8;
  localparam time HALF = 50ns;       // SCLK half period (10 MHz)

  logic clk = 0, rst = 1, boot_init = 1;
  logic processor_rst;
  logic sclk = 0, scs_n = 1, mosi = 0, miso, miso_oe;
  logic [9:0]  spi_addr;
  logic        spi_read, spi_write;
  logic [7:0]  mosi_data;
  logic [31:0] data_out;
  int checks = 0, failures = 0;

  spi_controller #(.MEM_BYTES(MEMB), .RST_HOLD(HOLD)) dut (
    .clk, .rst, .boot_init, .processor_rst, .sclk, .scs_n, .mosi, .miso, .miso_oe,
    .spi_addr, .spi_read, .spi_write, .mosi_data, .data_out);

  always #5 clk = ~clk;

  // reference memory, byte array
  logic [7:0] ref_mem [MEMB];
  always @(posedge clk) begin
    if (spi_read)
      data_out <= {ref_mem[{spi_addr[9:2], 2'd0}], ref_mem[{spi_addr[9:2], 2'd1}],
                   ref_mem[{spi_addr[9:2], 2'd2}], ref_mem[{spi_addr[9:2], 2'd3}]};
    if (spi_write) ref_mem[spi_addr] <= mosi_data;
  end

  // mechanism counters
  int n_to_miso = 0, n_to_mosi = 0, n_refill = 0, n_write = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.state == MOSI_MODE && $past(dut.state) == MISO_MODE) n_to_mosi++;
    if (dut.state == MISO_MODE && $past(dut.state) == MOSI_MODE) n_to_miso++;
    if (spi_read) n_refill++;
    if (spi_write) n_write++;
  end

  initial begin
    #20ms;
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

  // ---- SPI master
  int n_oe_bad = 0;
  // cpol = 0: mode 0 (SCLK idles low); cpol = 1: mode 3 (SCLK idles high,
  // falls before each bit). Both sample on the rising edge.
  logic cpol = 0;
  task automatic xfer(input logic [7:0] tx, output logic [7:0] rx);
    for (int i = 7; i >= 0; i--) begin
      if (cpol) sclk = 0;
      mosi = tx[i];
      #HALF sclk = 1;
      rx[i] = miso;
      #HALF sclk = cpol;
    end
  endtask
  task automatic cs_low();  scs_n = 0; #HALF; endtask
  task automatic cs_high(); #HALF scs_n = 1; #(4 * HALF); endtask

  task automatic send_header(input logic [7:0] cmd, input logic [23:0] a);
    logic [7:0] d;
    xfer(cmd, d);
    xfer(a[23:16], d); xfer(a[15:8], d); xfer(a[7:0], d);
  endtask

  task automatic read_check(input int a, input int n, input string what);
    logic [7:0] d;
    cs_low();
    send_header(CMD_READ, 24'(a));
    for (int k = 0; k < n; k++) begin
      xfer(8'h00, d);
      check(d, ref_mem[(a + k) % MEMB], what);
      check(miso_oe, 1, "miso driven during read");
    end
    cs_high();
    check(miso_oe, 0, "miso released after read");
  endtask

  function automatic logic [7:0] status_byte();
    return {6'b0, dut.wel, 1'b0};
  endfunction

  task automatic read_status(output logic [7:0] s);
    logic [7:0] d;
    cs_low(); xfer(CMD_READ_STATUS, d); xfer(8'h00, s); xfer(8'h00, d);
    check(d, s, "status repeats");
    cs_high();
  endtask

  task automatic simple_cmd(input logic [7:0] c);
    logic [7:0] d;
    cs_low(); xfer(c, d); cs_high();
  endtask

  task automatic page_program(input int a, input logic [7:0] bytes [], input bit expect_write);
    logic [7:0] d;
    logic [7:0] shadow [MEMB];
    for (int i = 0; i < MEMB; i++) shadow[i] = ref_mem[i];
    cs_low();
    send_header(CMD_PAGE_PROGRAM, 24'(a));
    for (int k = 0; k < bytes.size(); k++) xfer(bytes[k], d);
    cs_high();
    // expected contents: written inside the 256-byte page, wrapping
    if (expect_write)
      for (int k = 0; k < bytes.size(); k++)
        shadow[(a & ~255) + ((a + k) & 255)] = bytes[k];
    for (int i = 0; i < MEMB; i++)
      if (ref_mem[i] !== shadow[i]) begin
        check(ref_mem[i], shadow[i], "memory after program");
        break;
      end
    checks++;
  endtask

  initial begin
    logic [7:0] s;
    logic [7:0] pbytes [];
    int t0, t1;
    for (int i = 0; i < MEMB; i++) ref_mem[i] = 8'($urandom);
    data_out = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    // ---- reset control
    repeat (50) @(negedge clk);
    check(processor_rst, 1, "processor held in reset while boot_init high");
    @(negedge clk); boot_init = 0;
    t0 = 0;
    while (processor_rst && t0 < 100) begin @(negedge clk); t0++; end
    check(t0, HOLD + 3, "reset release delay");
    // ---- reads
    read_check(0, 16, "read from 0");
    read_check(5, 11, "unaligned read");
    read_check(MEMB - 6, 12, "read wraps at end of memory");
    check(miso_oe, 0, "miso idle");
    // ---- status and write enable
    read_status(s);
    check(s, 8'h00, "status after reset");
    // program without write enable: no change
    pbytes = new[4];
    foreach (pbytes[k]) pbytes[k] = 8'($urandom);
    page_program(64, pbytes, 0);
    simple_cmd(CMD_WRITE_EN);
    read_status(s);
    check(s, 8'h02, "WEL set by write enable");
    simple_cmd(CMD_WRITE_DIS);
    read_status(s);
    check(s, 8'h00, "WEL cleared by write disable");
    simple_cmd(CMD_WRITE_EN);
    page_program(64, pbytes, 1);
    read_status(s);
    check(s, 8'h00, "WEL cleared after program");
    read_check(62, 10, "read back programmed bytes");
    // page wrap
    pbytes = new[8];
    foreach (pbytes[k]) pbytes[k] = 8'($urandom);
    simple_cmd(CMD_WRITE_EN);
    page_program(256 + 252, pbytes, 1);
    read_check(256, 8, "read back wrapped bytes");
    read_check(256 + 250, 6, "read back page end");
    // unknown command is ignored
    simple_cmd(8'h9F);
    read_status(s);
    check(s, 8'h00, "unknown command leaves status");
    // ---- SPI mode 3: SCLK idles high
    cpol = 1; sclk = 1; #(4 * HALF);
    read_check(0, 9, "mode 3 read");
    read_status(s);
    check(s, 8'h00, "mode 3 status");
    simple_cmd(CMD_WRITE_EN);
    pbytes = new[3];
    foreach (pbytes[k]) pbytes[k] = 8'($urandom);
    page_program(128, pbytes, 1);
    read_check(127, 5, "mode 3 read back");
    cpol = 0; sclk = 0; #(4 * HALF);
    // ---- mechanisms seen
    check(n_to_miso > 10, 1, "MOSI_Mode -> MISO_Mode transitions");
    check(n_to_mosi > 10, 1, "MISO_Mode -> MOSI_Mode transitions");
    check(n_refill > 10, 1, "memory word requests");
    check(n_write, 15, "memory byte writes");
    $display("transitions to MISO=%0d to MOSI=%0d word requests=%0d writes=%0d",
             n_to_miso, n_to_mosi, n_refill, n_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
