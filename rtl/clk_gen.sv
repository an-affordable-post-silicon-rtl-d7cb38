// clk_gen: clock generator of the boot loader. It passes the 100 MHz FPGA
// clock on to the SPI controller and divides it by DIV to make the processor
// clock (100 MHz / 5 = 20 MHz, the frequencies the framework uses).
//
// A counter runs from 0 to DIV-1 on rising edges of clk_in. For an even DIV
// the output is high for the first DIV/2 counts. For an odd DIV a copy of the
// counter-decoded pulse is retimed on the falling edge and ANDed with it,
// which trims half an input period and gives an exact 50 % duty cycle
// (2.5 + 2.5 periods for DIV = 5). The divider structure is this design's
// choice. clk_proc is low while rst is high and its first rising edge comes
// one clk_in cycle after rst falls.
module clk_gen #(
  parameter int unsigned DIV = 5     // clk_in periods per processor clock
) (
  input  logic clk_in,      // 100 MHz FPGA clock
  input  logic rst,         // synchronous, active high
  output logic clk_fast,    // 100 MHz clock for the SPI controller
  output logic clk_proc     // divided processor clock
);

  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;
  localparam int unsigned HIGH_CNT = (DIV + 1) / 2;

  logic [CW-1:0] cnt;
  logic          pos_q, neg_q;

  always_ff @(posedge clk_in) begin
    if (rst) begin
      cnt   <= '0;
      pos_q <= 1'b0;
    end else begin
      cnt   <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
      pos_q <= (cnt < CW'(HIGH_CNT));
    end
  end

  always_ff @(negedge clk_in) begin
    if (rst) neg_q <= 1'b0;
    else     neg_q <= pos_q;
  end

  assign clk_fast = clk_in;
  assign clk_proc = (DIV % 2 == 1) ? (pos_q & neg_q) : pos_q;

endmodule
