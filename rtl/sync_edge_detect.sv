// sync_edge_detect: brings one asynchronous SPI line (SCLK, SCS or MOSI) into
// the 100 MHz controller clock domain and flags its edges.
//
// Two flip-flops synchronise the line; a third holds its previous value, and
// comparing the two gives one-cycle pulses on a rising and on a falling edge.
// The SPI controller is clocked far faster than the SCLK the processor sends,
// so it works on these edge pulses instead of on SCLK itself. Using edge
// detectors follows the framework; the two-flop synchroniser is this design's
// choice. Latency: `level` follows the input 2 clock cycles later, and a
// `rise`/`fall` pulse is high in the same cycle as the new `level`.
module sync_edge_detect #(
  parameter bit RESET_VALUE = 1'b0   // value the stages take in reset
) (
  input  logic clk,
  input  logic rst,      // synchronous, active high
  input  logic din,      // asynchronous input line
  output logic level,    // synchronised level
  output logic rise,     // one-cycle pulse on a 0->1 change
  output logic fall      // one-cycle pulse on a 1->0 change
);

  logic meta, sync, prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RESET_VALUE;
      sync <= RESET_VALUE;
      prev <= RESET_VALUE;
    end else begin
      meta <= din;
      sync <= meta;
      prev <= sync;
    end
  end

  assign level = sync;
  assign rise  = sync & ~prev;
  assign fall  = ~sync & prev;

endmodule
