// uart_tx: transmitter of the microcontroller's UART port. Frames are
// 1 start bit, 8 data bits (LSB first), 1 even parity bit and 1 stop bit at
// BAUD bits per second, as the microcontroller's UART specifies (19200 baud,
// 8 data bits, even parity, 1 stop bit).
//
// A byte is taken when tx_valid and tx_ready are both high at a clock edge;
// tx_ready stays low for the 11 bit times of the frame. Each bit lasts
// round(CLK_HZ / BAUD) clock cycles (1042 at 20 MHz, 0.03 % fast). tx idles
// high. The shift-register implementation and the valid/ready handshake are
// this design's choices.
module uart_tx #(
  parameter int unsigned CLK_HZ = 20_000_000,
  parameter int unsigned BAUD   = 19_200
) (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_ready,
  output logic       tx
);

  localparam int unsigned BIT_CYC = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW = $clog2(BIT_CYC);

  logic [9:0]    frame;      // bits after the current one, LSB next
  logic [3:0]    bits_left;
  logic [CW-1:0] cyc;

  assign tx_ready = (bits_left == 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      frame     <= '1;
      bits_left <= '0;
      cyc       <= '0;
      tx        <= 1'b1;
    end else if (tx_ready) begin
      if (tx_valid) begin
        // start bit now; then data, parity, stop
        frame     <= {1'b1, ^tx_data, tx_data};
        tx        <= 1'b0;
        bits_left <= 4'd11;
        cyc       <= '0;
      end
    end else if (cyc == CW'(BIT_CYC - 1)) begin
      cyc       <= '0;
      frame     <= {1'b1, frame[9:1]};
      tx        <= frame[0];
      bits_left <= bits_left - 1'b1;
      if (bits_left == 4'd1) tx <= 1'b1;
    end else begin
      cyc <= cyc + 1'b1;
    end
  end

  a_tx_idle_high: assert property (@(posedge clk) disable iff (rst)
    $rose(tx_ready) |-> tx);

endmodule
