// uart_rx: receiver of the microcontroller's UART port, for frames of 1 start
// bit, 8 data bits (LSB first), 1 even parity bit and 1 stop bit at BAUD bits
// per second (19200 baud, 8 data bits, even parity, 1 stop bit in the
// microcontroller's specification).
//
// The rx line is synchronised by two flip-flops. A falling edge starts a
// frame; the line is then sampled in the middle of each bit, round(CLK_HZ /
// BAUD) cycles apart. A start bit that is no longer low at its middle is
// taken as a glitch and dropped. After the stop bit's middle, rx_valid is
// high for one cycle with the byte on rx_data; parity_err flags a parity
// mismatch and frame_err a low stop bit. There is no receive buffer: the
// user must take the byte in that cycle. Mid-bit sampling and the error
// flags are this design's choices.
module uart_rx #(
  parameter int unsigned CLK_HZ = 20_000_000,
  parameter int unsigned BAUD   = 19_200
) (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  logic       rx,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       parity_err,
  output logic       frame_err
);

  localparam int unsigned BIT_CYC = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW = $clog2(BIT_CYC);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} rx_state_e;

  rx_state_e     state;
  logic          rx_meta, rx_sync;
  logic [CW-1:0] cyc;
  logic [3:0]    nbit;
  logic [8:0]    shreg;      // parity, data[7:0]

  always_ff @(posedge clk) begin
    rx_valid <= 1'b0;
    if (rst) begin
      rx_meta    <= 1'b1;
      rx_sync    <= 1'b1;
      state      <= IDLE;
      cyc        <= '0;
      nbit       <= '0;
      shreg      <= '0;
      rx_data    <= '0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      rx_meta <= rx;
      rx_sync <= rx_meta;
      unique case (state)
        IDLE: if (!rx_sync) begin
          state <= START;
          cyc   <= '0;
        end
        START: if (cyc == CW'(BIT_CYC / 2 - 1)) begin
          cyc   <= '0;
          nbit  <= '0;
          state <= rx_sync ? IDLE : DATA;
        end else cyc <= cyc + 1'b1;
        DATA: if (cyc == CW'(BIT_CYC - 1)) begin
          cyc   <= '0;
          shreg <= {rx_sync, shreg[8:1]};
          nbit  <= nbit + 1'b1;
          if (nbit == 4'd8) state <= STOP;
        end else cyc <= cyc + 1'b1;
        STOP: if (cyc == CW'(BIT_CYC - 1)) begin
          cyc        <= '0;
          state      <= IDLE;
          rx_data    <= shreg[7:0];
          parity_err <= ^shreg;          // even parity: all nine bits XOR to 0
          frame_err  <= !rx_sync;
          rx_valid   <= 1'b1;
        end else cyc <= cyc + 1'b1;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
