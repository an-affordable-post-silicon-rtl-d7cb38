// spi_controller: SPI slave of the flash emulator, plus the processor reset
// control of the boot loader.
//
// The controller runs on the fast (100 MHz) clock and watches the SCLK, SCS
// and MOSI lines that the processor drives as SPI master, in SPI mode 0 (SCLK
// idles low) or mode 3 (SCLK idles high). In both, each side samples on the
// rising edge and changes its output after the falling edge. Each line goes
// through a synchroniser and edge detector (sync_edge_detect), and all the
// logic below acts on the resulting one-cycle edge pulses, never on SCLK
// itself.
//
// A two-state FSM does the work:
//   MOSI_Mode - while the header is still arriving (mosi_check), each SCLK
//               rising edge shifts one MOSI bit into a shift register. After
//               8 bits spi_cmd_decoder decodes the opcode; commands with an
//               address collect 24 more bits. When the header is complete
//               the FSM moves to MISO_Mode.
//   MISO_Mode - executes the command for as long as SCS stays low
//               (miso_check). Rising SCS returns to MOSI_Mode.
// READ streams memory from the received byte address: on every SCLK rising
// edge the master takes the bit on MISO and the controller advances to the
// next bit, requesting the next word from memory when it crosses a word
// boundary; on every falling edge the controller puts that bit on MISO, ready
// for the next rising edge. The first word is requested on the rising edge
// that completes the address, so the first data bit is on MISO at the
// following falling edge. Reading runs on without limit and wraps at the end
// of memory. READ_STATUS streams the status register ({WEL, WIP=0} in bits
// 1:0) the same way. PAGE_PROGRAM, accepted only after WRITE_ENABLE, stores
// each MOSI byte at the address counter, which wraps inside its 256-byte
// page; raising SCS afterwards clears the write enable latch. Writes
// complete at once, so WIP is always 0.
//
// processor_rst holds the processor in reset while rst or the synchronised
// boot_init input is high, and is released RST_HOLD fast-clock cycles after
// both are low.
//
// The two-state FSM, its MOSI/MISO split, the shift registers, address
// counter, command decoder, edge detectors, the use of both SCLK edges and
// the reset control follow the framework. The opcode set, status register,
// byte order, page wrap, reset hold time and the synchronisers are this
// design's choices, and so is fetching a 32-bit word per word boundary and
// picking its bits, where a bit-by-bit memory request would also do. The SCLK half period must be longer than about 4
// fast-clock cycles (40 ns at 100 MHz), which a 20 MHz master dividing its
// clock by two or more meets.
module spi_controller
  import flash_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8192,  // size of the emulated flash
  parameter int unsigned RST_HOLD  = 16,    // reset release delay, clk cycles
  localparam int unsigned AW = $clog2(MEM_BYTES)
) (
  input  logic          clk,            // fast controller clock
  input  logic          rst,            // synchronous, active high
  input  logic          boot_init,      // high: keep the processor in reset
  output logic          processor_rst,  // reset of the processor, active high
  // SPI port (processor is master)
  input  logic          sclk,
  input  logic          scs_n,          // chip select, active low
  input  logic          mosi,
  output logic          miso,
  output logic          miso_oe,        // high while MISO is driven
  // memory port
  output logic [AW-1:0] spi_addr,       // byte address
  output logic          spi_read,
  output logic          spi_write,
  output logic [7:0]    mosi_data,
  input  logic [31:0]   data_out
);

  // ---------------------------------------------------------------- inputs
  logic sclk_rise, sclk_fall;
  logic scs_lvl, scs_rise;
  logic mosi_lvl;

  sync_edge_detect #(.RESET_VALUE(1'b0)) u_sclk (
    .clk, .rst, .din(sclk),  .level(),         .rise(sclk_rise), .fall(sclk_fall));
  sync_edge_detect #(.RESET_VALUE(1'b1)) u_scs (
    .clk, .rst, .din(scs_n), .level(scs_lvl),  .rise(scs_rise),  .fall());
  sync_edge_detect #(.RESET_VALUE(1'b0)) u_mosi (
    .clk, .rst, .din(mosi),  .level(mosi_lvl), .rise(),          .fall());

  // ------------------------------------------------------------- registers
  spi_state_e  state;
  logic [5:0]  hdr_cnt;       // header bits received so far
  logic [23:0] shift_in;      // MOSI shift register
  flash_op_e   op_q;          // decoded command
  logic        has_addr_q;
  logic [23:0] addr;          // byte address counter
  logic [2:0]  bit_cnt;       // bit within the current byte (0 = MSB)
  logic        wel;           // write enable latch

  logic [23:0] next_shift;
  assign next_shift = {shift_in[22:0], mosi_lvl};

  localparam logic [5:0] LAST_CMD_BIT  = 6'(CMD_BITS - 1);
  localparam logic [5:0] LAST_ADDR_BIT = 6'(CMD_BITS + ADDR_BITS - 1);

  flash_op_e dec_op;
  logic      dec_has_addr;
  spi_cmd_decoder u_dec (.cmd(next_shift[7:0]), .op(dec_op), .has_addr(dec_has_addr));

  // FSM conditions (names as in the state diagram)
  logic mosi_check, miso_check;
  assign mosi_check = !(sclk_rise && ((hdr_cnt == LAST_CMD_BIT  && !dec_has_addr) ||
                                      (hdr_cnt == LAST_ADDR_BIT &&  has_addr_q)));
  assign miso_check = !scs_lvl;

  logic [7:0] status;
  always_comb begin
    status         = '0;
    status[SR_WEL] = wel;
    status[SR_WIP] = 1'b0;     // writes complete at once
  end

  // bit of the current word that belongs on MISO
  logic [4:0] word_bit;
  assign word_bit = ~{addr[1:0], bit_cnt};

  always_ff @(posedge clk) begin
    spi_read  <= 1'b0;
    spi_write <= 1'b0;
    if (rst) begin
      state      <= MOSI_MODE;
      hdr_cnt    <= '0;
      shift_in   <= '0;
      op_q       <= OP_NONE;
      has_addr_q <= 1'b0;
      addr       <= '0;
      bit_cnt    <= '0;
      wel        <= 1'b0;
      miso       <= 1'b0;
      miso_oe    <= 1'b0;
      spi_addr   <= '0;
      mosi_data  <= '0;
    end else if (scs_lvl) begin
      // deselected: end of any command
      if (scs_rise && state == MISO_MODE && op_q == OP_PROGRAM) wel <= 1'b0;
      state      <= MOSI_MODE;
      hdr_cnt    <= '0;
      bit_cnt    <= '0;
      op_q       <= OP_NONE;
      has_addr_q <= 1'b0;
      miso_oe    <= 1'b0;
    end else begin
      unique case (state)
        MOSI_MODE: if (sclk_rise) begin
          shift_in <= next_shift;
          hdr_cnt  <= hdr_cnt + 1'b1;
          if (hdr_cnt == LAST_CMD_BIT) begin
            op_q       <= dec_op;
            has_addr_q <= dec_has_addr;
            if (dec_op == OP_WRITE_EN)  wel <= 1'b1;
            if (dec_op == OP_WRITE_DIS) wel <= 1'b0;
          end
          if (hdr_cnt == LAST_ADDR_BIT && has_addr_q) begin
            addr <= next_shift[23:0];
            if (op_q == OP_READ) begin
              spi_addr <= next_shift[AW-1:0];
              spi_read <= 1'b1;
            end
          end
          if (!mosi_check) begin
            state   <= MISO_MODE;
            bit_cnt <= '0;
          end
        end

        MISO_MODE: if (miso_check) begin
          unique case (op_q)
            OP_READ: begin
              if (sclk_fall) begin
                miso    <= data_out[word_bit];
                miso_oe <= 1'b1;
              end
              if (sclk_rise) begin
                bit_cnt <= bit_cnt + 1'b1;
                if (bit_cnt == 3'd7) begin
                  addr <= addr + 1'b1;
                  if (addr[1:0] == 2'd3) begin
                    spi_addr <= AW'(addr + 1'b1);
                    spi_read <= 1'b1;
                  end
                end
              end
            end
            OP_READ_STATUS: begin
              if (sclk_fall) begin
                miso    <= status[~bit_cnt];
                miso_oe <= 1'b1;
              end
              if (sclk_rise) bit_cnt <= bit_cnt + 1'b1;
            end
            OP_PROGRAM: if (sclk_rise) begin
              shift_in <= next_shift;
              bit_cnt  <= bit_cnt + 1'b1;
              if (bit_cnt == 3'd7) begin
                if (wel) begin
                  spi_addr  <= addr[AW-1:0];
                  mosi_data <= next_shift[7:0];
                  spi_write <= 1'b1;
                end
                addr[7:0] <= addr[7:0] + 1'b1;
              end
            end
            default: ;
          endcase
        end

        default: state <= MOSI_MODE;
      endcase
    end
  end

  // ------------------------------------------------------ processor reset
  logic                        boot_meta, boot_sync;
  logic [$clog2(RST_HOLD+1)-1:0] hold_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      boot_meta     <= 1'b1;
      boot_sync     <= 1'b1;
      hold_cnt      <= '0;
      processor_rst <= 1'b1;
    end else begin
      boot_meta <= boot_init;
      boot_sync <= boot_meta;
      if (boot_sync) begin
        hold_cnt      <= '0;
        processor_rst <= 1'b1;
      end else if (hold_cnt != ($clog2(RST_HOLD+1))'(RST_HOLD)) begin
        hold_cnt <= hold_cnt + 1'b1;
      end else begin
        processor_rst <= 1'b0;
      end
    end
  end

  // ----------------------------------------------------------- assertions
  a_rd_wr_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(spi_read && spi_write));
  a_write_needs_wel: assert property (@(posedge clk) disable iff (rst)
    spi_write |-> $past(wel));
  a_miso_only_in_miso_mode: assert property (@(posedge clk) disable iff (rst)
    miso_oe |-> state == MISO_MODE || $past(state) == MISO_MODE);

endmodule
