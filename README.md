# FPGA flash emulator and boot controller for testing a RISC-V microcontroller

A small RV32I microcontroller boots from an external SPI flash. It runs at
20 MHz and talks to the outside world through an SPI port, a UART and an 8-bit
GPIO port. To test such a chip cheaply, before and after fabrication, one
FPGA board can play everything around it:

* it stores the test program and answers the chip's SPI flash commands as the
  flash would;
* it generates the chip's 20 MHz clock;
* it holds the chip in reset until the tester lets it boot.

Before tape-out, the microcontroller's own RTL sits in the same FPGA next to
this logic. Once silicon is back, the microcontroller is removed from the
FPGA build. Its SPI, clock and reset nets then become FPGA pins wired to the
real chip, and everything else stays the same. The only things you can watch
are the chip's UART, which goes to a PC terminal, and its GPIO pins, which
drive LEDs or a display. So the test programs check their own results and
report pass or fail through those ports.

This repository holds the FPGA side of that setup in synthesizable
SystemVerilog. The microcontroller core is the device under test, and its
design is not part of this code.

## Block structure

```
fpga_test_top
├── boot_loader                 "processor booter"
│   ├── clk_gen                 100 MHz in -> 100 MHz to controller, 20 MHz to processor
│   ├── flash_mem               8 KiB, preloaded from rtl/boot_image.hex
│   └── spi_controller          SPI slave + processor reset control
│       ├── sync_edge_detect x3 SCLK, SCS, MOSI into the 100 MHz domain
│       └── spi_cmd_decoder     opcode -> operation
├── uart_tx                     microcontroller UART port, transmit
└── uart_rx                     microcontroller UART port, receive
flash_pkg                       opcodes, status bits, FSM and operation enums
```

The top's ports are the pins the microcontroller would connect to:
`proc_clk` and `proc_rst` (active high), plus the SPI lines `spi_sclk`,
`spi_scs_n`, `spi_mosi`, `spi_miso` and `spi_miso_oe`. It also has the UART's
core-side byte interface and its serial lines `uart_txd` and `uart_rxd`.
Board inputs are `clk_100`, `rst` (synchronous, active high) and `boot_init`.

## How the SPI controller works

This is the core of the design and the part that needs the most care.

### Oversampling instead of clocking on SCLK

The controller never uses SCLK as a clock. It runs on the 100 MHz board
clock, and the processor's SCLK is at most 10 MHz. SCLK, SCS and MOSI each pass
through a two-flop synchroniser. A third flop keeps each line's previous
value, which gives one-cycle `rise` and `fall` pulses (`sync_edge_detect`).
All three lines see the same delay, so they stay aligned. The rest of the
controller reacts only to these pulses.

Both SCLK edges are used. The bus can run in SPI mode 0 (SCLK idles low) or
mode 3 (SCLK idles high), since both sample on the rising edge:

* **rising edge**: the master samples MISO. At the same moment the controller
  moves on to the next bit. When it moves into a new 32-bit word, it asks the
  memory for that word.
* **falling edge**: the controller puts the bit it moved to on MISO. The bit
  is then stable until the master's next rising edge.

From an SCLK edge to the controller's response takes about 3 fast-clock cycles
(30 ns). The SCLK half-period must therefore be longer than about 40 ns. A
20 MHz master that divides its clock by two (10 MHz SCLK, 50 ns half-period)
meets this. A faster SCLK needs a faster controller clock.

### The two-state FSM

| state          | stays while                 | does                                                        |
|----------------|-----------------------------|-------------------------------------------------------------|
| 1 `MOSI_MODE`  | `mosi_check`: header not complete | shifts MOSI in on each rising edge; decodes the opcode after 8 bits; collects 24 address bits if the opcode takes an address |
| 2 `MISO_MODE`  | `miso_check`: SCS still low | carries out the decoded command                             |

The FSM moves from 1 to 2 on the rising edge that completes the header. It
moves from 2 back to 1 when SCS goes high. Raising SCS in the middle of a
header also discards it.

### Commands

| opcode | command        | what happens in `MISO_MODE`                                           |
|--------|----------------|-----------------------------------------------------------------------|
| `03h`  | READ + 24-bit address | streams bytes from the address onward, with no length limit; wraps at the end of memory |
| `02h`  | PAGE PROGRAM + 24-bit address | stores each following MOSI byte; the address wraps inside its 256-byte page; ignored unless the write enable latch is set, which SCS rising then clears |
| `06h`  | WRITE ENABLE   | sets the write enable latch (WEL)                                     |
| `04h`  | WRITE DISABLE  | clears WEL                                                            |
| `05h`  | READ STATUS    | streams the status byte `{6'b0, WEL, WIP=0}` repeatedly               |
| other  | -              | ignored until SCS rises                                               |

Writes finish at once, so WIP always reads 0 and the processor's polling loop
ends after one read. MISO is driven only while READ or READ STATUS is
streaming (`miso_oe`). On a board pin, use `miso_oe` as the tri-state
enable.

### Read timing

The rising edge that carries the last address bit also issues the read of
the first word. The memory answers one fast clock later. On the next falling
edge the first data bit goes onto MISO. So the master reads data from the
very first SCLK pulse after the address, with no dummy byte.

### Memory layout

`flash_mem` stores 32-bit words, one per line of the hex image, and is
addressed in bytes. Byte `4k+0` is bits 31:24 of word `k`, so a word from the
image goes out on MISO most significant bit first, exactly as it is written
in the file. A core that expects a little-endian byte stream must have its
image byte-swapped per word. The image is loaded with `$readmemh` at start-up
(on an FPGA, when the bitstream is built). `INIT_FILE` selects the file,
given relative to the directory the simulator or synthesis tool runs in.
Words beyond the file are zero.

## Boot control

`processor_rst` is high while `rst` or `boot_init` is high. `boot_init` passes
through two synchronising flops. Once `boot_init` is low, `processor_rst`
falls `RST_HOLD` (16) fast-clock cycles later, 3 cycles more counting the
synchroniser. Keeping `boot_init` high is how the tester stops the chip from
booting, for example to measure its idle current.

## Processor clock

`clk_gen` divides the 100 MHz clock by `DIV` = 5. A counter decodes a pulse
that is high for 3 of every 5 input cycles. ANDing it with a copy retimed on
the falling edge trims half a cycle, which gives a 20 MHz clock with a 50 %
duty cycle. The output is low during reset. On an FPGA, a clock-management
tile would be the usual replacement. The 100 MHz clock is passed through to
the controller unchanged.

## UART port

The microcontroller's UART uses 19200 baud, 8 data bits, even parity and one
stop bit. The design includes it as `uart_tx` and `uart_rx`, clocked by the
20 MHz processor clock and reset by `proc_rst`. One bit lasts
round(20 MHz / 19200) = 1042 cycles, which is 0.03 % fast.

* `uart_tx` takes a byte on `tx_valid && tx_ready` and is busy for 11 bit
  times.
* `uart_rx` samples each bit in its middle and rejects a start bit that is
  no longer low at mid-bit. It gives a one-cycle `rx_valid` with
  `parity_err` and `frame_err` (low stop bit). It has no buffer.

## Parameters

| parameter   | default              | where                        | meaning |
|-------------|----------------------|------------------------------|---------|
| `MEM_BYTES` | 8192                 | top, boot_loader, flash_mem, spi_controller | emulated flash size, equal to the microcontroller's 8 KB internal memory |
| `INIT_FILE` | `rtl/boot_image.hex` | top, boot_loader, flash_mem  | boot image, one 32-bit hex word per line; `""` for none |
| `CLK_DIV`   | 5                    | top, boot_loader (`DIV` in clk_gen) | 100 MHz / 5 = 20 MHz |
| `RST_HOLD`  | 16                   | top, boot_loader, spi_controller | fast-clock cycles from `boot_init` low to reset release |
| `CLK_HZ`, `BAUD` | 20 000 000, 19 200 | top, uart_tx, uart_rx     | UART bit timing |

The example `rtl/boot_image.hex` is a four-instruction RV32I loop. Replace it
with the compiled test program.

## Where this design makes its own choices

The overall structure is fixed by the setup: a clock generator, a preloaded
memory and an SPI controller with a two-state FSM, edge detectors, shift
registers, an address counter and a command decoder, running at 100 MHz
beside a 20 MHz processor. The clock and baud rates are fixed too. The
following are choices of this implementation and could differ from the
original board:

* fetching a whole 32-bit word from memory when the bit counter enters it and
  selecting bits from it, rather than asking the memory for each bit;
* the opcode values, the status register, the page-program rules (write
  enable, 256-byte page wrap) and the endless wrapping read;
* the 8 KiB flash size and the most-significant-byte-first word layout;
* the two-flop synchronisers and the 16-cycle reset hold;
* the counter-based clock divider;
* the UART's valid/ready interface, mid-bit sampling and error flags.

Not included: the microcontroller itself (its core, timers, interrupts and
SPI master), its GPIO port, and the board-level multiplexers that select the
chip's clock, reset and boot signals from the FPGA or from local parts.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. Run from
the repository root, because the boot image path is relative to it:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/flash_pkg.sv tb/tb_fpga_test_top.sv \
  --top-module tb_fpga_test_top -Mdir obj_top -o sim && ./obj_top/sim
```

Replace the testbench name to run another one:

* `tb_fpga_test_top`: the whole setup at its default sizes. A processor
  model boots from the flash after reset release. It then uses the flash as
  data memory, first without and then with write enable and across a page
  end. Finally it sends "Hello" through the UART, looped back as a terminal
  would echo it. It injects a parity error and a stop-bit error, and fails if
  any mechanism (reset hold and release, both FSM transitions, word fetches,
  writes, a refused write, page wrap, status read, UART frames and error
  flags) never happened.
* `tb_boot_4k_image`: at default sizes, programs a 4 KiB image page by page
  over SPI, then boots it back in one continuous READ and compares every
  byte. This is the size of the largest program the setup has to hold (an
  I²C display driver in about 4 KB).
* `tb_boot_loader`, `tb_spi_controller`, `tb_spi_cmd_decoder`,
  `tb_sync_edge_detect`, `tb_flash_mem`, `tb_clk_gen`, `tb_uart_tx`,
  `tb_uart_rx`: the individual blocks. The SPI controller testbench uses
  random memory contents and checks the reset timing to the cycle. The UART
  testbenches use 16 clocks per bit to stay short, and also check the
  default 1042-cycle bit time.

All testbenches finish in well under a second of run time.
