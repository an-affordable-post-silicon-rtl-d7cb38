// Example boot image for the flash emulator: one 32-bit RV32I instruction
// word per line, sent most significant bit first.
// addi x1, x0, 1 ; addi x2, x0, 0 ; loop: add x2, x2, x1 ; jal x0, loop
00100093
00000113
00110133
ffdff06f
