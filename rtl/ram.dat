// Program and data image: word n is at byte address 4n. The program starts at 0x28.
00000004  // data word 0 (0x00): 4
00000008  // data word 1 (0x04): 8
12345678  // data word 2 (0x08)
00000000  // data word 3 (0x0c)
00000000  // data word 4 (0x10)
00000000  // data word 5 (0x14)
00000000  // data word 6 (0x18)
00000000  // data word 7 (0x1c)
00000000  // data word 8 (0x20)
00000000  // data word 9 (0x24)
00002083  // 0x28: lw   x1, 0(x0)
00402103  // 0x2c: lw   x2, 4(x0)
00000193  // 0x30: addi x3, x0, 0
00000213  // 0x34: addi x4, x0, 0
001181b3  // 0x38: add  x3, x3, x1   (loop)
00120213  // 0x3c: addi x4, x4, 1
00220463  // 0x40: beq  x4, x2, +8
ff5ff06f  // 0x44: jal  x0, -12
0011e3b3  // 0x48: or   x7, x3, x1
0033f4b3  // 0x4c: and  x9, x7, x3
00148433  // 0x50: add  x8, x9, x1
00700513  // 0x54: addi x10, x0, 7
00256533  // 0x58: or   x10, x10, x2
00802583  // 0x5c: lw   x11, 8(x0)
02802023  // 0x60: sw   x8, 32(x0)
02a02223  // 0x64: sw   x10, 36(x0)
0000006f  // 0x68: jal  x0, 0        (halt)
