// Demo program: load the words at 0x20 and 0x24, add them, store the sum
// at 0x28, halt. One 32-bit little-endian word per line, from address 0.
02002083
02402103
002081b3
02302423
00100073
00000000
00000000
00000000
0000002a
0000000d
00000000
