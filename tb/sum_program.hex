// Program for tb_mips_cpu_hex, one instruction word per line.
// Word 0 (0x80000000) jumps to word 0x30; the program stores
// 1+2+...+10 at 0x0, Fibonacci(20) at 0x4 and 4*(1+...+10) at 0x8,
// then jumps to itself at word 0x42.
@0
08000030
@30
20010000
2002000a
00220820
2042ffff
1440fffd
ac010000
20030000
20040001
20050014
00643020
00801825
00c02025
20a5ffff
14a0fffb
ac030004
8c070000
00074080
ac080008
08000042
