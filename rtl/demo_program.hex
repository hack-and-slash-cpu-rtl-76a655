// Demo program: one instruction per line from address 0, {3 unused bits, 5-bit opcode, 8-bit data}
1b05
0000
0c10
0400
0700
0110
0c11
1b0f
0800
0500
0e0c
1900
1b7f
0400
0000
0f11
1900
0e13
1300
0f15
0900
0a00
0600
1a00
0311
0b10
0200
0c12
1000
1200
0e20
1900
1100
0d24
1900
1800
1800
0c13
0b13
0a00
1b03
0000
0500
0e2d
0d2a
0c14
1b80
0200
0c15
1f00
0b12
0b14
0b15
1900
