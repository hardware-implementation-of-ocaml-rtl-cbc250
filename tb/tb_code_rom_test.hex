0000000a
00000013
deadbeef
00000001
12345678
00000090
0000ffff
80000000
