0000002c
00000001
00000000
0000005c
00000039
00000000
0000002b
00000000
0000006d
00000039
00000001
0000002b
00000000
0000007e
00000039
00000002
00000064
0000006d
0000000a
00000036
00000000
00000022
00000039
00000003
00000068
000000c8
00000036
00000001
00000021
00000065
00000036
00000002
00000021
00000039
00000004
00000068
00000027
0000006b
00000036
00000004
00000022
00000039
00000005
0000005a
00000007
00000068
00000005
0000005c
0000005b
00000055
00000003
00000080
00000002
00000039
00000006
00000068
0000007e
0000006d
00000054
0000005f
00000000
00000039
00000007
00000035
00000003
0000005e
00000001
00000039
00000008
00000064
0000005e
00000002
00000039
00000009
00000035
00000008
00000085
0000000a
0000000e
00000035
00000005
00000085
0000002a
00000009
00000035
00000006
00000085
00000007
00000004
00000035
00000007
00000090
00000064
00000090
00000029
0000002a
00000001
00000000
00000085
00000000
00000004
00000001
00000028
00000002
00000001
0000000b
00000040
00000000
00000009
00000001
00000080
ffffffff
00000009
0000002e
00000024
00000002
00000004
00000000
00000085
00000000
00000004
00000064
00000028
00000001
00000064
0000006d
00000032
00000036
00000000
00000022
00000000
00000080
ffffffff
00000009
00000035
00000001
00000025
00000002
00000029
0000002a
00000002
00000002
0000000c
0000006f
0000000b
0000006f
00000028
00000003
