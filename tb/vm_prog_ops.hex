00000068
00000064
0000006d
00000007
00000070
00000039
00000000
00000068
00000006
0000006d
00000007
00000071
00000039
00000001
00000068
00000004
0000006d
ffffffef
00000072
00000039
00000002
00000068
00000004
0000006d
ffffffef
00000073
00000039
00000003
00000068
0000000c
0000006d
0000000a
00000074
0000006d
00000005
00000075
0000006d
00000006
00000076
00000039
00000004
00000068
00000003
0000006d
00000005
00000077
00000039
00000005
00000068
00000002
0000006d
ffffffd8
00000079
00000039
00000006
00000068
00000003
0000006d
00000009
0000007c
0000006d
00000003
0000006d
00000003
0000007d
0000006f
00000039
00000007
00000068
00000005
0000006e
00000080
00000032
00000039
00000008
00000064
00000059
0000006c
00000082
0000006f
00000039
00000009
00000068
00000005
00000084
00000005
00000005
00000068
00000000
00000055
00000016
00000086
00000003
00000003
00000055
00000011
00000089
00000004
0000000e
00000085
00000005
0000000b
00000065
00000057
00000008
00000064
00000056
00000005
00000068
0000004d
00000055
00000003
00000068
0000000d
00000039
0000000a
00000066
00000058
00020003
00000005
00000008
0000000b
0000001e
00000021
00000068
00000064
00000055
00000007
00000068
00000065
00000055
00000003
00000068
00000066
00000039
0000000b
00000064
0000006d
00000009
00000040
00000001
00000058
00020003
00000005
00000004
00000003
00000006
00000009
00000068
00000000
00000055
00000007
00000068
000000c8
00000055
00000003
00000068
000000c9
00000039
0000000c
00000068
0000001e
0000006d
00000014
0000006d
0000000a
0000003e
00000003
00000000
00000009
0000004f
00000039
0000000d
00000066
0000000b
00000050
00000039
0000000e
00000068
00000037
0000006a
0000000c
00000051
00000000
00000044
00000039
0000000f
00000068
00000042
0000000b
0000004b
00000000
00000045
00000039
00000010
00000000
00000081
00000005
00000000
00000043
00000039
00000011
00000000
00000039
00000012
00000037
00000012
00000002
00000038
00000012
00000001
0000006f
00000039
00000013
00000013
00000001
00000068
00000001
0000006d
00000002
0000006d
00000003
00000014
00000001
00000001
0000000b
0000006f
00000039
00000014
00000013
00000002
0000005a
00000009
0000005a
00000004
00000068
00000009
0000005c
00000080
00000001
00000093
00000080
00000064
00000039
00000015
00000035
00000001
00000090
