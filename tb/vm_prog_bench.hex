0000002b
00000000
0000020a
00000039
00000000
0000002b
00000000
00000224
00000039
00000001
0000002b
00000000
00000242
00000039
00000002
00000064
0000006d
00000008
00000040
00000000
0000006d
0000000a
00000040
00000000
0000006b
00000040
00000000
0000006d
0000000c
00000040
00000000
00000009
00000064
0000006a
00000040
00000000
0000006d
00000005
00000040
00000000
0000006b
00000040
00000000
0000006d
00000012
00000040
00000000
00000009
0000002b
00000000
000001cc
00000036
00000000
00000023
00000039
00000003
00000035
00000003
00000009
0000002b
00000000
000001c9
00000036
00000001
00000022
00000039
00000004
00000035
00000004
0000005e
00000001
00000039
00000005
00000068
00000006
0000006d
0000000c
0000006d
00000012
00000036
00000002
00000023
00000039
00000006
0000002b
00000000
00000185
00000039
00000007
00000068
00000007
0000006d
000007d0
00000036
00000007
00000022
00000039
00000008
00000068
00000007
0000006d
000007d0
0000005f
00000000
00000039
00000009
0000002b
00000000
000000cd
00000039
0000000a
0000002b
00000000
000000cd
00000039
0000000b
0000002b
00000000
000000cd
00000039
0000000c
0000002b
00000000
000000ce
00000039
0000000d
0000002b
00000000
000000d2
00000039
0000000e
00000035
0000000c
00000036
0000000b
00000036
0000000d
00000022
00000009
00000035
0000000a
00000036
0000000d
00000022
00000039
0000000f
00000066
0000006d
00000014
00000036
0000000f
00000036
0000000e
00000023
00000039
00000010
0000002b
00000000
000000cb
00000039
00000011
0000002b
00000000
000000f8
00000039
00000012
0000002b
00000000
00000119
00000039
00000013
00000064
0000006d
000000c8
0000006a
00000036
00000013
00000023
00000039
00000014
00000035
00000014
0000006d
000000c8
00000036
00000012
00000022
00000039
00000015
00000035
00000014
0000006d
000003e8
00000036
00000012
00000022
00000039
00000016
0000002b
00000000
000001b6
00000039
00000018
00000064
0000006d
00000064
00000009
00000001
0000000b
00000040
00000000
00000014
00000001
00000000
00000080
ffffffff
00000014
00000000
00000000
00000056
fffffff3
00000001
00000039
00000017
00000013
00000002
00000068
00000032
00000039
00000019
0000005a
00000009
00000035
00000017
00000036
00000018
00000021
0000005b
00000055
00000003
00000035
00000017
00000039
0000001a
00000068
000003e8
00000039
00000019
0000005a
00000009
00000035
00000017
00000036
00000018
00000021
0000005b
00000055
00000003
00000035
00000017
00000039
0000001b
0000002b
00000000
0000019e
00000039
0000001d
0000002b
00000000
000001ca
00000039
0000001e
0000002b
00000000
000001f0
00000039
0000001f
00000068
00000008
00000039
00000021
00000064
0000006d
00000008
00000036
0000001f
00000022
00000039
0000001c
0000002b
00000000
000001f1
00000039
00000022
00000064
0000006d
00000010
00000036
00000022
00000022
00000039
00000023
00000068
00000007
0000006d
000007d0
0000005f
00000003
00000039
00000024
00000035
00000006
00000090
00000000
00000080
00000001
00000028
00000001
00000000
0000000a
0000006f
00000028
00000001
00000000
00000080
ffffffff
00000028
00000001
00000029
0000002a
00000002
00000002
0000000c
00000021
0000000b
00000025
00000004
00000029
0000002a
00000002
00000001
00000057
0000000f
00000002
0000000b
00000021
00000009
00000002
00000080
ffffffff
00000009
00000002
00000036
0000000e
00000024
00000003
00000006
00000002
00000028
00000003
00000029
0000002a
00000001
00000001
00000056
00000008
00000064
0000000b
00000069
00000041
00000000
00000028
00000002
00000001
00000044
0000000b
0000007c
00000057
00000011
00000001
00000043
0000000b
00000036
00000011
00000022
00000009
00000002
00000045
0000000d
00000044
0000000c
00000041
00000000
00000028
00000003
00000001
00000045
0000000b
00000036
00000011
00000022
00000009
00000002
00000044
0000000d
00000043
00000041
00000000
00000028
00000002
00000029
0000002a
00000001
00000001
00000057
0000001e
00000001
00000044
0000000b
0000007a
00000056
00000015
00000001
00000044
0000000b
0000007c
00000057
00000008
00000001
00000043
0000000b
00000036
00000012
00000026
00000004
00000001
00000045
0000000b
00000036
00000012
00000026
00000004
00000065
00000028
00000002
00000064
00000028
00000002
00000029
0000002a
00000002
00000001
0000000b
0000007e
00000056
00000010
00000002
0000000b
00000036
00000011
00000022
00000009
00000002
0000000c
00000080
00000001
00000036
00000013
00000024
00000003
00000006
00000002
00000028
00000003
00000029
0000002a
00000001
00000001
0000000b
0000007a
00000057
00000004
00000000
00000028
00000002
00000001
0000000b
0000007e
00000057
0000000b
00000001
0000000b
00000070
00000009
00000002
0000000b
00000036
00000007
00000026
00000005
00000000
0000000c
00000070
00000009
00000001
00000036
00000007
00000026
00000004
00000029
0000002a
00000001
00000001
0000000b
0000005f
00000000
00000028
00000002
00000000
0000006a
0000007b
00000028
00000001
00000029
0000002a
00000002
00000001
00000057
00000017
00000002
00000043
0000000c
00000043
0000000c
00000022
00000009
00000003
00000044
0000000d
00000044
0000000d
00000009
00000035
00000000
00000023
00000009
00000001
00000040
00000000
00000028
00000004
00000064
00000028
00000003
00000029
0000002a
00000001
00000001
00000057
0000001b
00000001
00000043
0000000b
00000021
00000057
0000000e
00000001
00000044
0000000b
00000036
00000001
00000022
00000009
00000002
00000043
00000040
00000000
00000028
00000002
00000001
00000044
0000000b
00000036
00000001
00000026
00000004
00000064
00000028
00000002
00000029
0000002a
00000002
00000000
0000000c
0000007c
00000057
00000027
00000002
0000000c
0000000c
00000080
ffffffff
00000009
00000035
00000002
00000023
00000009
00000001
0000000e
0000000e
00000080
ffffffff
00000009
00000035
00000002
00000023
00000009
00000003
0000000d
00000010
00000080
ffffffff
00000009
00000035
00000002
00000023
00000009
00000001
0000000d
00000009
00000035
00000002
00000024
00000003
00000008
00000002
00000028
00000003
00000000
00000057
00000022
00000000
00000043
00000036
00000019
0000007b
00000057
0000000d
00000000
00000044
00000036
00000018
00000021
00000009
00000001
00000043
00000040
00000000
00000028
00000001
0000005a
00000009
00000004
00000044
00000036
00000018
00000021
0000005b
00000028
00000001
00000000
00000044
00000028
00000001
00000068
0000004d
0000005c
00000029
0000002a
00000002
00000002
00000057
00000026
00000002
00000043
0000000b
0000007b
00000057
00000023
00000000
0000000c
0000006f
00000009
00000003
00000043
0000007b
00000057
0000001a
00000001
0000000b
00000070
00000009
00000003
00000043
0000007b
00000057
00000011
00000002
00000044
00000009
00000002
00000080
00000001
00000009
00000002
00000036
0000001d
00000024
00000003
00000006
00000065
00000028
00000003
00000064
00000028
00000003
00000029
0000002a
00000002
00000000
00000057
00000023
00000002
0000000c
00000009
00000002
00000080
ffffffff
00000036
0000001e
00000023
00000009
00000003
0000006a
0000000d
00000036
0000001d
00000023
00000057
0000000e
00000003
0000000c
00000040
00000000
0000000d
00000080
ffffffff
00000036
0000001f
00000022
0000006f
00000028
00000003
00000000
00000028
00000004
00000064
00000028
00000003
00000029
0000002a
00000001
00000000
00000057
0000000a
00000001
0000000b
00000036
00000021
00000036
0000001e
00000024
00000003
00000005
00000065
00000028
00000002
00000029
0000002a
00000001
00000000
00000057
00000013
00000068
00000007
0000006d
000007d0
00000036
00000007
00000022
0000000c
0000006f
00000009
00000001
00000080
ffffffff
00000036
00000022
00000024
00000002
00000004
00000001
00000028
00000002
