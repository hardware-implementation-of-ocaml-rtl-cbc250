00000055
00000002
fffffffd
00000fa1
