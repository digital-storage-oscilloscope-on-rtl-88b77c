0fc
0fc
303
303
30f
30f
333
333
3c3
3c3
303
303
0fc
0fc
000
030
030
0f0
0f0
030
030
030
030
030
030
030
030
0fc
0fc
000
0fc
0fc
303
303
003
003
00c
00c
030
030
0c0
0c0
3ff
3ff
000
3ff
3ff
00c
00c
030
030
00c
00c
003
003
303
303
0fc
0fc
000
00c
00c
03c
03c
0cc
0cc
30c
30c
3ff
3ff
00c
00c
00c
00c
000
3ff
3ff
300
300
3fc
3fc
003
003
003
003
303
303
0fc
0fc
000
03c
03c
0c0
0c0
300
300
3fc
3fc
303
303
303
303
0fc
0fc
000
3ff
3ff
003
003
00c
00c
030
030
0c0
0c0
0c0
0c0
0c0
0c0
000
0fc
0fc
303
303
303
303
0fc
0fc
303
303
303
303
0fc
0fc
000
0fc
0fc
303
303
303
303
0ff
0ff
003
003
00c
00c
0f0
0f0
000
0fc
0fc
303
303
303
303
3ff
3ff
303
303
303
303
303
303
000
3fc
3fc
303
303
303
303
3fc
3fc
303
303
303
303
3fc
3fc
000
0fc
0fc
303
303
300
300
300
300
300
300
303
303
0fc
0fc
000
3f0
3f0
30c
30c
303
303
303
303
303
303
30c
30c
3f0
3f0
000
3ff
3ff
300
300
300
300
3fc
3fc
300
300
300
300
3ff
3ff
000
3ff
3ff
300
300
300
300
3fc
3fc
300
300
300
300
300
300
000
0fc
0fc
303
303
300
300
33f
33f
303
303
303
303
0ff
0ff
000
303
303
303
303
303
303
3ff
3ff
303
303
303
303
303
303
000
0fc
0fc
030
030
030
030
030
030
030
030
030
030
0fc
0fc
000
03f
03f
00c
00c
00c
00c
00c
00c
00c
00c
30c
30c
0f0
0f0
000
303
303
30c
30c
330
330
3c0
3c0
330
330
30c
30c
303
303
000
300
300
300
300
300
300
300
300
300
300
300
300
3ff
3ff
000
303
303
3cf
3cf
333
333
333
333
303
303
303
303
303
303
000
303
303
303
303
3c3
3c3
333
333
30f
30f
303
303
303
303
000
0fc
0fc
303
303
303
303
303
303
303
303
303
303
0fc
0fc
000
3fc
3fc
303
303
303
303
3fc
3fc
300
300
300
300
300
300
000
0fc
0fc
303
303
303
303
303
303
333
333
30c
30c
0f3
0f3
000
3fc
3fc
303
303
303
303
3fc
3fc
330
330
30c
30c
303
303
000
0ff
0ff
300
300
300
300
0fc
0fc
003
003
003
003
3fc
3fc
000
3ff
3ff
030
030
030
030
030
030
030
030
030
030
030
030
000
303
303
303
303
303
303
303
303
303
303
303
303
0fc
0fc
000
303
303
303
303
303
303
303
303
303
303
0cc
0cc
030
030
000
303
303
303
303
303
303
333
333
333
333
333
333
0cc
0cc
000
303
303
303
303
0cc
0cc
030
030
0cc
0cc
303
303
303
303
000
303
303
303
303
303
303
0cc
0cc
030
030
030
030
030
030
000
3ff
3ff
003
003
00c
00c
030
030
0c0
0c0
300
300
3ff
3ff
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
0f0
0f0
0f0
0f0
000
000
000
0f0
0f0
0f0
0f0
000
000
0f0
0f0
0f0
0f0
000
000
000
000
000
000
000
000
000
3ff
3ff
000
000
000
000
000
000
000
