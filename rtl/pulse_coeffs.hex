0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0001
000d
006c
022d
076e
11fc
2111
30bb
3c05
4000
3c05
30bb
2111
11fc
076e
022d
006c
000d
0001
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
ffa8
ffbd
0029
0089
0070
ffdc
ff52
ff66
001f
00c7
008f
ff71
fe83
ff23
017f
03d1
0356
feb6
f81b
f4fb
fb0e
0c16
2381
37e9
4000
37e9
2381
0c16
fb0e
f4fb
f81b
feb6
0356
03d1
017f
ff23
fe83
ff71
008f
00c7
001f
ff66
ff52
ffdc
0070
0089
0029
ffbd
ffa8
003d
008d
0057
ffb4
ff30
ff60
0054
0161
0189
0047
fe32
fcd7
fdb2
00e6
04aa
0611
02fd
fc0f
f52e
f3f0
fc8a
0ee3
25bd
38aa
4000
38aa
25bd
0ee3
fc8a
f3f0
f52e
fc0f
02fd
0611
04aa
00e6
fdb2
fcd7
fe32
0047
0189
0161
0054
ff60
ff30
ffb4
0057
008d
003d
