04520
0A503
0013F
2C110
04312
00400
2030E
2030E
01450
00140
19140
00280
19240
14300
35017
2C110
04012
2C210
2C012
18104
18204
1C301
3540F
00001
2C020
34019
