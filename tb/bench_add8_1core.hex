04520
0A503
14500
35415
0030C
00140
2C110
04012
01210
18220
2C210
04612
19060
18220
2C210
2C012
18101
1C301
35406
00001
2C020
34015
