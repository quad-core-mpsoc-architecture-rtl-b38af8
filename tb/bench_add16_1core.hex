04520
0A503
14500
35419
0030C
00140
2C110
04012
04712
01210
18220
2C210
04612
04812
19060
1B780
18220
2C210
2C012
2C712
18102
1C301
35406
00001
2C020
34019
