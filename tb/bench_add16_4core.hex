04520
0A503
00303
00140
19150
19150
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
18108
1C301
35406
00001
2C020
34019
