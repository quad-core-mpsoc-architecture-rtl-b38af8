04520
0A503
00303
00140
19150
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
18104
1C301
35405
00001
2C020
34014
