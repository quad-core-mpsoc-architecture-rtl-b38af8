04520
0A503
14500
35418
0013F
2C110
04312
00400
00140
19140
00280
19240
14300
35016
2C110
04012
2C210
2C012
18101
18201
1C301
3540E
00001
2C020
34018
