04520
0A503
01450
20406
20406
30023
14500
3500B
00001
2C020
34022
04020
0A0E0
140E0
3540B
00160
30046
30030
00164
30046
00700
30035
00168
30046
00700
30035
0016C
30046
00700
30035
00180
3004C
00001
2C020
34022
00140
19140
30046
30030
00150
19140
30046
00702
30035
00160
19140
3004C
2A000
018C0
019D0
01AE0
01BF0
2A000
2C800
2C901
2CA02
2CB03
2CC04
2CD05
2CE06
2CF07
2C708
04008
12001
3503E
04800
04901
04A02
04B03
2A000
2C110
04C12
04D12
04E12
04F12
2A000
2C110
2C812
2C912
2CA12
2CB12
2A000
