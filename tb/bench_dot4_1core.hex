04520
0A503
14500
3541F
00400
30020
00404
30020
00408
30020
0040C
30020
00160
30043
3002D
00164
30043
00700
30032
00168
30043
00700
30032
0016C
30043
00700
30032
00180
30049
00001
2C020
3401F
00140
19140
30043
3002D
00150
19140
30043
00702
30032
00160
19140
30049
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
3503B
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
