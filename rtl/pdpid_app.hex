04020
0A003
14000
35041
34064
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
3500E
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
04830
04931
04A32
04B33
2A000
2C830
2C931
2CA32
2CB33
2A000
00100
0089A
00999
00A99
00B3F
3001C
2A000
00104
008CD
009CC
00A4C
00B3D
3001C
2A000
00108
0089A
00999
00A99
00B3E
3001C
2A000
3002C
30033
3003A
00620
2C022
0000E
2C021
04020
0A0E0
140E0
35448
2C022
0000E
2C021
01160
18104
2C110
04812
04912
04A12
04B12
04C12
04D12
04E12
04F12
00700
30005
04C12
04D12
04E12
04F12
30005
30027
0E610
34048
00620
04520
0A503
00000
2E000
2E001
2E002
2E003
04020
12004
3506C
00002
2C020
30022
14501
35082
14502
35084
06C00
06D01
06E02
06F03
2E800
2E901
2EA02
2EB03
00701
30005
00108
3408F
00100
3408F
06C00
06D01
06E02
06F03
00700
30005
2E800
2E901
2EA02
2EB03
00104
30016
00702
30005
01160
01050
20006
20006
19100
3001C
0E610
00001
2C020
3406C
