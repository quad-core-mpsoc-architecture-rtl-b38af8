04020
0A003
14000
35041
34099
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
00000
2E000
2E001
2E002
2E003
2E004
2E005
2E006
2E007
2C022
30022
2E810
2E911
2EA12
2EB13
00100
30016
00702
30005
2E820
2E921
2EA22
2EB23
06810
06911
06A12
06B13
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
2E824
2E925
2EA26
2EB27
06810
06911
06A12
06B13
06C04
06D05
06E06
06F07
2E804
2E905
2EA06
2EB07
00701
30005
00108
30016
00702
30005
2E828
2E929
2EA2A
2EB2B
06820
06921
06A22
06B23
06C24
06D25
06E26
06F27
00700
30005
06C28
06D29
06E2A
06F2B
30005
30027
3404E
34099
