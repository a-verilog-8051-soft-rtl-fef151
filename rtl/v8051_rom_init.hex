// Test program: B=12h, A=3Ah, R5=4; loop RLC A -> P0, XCH, RRC A -> P1, XCH; DJNZ R5; SJMP 0
75
F0
12
74
3A
7D
04
33
F5
80
C5
F0
13
F5
90
C5
F0
DD
F4
80
EB
00
00
