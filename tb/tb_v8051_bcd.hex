// BCD count-down program for 7-segment display (t_bcd_r2) (200 bytes)
79 50 77 40 09 77 79 09 77 24 09 77 30 09 77 1B
09 77 12 09 77 02 09 77 78 09 77 00 09 77 10 79
70 77 01 09 77 02 09 77 04 09 77 08 09 77 16 09
77 32 09 77 64 09 77 28 09 77 01 78 50 E6 F5 80
F5 90 F5 A0 E4 79 7A F7 09 F7 19 78 70 30 A7 FD
AE 80 8E F0 AB F0 E7 FD 7C 07 7A 08 75 5A 00 C3
EB 33 FB E4 50 1D 79 7B E7 BC 07 05 04 F7 79 7A
FF 78 70 EC 28 F8 E6 C3 2D D4 FD 50 06 79 7B E7
04 F7 FF 1C DA D9 0F 19 ED F7 00 78 50 ED F5 B0
54 0F B4 0F 06 ED 54 F9 FD 80 F5 28 F9 E7 F5 80
ED C4 54 0F 28 F9 E7 F5 90 EF 14 28 F9 E7 F5 A0
78 0A 12 00 BD DD D3 7D 99 DF CF 80 93 C0 E0 79
02 D9 FE D8 FA D0 E0 22
