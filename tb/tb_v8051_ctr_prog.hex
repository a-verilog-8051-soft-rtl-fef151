// Instruction coverage program for the controller testbench (548 bytes)
75 81 70 75 4E 00 75 4F 00 74 25 24 38 F5 30 74
F0 24 20 F5 31 34 01 F5 32 74 80 24 80 85 D0 33
C3 74 10 94 01 F5 34 85 D0 35 75 F0 0D 74 C8 A4
F5 36 85 F0 37 74 FB 75 F0 12 84 F5 38 85 F0 39
74 19 24 28 D4 F5 3A 78 40 76 77 79 41 74 5A F7
E6 54 F0 F5 42 44 05 F5 43 67 F5 44 7A 3C 6A F5
45 75 46 F0 53 46 3C 74 0F 42 46 05 46 1A 8A 47
06 74 B4 23 F5 48 03 C4 F5 49 F4 F5 4A 75 20 00
75 21 00 D2 03 D3 92 08 B2 00 C2 03 80 03 02 02
15 20 00 03 75 4F EE 05 4E 30 00 F2 05 4E C3 40
ED 50 03 75 4F E1 05 4E E4 70 E3 60 03 75 4F E2
05 4E B4 01 03 75 4F E3 40 03 75 4F E4 05 4E 7B
03 75 4D 00 05 4D DB FC 10 00 03 75 4F E5 05 4E
80 03 02 02 15 12 02 1A 51 1A 74 33 C0 E0 E4 D0
4C 90 01 23 74 99 F0 E4 E0 F5 3B 74 5C F3 E4 E3
F5 3C E0 F5 3D 90 02 20 74 02 93 F5 3E 74 03 83
80 02 AA BB F5 3F 90 01 0C 74 02 73 80 C4 05 4E
80 03 02 02 15 7D A1 74 B2 CD F5 50 8D 51 D6 F5
52 75 53 6C C5 53 F5 54 C7 F5 55 D2 D3 78 66 C2
D3 D3 B0 00 92 01 C3 72 01 92 0A B3 A2 01 92 0B
75 56 02 75 57 00 05 57 D5 56 FB 80 03 02 02 15
B7 6C FA 05 4E BA 3B F5 05 4E 74 3B B5 47 EE 05
4E 90 00 FF A3 85 83 58 85 82 59 74 10 14 04 04
F5 5A 16 15 5A 0A 8A 5B 74 11 2A F5 5C 25 5C F5
5D 26 F5 5E 3A F5 5F 95 5C F5 60 21 90 75 4F E6
05 4E 02 01 98 75 4F E7 05 4E 12 02 1D E5 A0 F5
61 20 A7 03 75 4F E8 05 4E 85 81 62 74 96 D3 33
F5 63 13 13 F5 64 75 D0 00 78 65 7A F0 75 65 3C
74 55 5A 46 64 FF F5 66 55 65 45 66 65 65 56 4A
F5 67 75 68 F5 52 68 62 68 63 68 F0 43 68 03 FB
AC 65 EC F5 69 86 6A 79 6B A7 67 00 D3 74 20 9B
F5 6C 96 F5 6D 35 65 36 F5 6E 75 2F 05 D3 82 79
A0 79 74 00 33 F5 6F 82 78 A0 7A 92 7B B3 92 7C
75 90 A5 80 FE 75 4F BD 80 F9 05 4E 22 05 4E 32
11 22 33 44
