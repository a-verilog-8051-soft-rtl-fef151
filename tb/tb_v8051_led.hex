// Port test program: rotate P0/P1 inputs through A and B (21 bytes)
E5 80 85 90 F0 7D 04 33 F5 80 C5 F0 13 F5 90 C5
F0 DD F4 80 EB
