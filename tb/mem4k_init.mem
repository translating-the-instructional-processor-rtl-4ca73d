0000000100000001
1010101111001101
1111111111111111
0000000000000111
