1234
abcd
0f0f
