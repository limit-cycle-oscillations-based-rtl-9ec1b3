0be
0bf
0bc
0bf
0ba
0be
0b8
0be
0b7
0be
0b4
0bd
0b2
0bc
0b1
0bc
0af
0bc
0ac
0bb
0ab
0bb
0aa
0ba
0a7
0ba
0a6
0b9
0a4
0b9
