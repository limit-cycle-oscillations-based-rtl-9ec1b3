0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
0c0
