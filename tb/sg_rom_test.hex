3
0
5
2
7
4
1
6
3
0
5
2
7
4
1
6
3
0
5
2
7
