a5a5
b4b4
8787
9696
e1e1
f0f0
c3c3
d2d2
2d2d
3c3c
0f0f
1e1e
6969
7878
4b4b
5a5a
