29
18
bb
6d
de
28
1e
72
cb
17
94
2c
5c
be
1e
2c
2b
b9
5c
2c
2b
28
54
fa
2c
2a
e9
8a
2a
2b
2b
56
fc
93
2b
29
2c
2b
2a
76
5a
28
2a
29
2c
40
2c
2b
2b
1f
6a
38
34
33
29
2a
ba
2b
2b
2b
2a
52
2c
4b
28
29
2c
72
7a
2c
b6
2b
2c
2a
29
74
29
2b
28
66
de
2b
2b
41
29
b3
0a
47
28
6c
2a
28
2c
42
09
02
48
2a
36
29
28
28
a6
2b
2c
67
28
e2
7b
6c
4f
29
28
f9
2b
ad
b6
28
ea
2a
