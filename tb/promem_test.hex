@000
0b
30
55
7a
9f
c4
e9
0e
33
58
7d
a2
c7
ec
11
36
5b
80
a5
ca
ef
14
39
5e
83
a8
cd
f2
17
3c
61
86
ab
d0
f5
1a
3f
64
89
ae
d3
f8
1d
42
67
8c
b1
d6
fb
20
45
6a
8f
b4
d9
fe
23
48
6d
92
b7
dc
01
26
@3c0
cb
f0
15
3a
5f
84
a9
ce
f3
18
3d
62
87
ac
d1
f6
1b
40
65
8a
af
d4
f9
1e
43
68
8d
b2
d7
fc
21
46
6b
90
b5
da
ff
24
49
6e
93
b8
dd
02
27
4c
71
96
bb
e0
05
2a
4f
74
99
be
e3
08
2d
52
77
9c
c1
e6
