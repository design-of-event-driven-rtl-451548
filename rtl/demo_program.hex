@001
aa
55
f0
20
ee
05
00
10
08
5a
46
52
54
58
6a
76
78
81
a3
8b
95
a2
@01f
c1
24
c2
25
04
45
28
04
4d
29
04
55
2a
04
5d
2b
04
65
2c
04
6d
2d
04
75
2e
04
7d
2f
c3
26
c4
46
cb
22
c7
23
83
c5
30
c6
45
cc
22
c7
23
83
cd
22
c7
23
84
c5
30
c6
27
c7
26
4e
26
5f
27
ce
22
c7
23
82
c6
e6
cf
22
c7
23
85
c5
31
c1
e5
d0
22
c7
23
87
d1
22
c7
23
86
c5
31
c8
e4
d2
22
c7
23
87
c5
31
d3
22
c7
23
88
32
b0
a0
c9
27
5f
27
d4
22
c7
23
82
a8
c9
27
5f
27
d5
22
c7
23
82
ca
3f
d6
22
c7
23
80
04
7d
90
@3c0
34
02
35
03
36
13
21
49
33
d3
22
c7
23
88
37
15
22
16
23
14
98
