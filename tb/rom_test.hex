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
