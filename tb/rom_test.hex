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
