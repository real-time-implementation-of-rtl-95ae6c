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
