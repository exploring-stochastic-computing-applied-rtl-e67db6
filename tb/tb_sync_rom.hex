5a
13
ff
00
80
7f
3c
c4
01
fe
20
e0
11
ee
42
bd
