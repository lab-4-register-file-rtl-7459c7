00001010
cafe0001
12345678
0badf00d
89abcdef
00000001
ffffffff
00002000
a5a5a5a5
5a5a5a5a
0000beef
dead0000
13579bdf
2468ace0
7fffffff
80000000
