7fff
7ff5
7fd8
7fa6
7f61
7f09
7e9c
7e1d
7d89
7ce3
7c29
7b5c
7a7c
7989
7884
776b
7641
7504
73b5
7254
70e2
6f5e
6dc9
6c23
6a6d
68a6
66cf
64e8
62f1
60eb
5ed7
5cb3
5a82
5842
55f5
539b
5133
4ebf
4c3f
49b4
471c
447a
41ce
3f17
3c56
398c
36ba
33df
30fb
2e11
2b1f
2826
2528
2223
1f1a
1c0b
18f9
15e2
12c8
0fab
0c8c
096a
0648
0324
0000
fcdc
f9b8
f696
f374
f055
ed38
ea1e
e707
e3f5
e0e6
dddd
dad8
d7da
d4e1
d1ef
cf05
cc21
c946
c674
c3aa
c0e9
be32
bb86
b8e4
b64c
b3c1
b141
aecd
ac65
aa0b
a7be
a57e
a34d
a129
9f15
9d0f
9b18
9931
975a
9593
93dd
9237
90a2
8f1e
8dac
8c4b
8afc
89bf
8895
877c
8677
8584
84a4
83d7
831d
8277
81e3
8164
80f7
809f
805a
8028
800b
8001
800b
8028
805a
809f
80f7
8164
81e3
8277
831d
83d7
84a4
8584
8677
877c
8895
89bf
8afc
8c4b
8dac
8f1e
90a2
9237
93dd
9593
975a
9931
9b18
9d0f
9f15
a129
a34d
a57e
a7be
aa0b
ac65
aecd
b141
b3c1
b64c
b8e4
bb86
be32
c0e9
c3aa
c674
c946
cc21
cf05
d1ef
d4e1
d7da
dad8
dddd
e0e6
e3f5
e707
ea1e
ed38
f055
f374
f696
f9b8
fcdc
0000
0324
0648
096a
0c8c
0fab
12c8
15e2
18f9
1c0b
1f1a
2223
2528
2826
2b1f
2e11
30fb
33df
36ba
398c
3c56
3f17
41ce
447a
471c
49b4
4c3f
4ebf
5133
539b
55f5
5842
5a82
5cb3
5ed7
60eb
62f1
64e8
66cf
68a6
6a6d
6c23
6dc9
6f5e
70e2
7254
73b5
7504
7641
776b
7884
7989
7a7c
7b5c
7c29
7ce3
7d89
7e1d
7e9c
7f09
7f61
7fa6
7fd8
7ff5
