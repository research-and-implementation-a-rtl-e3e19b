000
019
032
04b
064
07e
097
0b0
0c9
0e2
0fb
113
12c
145
15e
177
18f
1a8
1c1
1d9
1f1
20a
222
23a
252
26a
282
29a
2b2
2c9
2e1
2f8
30f
327
33e
354
36b
382
398
3af
3c5
3db
3f1
407
41c
432
447
45c
471
486
49b
4af
4c3
4d7
4eb
4ff
513
526
539
54c
55f
571
583
596
5a7
5b9
5cb
5dc
5ed
5fd
60e
61e
62e
63e
64e
65d
66c
67b
68a
698
6a6
6b4
6c1
6cf
6dc
6e9
6f5
701
70d
719
724
730
73a
745
74f
759
763
76d
776
77f
787
790
798
79f
7a7
7ae
7b5
7bb
7c2
7c8
7cd
7d3
7d8
7dc
7e1
7e5
7e9
7ec
7f0
7f3
7f5
7f7
7f9
7fb
7fd
7fe
7fe
7ff
7ff
7ff
7fe
7fe
7fd
7fb
7f9
7f7
7f5
7f3
7f0
7ec
7e9
7e5
7e1
7dc
7d8
7d3
7cd
7c8
7c2
7bb
7b5
7ae
7a7
79f
798
790
787
77f
776
76d
763
759
74f
745
73a
730
724
719
70d
701
6f5
6e9
6dc
6cf
6c1
6b4
6a6
698
68a
67b
66c
65d
64e
63e
62e
61e
60e
5fd
5ed
5dc
5cb
5b9
5a7
596
583
571
55f
54c
539
526
513
4ff
4eb
4d7
4c3
4af
49b
486
471
45c
447
432
41c
407
3f1
3db
3c5
3af
398
382
36b
354
33e
327
30f
2f8
2e1
2c9
2b2
29a
282
26a
252
23a
222
20a
1f1
1d9
1c1
1a8
18f
177
15e
145
12c
113
0fb
0e2
0c9
0b0
097
07e
064
04b
032
019
000
fe7
fce
fb5
f9c
f82
f69
f50
f37
f1e
f05
eed
ed4
ebb
ea2
e89
e71
e58
e3f
e27
e0f
df6
dde
dc6
dae
d96
d7e
d66
d4e
d37
d1f
d08
cf1
cd9
cc2
cac
c95
c7e
c68
c51
c3b
c25
c0f
bf9
be4
bce
bb9
ba4
b8f
b7a
b65
b51
b3d
b29
b15
b01
aed
ada
ac7
ab4
aa1
a8f
a7d
a6a
a59
a47
a35
a24
a13
a03
9f2
9e2
9d2
9c2
9b2
9a3
994
985
976
968
95a
94c
93f
931
924
917
90b
8ff
8f3
8e7
8dc
8d0
8c6
8bb
8b1
8a7
89d
893
88a
881
879
870
868
861
859
852
84b
845
83e
838
833
82d
828
824
81f
81b
817
814
810
80d
80b
809
807
805
803
802
802
801
801
801
802
802
803
805
807
809
80b
80d
810
814
817
81b
81f
824
828
82d
833
838
83e
845
84b
852
859
861
868
870
879
881
88a
893
89d
8a7
8b1
8bb
8c6
8d0
8dc
8e7
8f3
8ff
90b
917
924
931
93f
94c
95a
968
976
985
994
9a3
9b2
9c2
9d2
9e2
9f2
a03
a13
a24
a35
a47
a59
a6a
a7d
a8f
aa1
ab4
ac7
ada
aed
b01
b15
b29
b3d
b51
b65
b7a
b8f
ba4
bb9
bce
be4
bf9
c0f
c25
c3b
c51
c68
c7e
c95
cac
cc2
cd9
cf1
d08
d1f
d37
d4e
d66
d7e
d96
dae
dc6
dde
df6
e0f
e27
e3f
e58
e71
e89
ea2
ebb
ed4
eed
f05
f1e
f37
f50
f69
f82
f9c
fb5
fce
fe7
