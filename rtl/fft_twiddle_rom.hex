7fff0000
7ffe00c9
7ffd0192
7ff9025b
7ff50324
7ff003ed
7fe904b6
7fe1057f
7fd80648
7fcd0711
7fc107d9
7fb408a2
7fa6096a
7f970a33
7f860afb
7f740bc4
7f610c8c
7f4d0d54
7f370e1c
7f210ee3
7f090fab
7eef1072
7ed5113a
7eb91201
7e9c12c8
7e7e138f
7e5f1455
7e3e151c
7e1d15e2
7dfa16a8
7dd5176e
7db01833
7d8918f9
7d6219be
7d391a82
7d0e1b47
7ce31c0b
7cb61ccf
7c881d93
7c591e57
7c291f1a
7bf81fdd
7bc5209f
7b912161
7b5c2223
7b2622e5
7aee23a6
7ab62467
7a7c2528
7a4125e8
7a0526a8
79c82767
79892826
794a28e5
790929a3
78c72a61
78842b1f
783f2bdc
77fa2c99
77b32d55
776b2e11
77222ecc
76d82f87
768d3041
764130fb
75f331b5
75a5326e
75553326
750433df
74b23496
745f354d
740a3604
73b536ba
735e376f
73073824
72ae38d9
7254398c
71f93a40
719d3af2
71403ba5
70e23c56
70833d07
70223db8
6fc13e68
6f5e3f17
6efb3fc5
6e964073
6e304121
6dc941ce
6d61427a
6cf84325
6c8e43d0
6c23447a
6bb74524
6b4a45cd
6adc4675
6a6d471c
69fd47c3
698b4869
6919490f
68a649b4
68324a58
67bc4afb
67464b9d
66cf4c3f
66564ce0
65dd4d81
65634e20
64e84ebf
646c4f5d
63ee4ffb
63705097
62f15133
627151ce
61f05268
616e5302
60eb539b
60685432
5fe354c9
5f5d5560
5ed755f5
5e4f568a
5dc7571d
5d3e57b0
5cb35842
5c2858d3
5b9c5964
5b0f59f3
5a825a82
59f35b0f
59645b9c
58d35c28
58425cb3
57b05d3e
571d5dc7
568a5e4f
55f55ed7
55605f5d
54c95fe3
54326068
539b60eb
5302616e
526861f0
51ce6271
513362f1
50976370
4ffb63ee
4f5d646c
4ebf64e8
4e206563
4d8165dd
4ce06656
4c3f66cf
4b9d6746
4afb67bc
4a586832
49b468a6
490f6919
4869698b
47c369fd
471c6a6d
46756adc
45cd6b4a
45246bb7
447a6c23
43d06c8e
43256cf8
427a6d61
41ce6dc9
41216e30
40736e96
3fc56efb
3f176f5e
3e686fc1
3db87022
3d077083
3c5670e2
3ba57140
3af2719d
3a4071f9
398c7254
38d972ae
38247307
376f735e
36ba73b5
3604740a
354d745f
349674b2
33df7504
33267555
326e75a5
31b575f3
30fb7641
3041768d
2f8776d8
2ecc7722
2e11776b
2d5577b3
2c9977fa
2bdc783f
2b1f7884
2a6178c7
29a37909
28e5794a
28267989
276779c8
26a87a05
25e87a41
25287a7c
24677ab6
23a67aee
22e57b26
22237b5c
21617b91
209f7bc5
1fdd7bf8
1f1a7c29
1e577c59
1d937c88
1ccf7cb6
1c0b7ce3
1b477d0e
1a827d39
19be7d62
18f97d89
18337db0
176e7dd5
16a87dfa
15e27e1d
151c7e3e
14557e5f
138f7e7e
12c87e9c
12017eb9
113a7ed5
10727eef
0fab7f09
0ee37f21
0e1c7f37
0d547f4d
0c8c7f61
0bc47f74
0afb7f86
0a337f97
096a7fa6
08a27fb4
07d97fc1
07117fcd
06487fd8
057f7fe1
04b67fe9
03ed7ff0
03247ff5
025b7ff9
01927ffd
00c97ffe
