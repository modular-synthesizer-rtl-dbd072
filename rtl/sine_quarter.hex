0032
0097
00fb
0160
01c4
0229
028d
02f2
0356
03bb
041f
0484
04e8
054d
05b1
0616
067a
06de
0743
07a7
080b
0870
08d4
0938
099d
0a01
0a65
0ac9
0b2d
0b92
0bf6
0c5a
0cbe
0d22
0d86
0dea
0e4e
0eb1
0f15
0f79
0fdd
1041
10a4
1108
116c
11cf
1233
1296
12fa
135d
13c0
1424
1487
14ea
154d
15b0
1613
1676
16d9
173c
179f
1802
1865
18c7
192a
198c
19ef
1a51
1ab4
1b16
1b78
1bda
1c3c
1c9e
1d00
1d62
1dc4
1e26
1e87
1ee9
1f4a
1fac
200d
206f
20d0
2131
2192
21f3
2254
22b5
2315
2376
23d7
2437
2497
24f8
2558
25b8
2618
2678
26d8
2737
2797
27f7
2856
28b5
2915
2974
29d3
2a32
2a91
2af0
2b4e
2bad
2c0b
2c6a
2cc8
2d26
2d84
2de2
2e40
2e9d
2efb
2f58
2fb6
3013
3070
30cd
312a
3187
31e3
3240
329c
32f8
3355
33b1
340c
3468
34c4
351f
357b
35d6
3631
368c
36e7
3742
379c
37f7
3851
38ab
3906
3960
39b9
3a13
3a6c
3ac6
3b1f
3b78
3bd1
3c2a
3c83
3cdb
3d33
3d8c
3de4
3e3c
3e93
3eeb
3f43
3f9a
3ff1
4048
409f
40f6
414c
41a2
41f9
424f
42a5
42fa
4350
43a5
43fb
4450
44a5
44f9
454e
45a3
45f7
464b
469f
46f3
4746
479a
47ed
4840
4893
48e5
4938
498a
49dd
4a2f
4a80
4ad2
4b24
4b75
4bc6
4c17
4c68
4cb8
4d09
4d59
4da9
4df9
4e48
4e98
4ee7
4f36
4f85
4fd4
5022
5070
50be
510c
515a
51a8
51f5
5242
528f
52dc
5328
5374
53c1
540c
5458
54a4
54ef
553a
5585
55d0
561a
5664
56af
56f8
5742
578b
57d5
581e
5867
58af
58f8
5940
5988
59cf
5a17
5a5e
5aa5
5aec
5b33
5b79
5bbf
5c05
5c4b
5c91
5cd6
5d1b
5d60
5da5
5de9
5e2d
5e71
5eb5
5ef8
5f3c
5f7f
5fc2
6004
6047
6089
60cb
610c
614e
618f
61d0
6211
6251
6291
62d1
6311
6351
6390
63cf
640e
644c
648b
64c9
6507
6544
6582
65bf
65fc
6638
6675
66b1
66ed
6728
6764
679f
67da
6814
684f
6889
68c3
68fc
6936
696f
69a8
69e0
6a19
6a51
6a89
6ac0
6af8
6b2f
6b65
6b9c
6bd2
6c08
6c3e
6c74
6ca9
6cde
6d13
6d47
6d7b
6daf
6de3
6e16
6e4a
6e7c
6eaf
6ee1
6f14
6f45
6f77
6fa8
6fd9
700a
703a
706b
709b
70ca
70fa
7129
7158
7186
71b4
71e2
7210
723e
726b
7298
72c4
72f1
731d
7349
7374
739f
73ca
73f5
7420
744a
7474
749d
74c6
74f0
7518
7541
7569
7591
75b8
75e0
7607
762d
7654
767a
76a0
76c6
76eb
7710
7735
7759
777d
77a1
77c5
77e8
780b
782e
7850
7873
7894
78b6
78d7
78f8
7919
7939
795a
7979
7999
79b8
79d7
79f6
7a14
7a32
7a50
7a6d
7a8b
7aa8
7ac4
7ae0
7afc
7b18
7b33
7b4f
7b69
7b84
7b9e
7bb8
7bd2
7beb
7c04
7c1d
7c35
7c4d
7c65
7c7d
7c94
7cab
7cc1
7cd8
7cee
7d04
7d19
7d2e
7d43
7d57
7d6c
7d80
7d93
7da6
7db9
7dcc
7ddf
7df1
7e02
7e14
7e25
7e36
7e47
7e57
7e67
7e77
7e86
7e95
7ea4
7eb2
7ec0
7ece
7edc
7ee9
7ef6
7f02
7f0f
7f1b
7f26
7f32
7f3d
7f48
7f52
7f5c
7f66
7f70
7f79
7f82
7f8a
7f93
7f9b
7fa2
7faa
7fb1
7fb8
7fbe
7fc4
7fca
7fd0
7fd5
7fda
7fdf
7fe3
7fe7
7feb
7fee
7ff1
7ff4
7ff6
7ff8
7ffa
7ffc
7ffd
7ffe
7fff
7fff
