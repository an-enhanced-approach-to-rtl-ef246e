d1310ba6
98dfb5ac
2ffd72db
d01adfb7
b8e1afed
6a267e96
ba7c9045
f12c7f99
24a19947
b3916cf7
0801f2e2
858efc16
636920d8
71574e69
a458fea3
f4933d7e
0d95748f
728eb658
718bcd58
82154aee
7b54a41d
c25a59b5
9c30d539
2af26013
c5d1b023
286085f0
ca417918
b8db38ef
8e79dcb0
603a180e
6c9e0e8b
b01e8a3e
d71577c1
bd314b27
78af2fda
55605c60
e65525f3
aa55ab94
57489862
63e81440
55ca396a
2aab10b6
b4cc5c34
1141e8ce
a15486af
7c72e993
b3ee1411
636fbc2a
2ba9c55d
741831f6
ce5c3e16
9b87931e
afd6ba33
6c24cf5c
7a325381
28958677
3b8f4898
6b4bb9af
c4bfe81b
66282193
61d809cc
fb21a991
487cac60
5dec8032
ef845d5d
e98575b1
dc262302
eb651b88
23893e81
d396acc5
0f6d6ff3
83f44239
2e0b4482
a4842004
69c8f04a
9e1f9b5e
21c66842
f6e96c9a
670c9c61
abd388f0
6a51a0d2
d8542f68
960fa728
ab5133a3
6eef0b6c
137a3be4
ba3bf050
7efb2a98
a1f1651d
39af0176
66ca593e
82430e88
8cee8619
456f9fb4
7d84a5c3
3b8b5ebe
e06f75d8
85c12073
401a449f
56c16aa6
4ed3aa62
363f7706
1bfedf72
429b023d
37d0d724
d00a1248
db0fead3
49f1c09b
075372c9
80991b7b
25d479d8
f6e8def7
e3fe501a
b6794c3b
976ce0bd
04c006ba
c1a94fb6
409f60c4
5e5c9ec2
196a2463
68fb6faf
3e6c53b5
1339b2eb
3b52ec6f
6dfc511f
9b30952c
cc814544
af5ebd09
bee3d004
de334afd
660f2807
192e4bb3
c0cba857
45c8740f
d20b5f39
b9d3fbdb
5579c0bd
1a60320a
d6a100c6
402c7279
679f25fe
fb1fa3cc
8ea5e9f8
db3222f8
3c7516df
fd616b15
2f501ec8
ad0552ab
323db5fa
fd238760
53317b48
3e00df82
9e5c57bb
ca6f8ca0
1a87562e
df1769db
d542a8f6
287effc3
ac6732c6
8c4f5573
695b27b0
bbca58c8
e1ffa35d
b8f011a0
10fa3d98
fd2183b8
4afcb56c
2dd1d35b
9a53e479
b6f84565
d28e49bc
4bfb9790
e1ddf2da
a4cb7e33
62fb1341
cee4c6e8
ef20cada
36774c01
d07e9efe
2bf11fb4
95dbda4d
ae909198
eaad8e71
6b93d5a0
d08ed1d0
afc725e0
8e3c5b2f
8e7594b7
8ff6e2fb
f2122b64
8888b812
900df01c
4fad5ea0
688fc31c
d1cff191
b3a8c1ad
2f2f2218
be0e1777
ea752dfe
8b021fa1
e5a0cc0f
b56f74e8
18acf3d6
ce89e299
b4a84fe0
fd13e0b7
7cc43b81
d2ada8d9
165fa266
80957705
93cc7314
211a1477
e6ad2065
77b5fa86
c75442f5
fb9d35cf
ebcdaf0c
7b3e89a0
d6411bd3
ae1e7e49
00250e2d
2071b35e
226800bb
57b8e0af
2464369b
f009b91e
5563911d
59dfa6aa
78c14389
d95a537f
207d5ba2
02e5b9c5
83260376
6295cfa9
11c81968
4e734a41
b3472dca
7b14a94a
1b510052
9a532915
d60f573f
bc9bc6e4
2b60a476
81e67400
08ba6fb5
571be91f
f296ec6b
2a0dd915
b6636521
e7b9f9b6
ff34052e
c5855664
53b02d5d
a99f8fa1
08ba4799
6e85076a
4b7a70e9
b5b32944
db75092e
c4192623
ad6ea6b0
49a7df7d
9cee60b8
8fedb266
ecaa8c71
699a17ff
5664526c
c2b19ee1
193602a5
75094c29
a0591340
e4183a3e
3f54989a
5b429d65
6b8fe4d6
99f73fd6
a1d29c07
efe830f5
4d2d38e6
f0255dc1
4cdd2086
8470eb26
6382e9c6
021ecc5e
09686b3f
3ebaefc9
3c971814
6b6a70a1
687f3584
52a0e286
b79c5305
aa500737
3e07841c
7fdeae5c
8e7d44ec
5716f2b8
b03ada37
f0500c0d
f01c1f04
0200b3ff
ae0cf51a
3cb574b2
25837a58
dc0921bd
d19113f9
7ca92ff6
94324773
22f54701
3ae5e581
37c2dadc
c8b57634
9af3dda7
a9446146
0fd0030e
ecc8c73e
a4751e41
e238cd99
3bea0e2f
3280bba1
183eb331
4e548b38
4f6db908
6f420d03
f60a04bf
2cb81290
24977c79
5679b072
bcaf89af
de9a771f
d9930810
b38bae12
dccf3f2e
5512721f
2e6b7124
501adde6
9f84cd87
7a584718
7408da17
bc9f9abc
e94b7d8c
ec7aec3a
db851dfa
63094366
c464c3d2
ef1c1847
3215d908
dd433b37
24c2ba16
12a14d43
2a65c451
50940002
133ae4dd
71dff89e
10314e55
81ac77d6
5f11199b
043556f1
d7a3c76b
3c11183b
5924a509
f28fe6ed
97f1fbfa
9ebabf2c
1e153c6e
86e34570
eae96fb1
860e5e0a
5a3e2ab3
771fe71c
4e3d06fa
2965dcb9
99e71d0f
803e89d6
5266c825
2e4cc978
9c10b36a
c6150eba
94e2ea78
a5fc3c53
1e0a2df4
f2f74ea7
361d2b3d
1939260f
19c27960
5223a708
f71312b6
ebadfe6e
eac31f66
e3bc4595
a67bc883
b17f37d1
018cff28
c332ddef
be6c5aa5
65582185
68ab9802
eecea50f
db2f953b
2aef7dad
5b6e2f84
1521b628
29076170
ecdd4775
619f1510
13cca830
eb61bd96
0334fe1e
aa0363cf
b5735c90
4c70a239
d59e9e0b
cbaade14
eecc86bc
60622ca7
9cab5cab
b2f3846e
648b1eaf
19bdf0ca
a02369b9
655abb50
40685a32
3c2ab4b3
319ee9d5
c021b8f7
9b540b19
875fa099
95f7997e
623d7da8
f837889a
97e32d77
11ed935f
16681281
0e358829
c7e61fd6
96dedfa1
7858ba99
57f584a5
1b227263
9b83c3ff
1ac24696
cdb30aeb
532e3054
8fd948e4
6dbc3128
58ebf2ef
34c6ffea
fe28ed61
ee7c3c73
5d4a14d9
e864b7e3
42105d14
203e13e0
45eee2b6
a3aaabea
db6c4f15
facb4fd0
c742f442
ef6abbb5
654f3b1d
41cd2105
d81e799e
86854dc7
e44b476a
3d816250
cf62a1f2
5b8d2646
fc8883a0
c1c7b6a3
7f1524c3
69cb7492
47848a0b
5692b285
095bbf00
ad19489d
1462b174
23820e00
58428d2a
0c55f5ea
1dadf43e
233f7061
3372f092
8d937e41
d65fecf1
6c223bdb
7cde3759
cbee7460
4085f2a7
ce77326e
a6078084
19f8509e
e8efd855
61d99735
a969a7aa
c50c06c2
5a04abfc
800bcadc
9e447a2e
c3453484
fdd56705
0e1e9ec9
db73dbd3
105588cd
675fda79
e3674340
c5c43465
713e38d8
3d28f89e
f16dff20
153e21e7
8fb03d4a
e6e39f2b
db83adf7
