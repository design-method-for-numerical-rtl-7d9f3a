8073
80e7
815b
81cf
8243
82b7
832b
839f
8413
8487
84fb
856f
85e3
8657
86cb
8740
87b5
882a
889f
8914
8989
89fe
8a74
8aea
8b60
8bd6
8c4c
8cc2
8d39
8db0
8e27
8e9e
8f16
8f8e
9006
907e
90f7
9170
91e9
9263
92dd
9357
93d2
944d
94c8
9544
95c0
963d
96ba
9738
97b6
9835
98b4
9934
99b4
9a35
9ab6
9b38
9bbb
9c3e
9cc2
9d47
9dcc
9e52
9ed9
9f61
9fea
a073
a0fd
a188
a214
a2a1
a32f
a3be
a44f
a4e1
a574
a608
a69e
a735
a7ce
a869
a905
a9a3
aa43
aae5
ab89
ac30
acd9
ad85
ae34
aee6
af9b
b054
b111
b172
b1d2
b235
b298
b2fe
b363
b3cc
b434
b4a0
b50c
b57c
b5ec
b661
b6d5
b750
b7ca
b84b
b8cc
b956
b9df
ba74
bb09
bbaf
bc54
bcb5
bd15
bd75
bdd5
be53
bed0
bf4d
bfca
ffff
