81428a
828952
83d469
8523e2
8677cf
87d043
892d52
8a8f0f
8bf58e
8d60e4
8ed126
904669
91c0c3
93404a
94c515
964f3b
97ded3
9973f6
9b0ebd
9caf41
9e559b
a001e6
a1b43c
a36cb9
a52b78
a6f097
a8bc32
aa8e67
ac6755
ae471a
b02dd7
b21bab
b410b8
b60d20
b81106
ba1c8d
bc2fd9
be4b0f
c06e54
c299d0
c4cdaa
c70a0a
c94f1a
cb9d04
cdf3f3
d05414
d2bd94
d530a1
d7ad6a
da3420
dcc4f5
df601b
e205c7
e4b62d
e77184
ea3804
ed09e6
efe765
f2d0bc
f5c629
f8c7ea
fbd640
fef16d
ffffff
