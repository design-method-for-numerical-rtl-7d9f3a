807f8c
80ff18
817ea4
81fe30
8266b3
82cf36
8337b9
83a03c
845b0d
8515dd
85c2ab
866f78
87124a
87b51b
88504b
88eb7a
89808e
8a15a1
8aa5a8
8b35af
8bc170
8c4d31
8cd543
8d5d55
8de22f
8e6708
8ee908
8f6b07
8fea7b
9069ee
90e716
91643e
91df51
925a64
92d391
934cbe
93c42d
943b9c
94b170
952744
959b9c
960ff3
9682ea
96f5e1
97678f
97d93d
9849b9
98ba34
992991
9998ed
9a073c
9a758b
9ae2dd
9b502e
9bbc92
9c28f5
9c9478
9cfffa
9d6aa9
9dd557
9e3f3d
9ea922
9f124a
9f7b71
9fe3e5
a04c58
a0b421
a11be9
a18310
a1ea36
a250c3
a2b74f
a31d49
a38343
a3e8b2
a44e21
a4b30c
a517f6
a57c63
a5e0cf
a644c4
a6a8b8
a70c3b
a76fbd
a7d2d3
a835e9
a89898
a8fb46
a95d93
a9bfdf
aa21ce
aa83bd
aae553
ab46e9
aba82b
ac096c
ac6a5d
accb4e
ad2bf3
ad8c97
adecf4
ae4d50
aead68
af0d80
afcd2e
b08c62
b14b22
b20975
b2c762
b384ef
b44222
b4ff01
b5bb92
b677db
b733e2
b7efad
b8ab41
b966a3
ba21d9
badce8
bb97d5
bc52a6
bd0d5f
bdc806
be82a0
bf3d32
bff7c2
ffffff
