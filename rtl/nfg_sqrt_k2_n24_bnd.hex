842d41
845c2c
848ccc
84bf2f
84f361
852970
856169
859b5a
85d751
86155d
86558c
8697ed
86dc90
872384
876cda
87b8a1
8806eb
8857c8
88ab4a
890182
895a82
89b65d
8a1525
8a76ee
8adbcb
8b43cf
8baf0f
8c1d9f
8c8f94
8d0504
8d7e04
8dfaaa
8e7b0d
8eff44
8f8766
90138b
90a3cb
91383e
91d0fd
926e22
930fc7
93b606
9460fa
9510be
95c56e
967f26
973e03
980221
98cb9f
999a9a
9a6f31
9b4983
9c29af
9d0fd6
9dfc18
9eee97
9fe774
a0e6d1
a1ecd1
a2f997
a40d47
a52805
a649f6
a77340
a8a409
a9dc77
ab1cb2
ac64e1
adb52d
af0dbf
b06ec0
b1d85a
b34ab9
b4c608
b64a73
b7d826
b96f4f
bb101c
bcbabc
be6f5e
c02e32
c1f769
c3cb34
c5a9c5
c7934f
c98805
cb881b
cc8df1
cd93c6
ce9f81
cfab3c
d0bcf8
d1ceb3
d2e68b
d3fe62
d51c72
d63a81
d75ee5
d88349
d9ae1e
dad8f2
dc0a55
dd3bb7
de73c5
dfabd2
e0eaa9
e2297f
e36f3d
e4b4fb
e601bf
e74e82
e8a26a
e9f652
eb517e
ecacaa
ee0f3a
ef71ca
f0dbde
f245f2
f3b7ab
f52963
f6a2e1
f81c5f
f99dc4
fb1f29
fca897
fe3204
ffffff
