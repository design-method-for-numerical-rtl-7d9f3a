ff5ebb0007e21fe04fe67f5f853
fe1a120007a79fe0ed857e212bd
fcd12200076e9fe188957ce4e7b
fb83da0007370fe2211d7baab82
fa3227000700ffe2b7257a729ad
f8dbf70006cc4fe34ab6793c8ea
f78135000698ffe3dbda7808903
f621cf0006670fe46a9776d69f1
f4bdb10006366fe4f6f575a6b98
f354c70006070fe580fe7478dde
f1e6fb0005d8ffe608b8734d097
f074380005ac2fe68e2d72233a9
eefc6a0005807fe7116370fb70c
ed7f79000555ffe792636fd5a8b
ebfd5000052cafe811346eb1e1c
ea75d80005046fe88dde6d901a2
e8e8f90004dd4fe908686c704f9
e7569b0004b73fe980d96b52805
e5bea60004923fe9f73a6a36aae
e4210100046e2fea6b91691ccd5
e27d9200044b2feadde66804e5a
e0d43f0004291feb4e4066eef1f
df24ef000407ffebbca565daf18
dd6f850003e7cfec291e64c8e15
dbb3e70003c87fec93b063b8c0a
d9f1f80003aa0fecfc6362aa8d4
d8299b00038c7fed633d619e454
d65ab300036fbfedc8456093e73
d48522000353dfee2b825f8b715
d2a8c8000338afee8cfa5e84e13
d0c58700031e4feeecb45d8035c
cedb3f000304bfef4ab65c7d6d6
cce9ce0002ebdfefa7065b7c85a
caf1140002d3aff001ab5a7d7d8
c8f0ed0002bc3ff05aac5980525
c6e9360002a56ff0b20e5885026
c4d9cd00028f4ff107d6578b8cd
c2c28c000279cff15c0d5693ef2
c0a34e000264fff1aeb6559e27b
be7bee000250bff1ffd854aa357
bc4c4300023d1ff24f7953b815a
ba142600022a0ff29d9f52c7c70
b7d36e0002178ff2ea4f51d947a
b589f10002059ff3359050ec95d
b337840001f42ff37f655001afa
b0dbfc0001e34ff3c7d64f18939
ae772c0001d2eff40ee64e313fd
ac08e50001c30ff4549d4d4bb22
a990fa0001b3aff498ff4c67e97
a70f3b0001a4bff4dc114b85e40
a483750001963ff51dd84aa59f4
a1ed780001883ff55e5a49c71a5
9f4d0f00017a9ff59d9c48ea52c
9ca20600016d7ff5dba2480f472
99ec27000160aff618724735f59
972b3c0001545ff65410465e5cb
945f0b0001485ff68e8245887a3
91875a00013cbff6c7cc44b44c5
8ea3ef0001318ff6fff243e1d1a
8bb48d000126aff736fa4311084
88b8f600011c1ff76ce84241ee8
85b0eb000111eff7a1c1417482c
829c290001080ff7d58940a8c2b
80874a0001019ff7f7834021e47
