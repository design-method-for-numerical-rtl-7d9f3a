ffc7fffdd7fff4
ff53fff957ffb4
fedffff4d7ff33
fe6bfff067fe71
fdf7ffebe7fd6e
fd83ffe777fc2b
fd0fffe307faa6
fc9bffde87f8e1
fc27ffda17f6dc
fbb3ffd5a7f496
fb3fffd137f20f
facbffccc7ef48
fa57ffc857ec41
f9e3ffc3e7e8fa
f96fffbf77e572
f8faffbb07e1a2
f885ffb697dd90
f810ffb227d93e
f79bffadc7d4ab
f726ffa957cfd8
f6b1ffa4f7cac4
f63cffa097c570
f5c7ff9c27bfdc
f551ff97c7b9fb
f4dbff9367b3d9
f465ff8f07ad77
f3efff8aa7a6d4
f379ff86479ff1
f302ff81f798be
f28bff7d97914a
f214ff79478996
f19dff74f781a2
f126ff70a7796d
f0aeff6c5770e6
f036ff6807681f
efbeff63c75f18
ef45ff5f8755bc
eeccff5b374c20
ee53ff56f74244
eddaff52c73827
ed60ff4e872db5
ece6ff4a572302
ec6bff461717f8
ebf0ff41e70cad
eb75ff3dc70122
eafaff3996f557
ea7eff3576e934
ea01ff3156dcb7
e984ff2d36cff9
e907ff2916c2fb
e889ff2506b5a2
e80aff20f6a7ed
e78bff1ce699f7
e70cff18d68bc1
e68cff14d67d2e
e60bff10d66e3d
e58aff0cd65f0c
e509ff08e64f9b
e486ff04f63fac
e403ff01062f7c
e380fefd161f0c
e2fbfef9360e1b
e276fef555fcea
e1f1fef185eb79
e16afeedb5d984
e0e3fee9e5c74f
e05afee625b495
dfd1fee265a199
df48fedeb58e5e
debdfedb057a9b
de32fed7556699
dda5fed3b5520c
dd18fed0253d3f
dc89fecc9527e7
dbf9fec9051229
db68fec574fc04
dad5fec204e550
da42febe84ce5c
d9adfebb24b6d9
d916feb7c49ec5
d87efeb4648648
d7e4feb1146d38
d749feadc453be
d6acfeaa9439b1
d60dfea7541f0e
d56cfea43403d6
d4c9fea113e808
d423fe9e03cb76
d37bfe9b03ae4c
d2d1fe98039089
d223fe951371d3
d173fe92335283
d0bffe8f63323c
d008fe8ca3112c
cf4dfe89e2ef23
cebefe87f2d4f5
ce5efe86a2c34c
cdfcfe8552b135
cd99fe84129edf
cd35fe82d28c4a
cccffe81927946
cc68fe80626603
cc00fe7f325280
cb96fe7e023e8d
cb2afe7ce22a2b
cabcfe7bc21558
ca4cfe7aa20015
c9d9fe7991ea30
c965fe7881d40b
c8edfe7781bd13
c873fe7681a5aa
c7f5fe75818d6c
c774fe7491748c
c6effe73b15ad6
c665fe72d1401a
c5d6fe72012457
c541fe7131075b
c4a4fe7080e8c1
c3fefe6fd0c858
c37bfe6f50aebc
c31bfe6f109bf2
c2bbfe6ec08925
c25bfe6e907655
c1ecfe6e506091
c16efe6e2047d9
c0f1fe6e002f51
c074fe6de016c7
c01bfe6de0054d
