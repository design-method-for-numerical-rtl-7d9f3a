ffc03afffd886fffd8a97fff633
ff40aefffd887fff89fe7ffa7ce
fec122fffd88afff3b577ff0b06
fe4196fffd88fffeecb77fe1fe1
fdcd8efffd894ffea53a7fd05ee
fd650bfffd89affe64de7fbd083
fcfc88fffd8a1ffe248e7fa6690
fc9405fffd8a9ffde44a7f8c81f
fc025bfffd8b6ffd8ad07f62f00
fb478bfffd8c9ffd183d7f24513
fa93bcfffd8dfffcaa2e7ede2ee
f9e6eefffd8f7ffc40a77e91af8
f93f1ffffd910ffbda6d7e3ee36
f89c4dfffd92bffb77807de68e5
f7fd4dfffd948ffb172b7d88b77
f7621dfffd967ffab96e7d25ed1
f6c9fcfffd987ffa5dd37cbe32d
f634e8fffd9a8ffa045b7c51f5f
f5a25bfffd9cbff9acb67be1389
f51254fffd9efff956e27b6c529
f48470fffda14ff902a67af3446
f3f8affffda3bff8b0017a76575
f36ec6fffda63ff85ec879f58ba
f2e6b4fffda8bff80efa79711e7
f2603efffdab5ff7c07578e90fa
f1db64fffdae0ff77338785d946
f157f8fffdb0cff7272a77ceae5
f0d5f8fffdb39ff6dc48773c89a
f0553ffffdb68ff6927f76a7288
efd5cbfffdb97ff649cd760eb1b
ef577efffdbc7ff602207573282
eeda56fffdbf7ff5bb7974d4ae1
ee5e38fffdc29ff575c87433441
ede325fffdc5cff5310d738f0c9
ed6905fffdc8fff4ed3b72e8070
ecefd8fffdcc4ff4aa53723e517
ec778afffdcf9ff468487191ec9
ec001bfffdd2fff4271d70e2f3c
eb897afffdd66ff3e6c67031689
eb13a6fffdd9dff3a7446f7d62a
ea9e90fffddd5ff3688f6ec6e36
ea2a38fffde0eff32aa66e0e022
e9b691fffde48ff2ed846d52c0c
e9439afffde83ff2b1276c95335
e8d148fffdebeff275896bd55ca
e85f9afffdefaff23aab6b134f6
e7ee85fffdf36ff200866a4f0c5
e77e09fffdf73ff1c71b6988a65
e70e1dfffdfb1ff18e6568c0200
e69ec1fffdff0ff1566467f58b2
e62febfffe02fff11f146728e6f
e5c19cfffe06fff0e874665a461
e553ccfffe0afff0b2806589a9e
e4e67afffe0f0ff07d3a64b7206
e479a0fffe131ff0489c63e2ada
e40d3cfffe173ff014a7630c5cc
e3a149fffe1b6fefe1586234329
e335c7fffe1f9fefaeb0615a3d9
e2caaefffe23dfef7ca9607e7b8
e26000fffe281fef4b475fa0fe2
e1f5b6fffe2c6fef1a845ec1c46
e18bd0fffe30cfeeea625de0db6
e1224afffe352feebade5cfe476
e0b922fffe398fee8bf75c1a10c
e05055fffe3dffee5dad5b343d3
dfe7e1fffe426fee2ffe5a4cd46
df7fc3fffe46efee02ea5963db7
df17fbfffe4b6fedd66f58795e1
deb083fffe4fffedaa8c578d59f
de495dfffe548fed7f42569fdee
dde283fffe592fed548d55b0ea0
dd7bf7fffe5dcfed2a7054c08ac
dd15b4fffe627fed00e753cebff
dcafbafffe672fecd7f352db93f
dc4a05fffe6bdfecaf9251e7079
dbe496fffe709fec87c550f1272
db7f69fffe755fec608a4ff9f2f
db1a7ffffe7a2fec39e14f01773
dab5d3fffe7effec13c94e07b13
da5167fffe83cfebee434d0caf6
d9ed36fffe88afebc94c4c106e9
d98942fffe8d8feba4e54b12fd0
d92586fffe927feb810d4a14571
d8c204fffe976feb5dc449148ae
d85eb8fffe9c5feb3b094813970
d7fba2fffea15feb18dc4711842
d798bffffea65feaf73b460e530
d73611fffeab5fead629450a117
d6d393fffeb05feab5a24404baa
d67147fffeb56fea95a742fe5c3
d60f29fffeba8fea763841f6f3b
d5ad3afffebf9fea575440ee8be
d54b78fffec4bfea38fc3fe5277
d4e9e2fffec9dfea1b2e3edacb9
d48876fffecf0fe9fdea3dcf7ab
d42734fffed42fe9e1313cc33c9
d3c61bfffed95fe9c5013bb6162
d3652afffede9fe9a95b3aa80c4
d3045ffffee3cfe98e3d399920f
d2a3bbfffee90fe973a938895e8
d2433afffeee4fe9599e3778c11
d1e2defffef38fe9401b366755a
d182a4fffef8dfe9272035551b1
d1228cfffefe2fe90ead3442187
d092a9ffff062fe8eb0c32a4310
cfd338ffff10dfe8bd533079ae2
cf143effff1b8fe891b62e4c599
ce55b4ffff265fe868332c1c563
cd9794ffff313fe840ca29e9c8c
ccd9d7ffff3c1fe81b7927b4d26
cc1c77ffff470fe7f83f257d965
cb5f6effff51ffe7d71b2344371
caa2b6ffff5d0fe7b80c2108d68
c9e649ffff681fe79b111ecb960
c92a21ffff732fe780291c8c962
c86e38ffff7e4fe767531a4bf73
c7b289ffff896fe750901809dbd
c6f70effff949fe73bdd15c6637
c63bc2ffff9fcfe7293c1381afe
c5809fffffaaffe718ab113bdfc
c4c5a1ffffb63fe70a290ef5179
c40ac2ffffc17fe6fdb80cad753
c34ffdffffccbfe6f3560a6519a
c2954dffffd80fe6eb02081c256
c1daadffffe34fe6e4be05d2b92
c12017ffffee9fe6e0890388f22
c06586fffff9efe6de63013ef0b
c0041fffffffcfe6de05000cf26
