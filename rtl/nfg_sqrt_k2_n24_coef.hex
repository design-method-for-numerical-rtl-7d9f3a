fbe960ff50ccc05987ac16e0432
fbbb49ff5bc440579f15175fd17
fb8b84ff65fa1055c44817e136f
fb5a02ff6f7ce053f6b018647da
fb26b8ff785a205235ea18e9a41
faf197ff809df05081771970b2a
faba93ff8853d04ed8f619f9a91
fa819eff8f85f04d3bfe1a848bb
fa46aaff963e104baa2b1b115e0
fa09a9ff9c84f04a231f1ba022c
f9ca8bffa262b048a6771c30e0c
f98943ffa7ded04733e61cc3972
f945c1ffad004045cb131d584b4
f8fff6ffb1cd70446baf1deeff7
f8b7d1ffb64c404315671e87b9c
f86d42ffba822041c7f01f227d5
f8203affbe74104083081fbf4a9
f7d0a6ffc226e03f4662205e297
f77e77ffc59ec03e11c220ff193
f7299affc8dfb03ce4e321a2205
f6d1feffcbed803bbf8b224740a
f67790ffcecb803aa17a22ee7f4
f61a3fffd17d00398a7b2397dcf
f5b9f6ffd404d0387a52244360f
f556a3ffd665d03770cd24f10c9
f4f033ffd8a270366dba25a0e24
f48691ffdabd203570e52652e74
f419a9ffdcb810347a1e27071e8
f3a966ffde955033893827bd8c0
f335b4ffe056b0329e082876316
f2be7cffe1fe1031b8602931149
f243a9ffe38d0030d81829ee37b
f1c524ffe505202ffd092aad9f4
f142d7ffe667d02f270b2b6f4db
f0bcabffe7b6602e55fa2c33468
f03287ffe8f2202d89b12cf98f3
efa455ffea1c202cc20e2dc2288
ef11fbffeb35902bfeee2e8d185
ee7b62ffec3f702b40342f5a5f9
ede070ffed3aa02a85be302a02f
ed410bffee280029cf6e30fc066
ec9d19ffef0880291d2831d06d3
ebf480ffefdcd0286ece32a73a4
eb4724fff0a5a027c4443380725
ea94eafff163b0271d71345c185
e9ddb6fff217a0267a3c353a2fc
e9216bfff2c20025da89361abcf
e85feefff36360253e4436fdc12
e79920fff3fc4024a55337e341c
e6cce3fff48d30240f9f38cb429
e5fb1afff51690237d1539b5c57
e523a6fff598d022ed9e3aa2ce4
e44667fff614602261263b92613
e3633dfff6899021d7993c8481f
e27a09fff6f8d02150e33d7932a
e18aa8fff7627020ccf23e7078f
e094fafff7c6b0204bb53f6a570
df98ddfff825f01fcd184066d07
de962ffff880701f510c4165e84
dd8cccfff8d6701ed7804267a30
dc7c91fff928301e6064436c03b
db655afff975e01deba844730dc
da4702fff9bfd01d793e457cc50
d92165fffa06201d091646892be
d7f45bfffa49001c9b23479847f
d6bfc0fffa88a01c2f5748aa1aa
d5836bfffac5401bc5a349bea93
d43f36fffafef01b5dfd4ad5f5f
d2f2f9fffb35f01af8564bf0043
d19e8afffb6a401a94a34d0cd8b
d041c0fffb9c201a32d74e2c76a
cedc73fffbcbb019d2e74f4edff
cd6e76fffbf9001974c850741a2
cbf79ffffc244019186f519c27e
ca77c2fffc4d7018bdd152c70ce
c8eeb3fffc74c01864e553f4cc3
c75c45fffc9a40180d9f5525697
c5c04afffcbe1017b7f75658e86
c41a94fffce0301763e2578f4c3
c26af3fffd00d017115758c8993
c0b138fffd200016c04f5a04d26
beed32fffd3dc01670be5b43fbb
bd1eb1fffd5a3016229f5c86180
bb4583fffd755015d5e75dcb2b0
b96176fffd8f40158a8f5f13380
b77256fffda81015408f605e431
b577f0fffdbfd014f7e061ac4f3
b3f4fafffdd0f014c23062a8978
b2ef24fffddc00149ece6351e0c
b1e65cfffde6e0147bbc63fbee0
b0daa1fffdf1801458fa64a6bc1
afcbe6fffdfbe014368565524f4
aeba2afffe060014145e65fea46
ada561fffe0ff013f28366abbf2
ac8d89fffe19b013d0f467599cc
ab7296fffe233013afb0680840e
aa5486fffe2c70138eb768b7a8f
a9334dfffe3590136e066967d84
a80ee9fffe3e70134d9e6a18cc3
a6e74cfffe4730132d7d6aca896
a5bc78fffe4fb0130da46b7d0ab
a48e5cfffe581012ee116c30566
a35cfafffe603012cec36ce4676
a22842fffe683012afba6d99434
a0f034fffe70001290f56e4ee61
9fb4c2fffe77b01272736f05541
9e75ecfffe7f201254346fbc896
9d33a2fffe868012363670748b6
9bede4fffe8db0121879712d561
9aa4a3fffe94b011fafd71e6ee1
9957dffffe9b9011ddc172a14f9
98078afffea25011c0c4735c7e7
96b3a2fffea8e011a405741877e
955c18fffeaf6011878474d5406
9400ecfffeb5b0116b407592d40
92a20efffebbe0114f397651379
913f7efffec1f011336d7710673
8fd92cfffec7e01117dd77d067a
8e6f18fffecdb010fc87789134f
8d0131fffed36010e16b7952d45
8b8f79fffed8f010c6897a1540c
8a19defffede6010abe07ad87fe
88a060fffee3c010916e7b9c8dd
8722eefffee9001077357c616f6
85a189fffeee20105d327d27204
841c20fffef3201043667deda54
8292b2fffef8101029d07eb4fb0
80e6fefffefd40100e897f8c4cb
