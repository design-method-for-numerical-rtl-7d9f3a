fe01dd000040bff624e8ff62b947fd8d0b
fa04fa0000c17ff63d0dfe297ce7e9fa01
f6059f000140bff66d44fcf40457c2e44f
f201410001bd8ff6b576fbc497b7885d78
edf523000236dff71590fa9d87f73a7500
e9de3d0002abbff78d86f98136a6d935fe
e5b90c00031b3ff81d54f8721bb664a1c5
e181560003842ff8c510f772d095dca787
dd31ca0003e57ff984f7f6861fc54115ce
d8c35d00043deffa5d8df5af1cf4918047
d42c1200048beffb4fe3f4f14cd3cd0b12
cf5c760004cddffc5e1bf450f3a2f1f956
ca39280005014ffd8ce3f3d3bfa1fc808a
c608dc00051c6ffe8b30f3923af12e3980
c2fe580005274fff468df377b0309655fe
c0bc8b00052abfffd255f36f88e02504b0
