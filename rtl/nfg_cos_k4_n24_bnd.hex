872666
8e4ccc
94a9d5
9b06dd
a70ccc
b2b9db
be4750
ffffff
