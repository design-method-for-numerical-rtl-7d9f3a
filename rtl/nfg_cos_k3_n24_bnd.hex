83fc46
87f9c6
8bfafb
900283
941336
98304f
9c5d99
a09fbb
a4fcb0
a97c96
ae2b46
b31bcd
b871e2
bb7c66
be86e9
ffffff
