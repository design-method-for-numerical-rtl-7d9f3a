98341b
a4b0ba
b12d58
ffffff
