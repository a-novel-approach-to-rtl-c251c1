12
34
56
78
9a
bc
de
f0
