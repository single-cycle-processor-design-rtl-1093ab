9e3779b9
3c6ef372
daa66d2b
78dde6e4
1715609d
b54cda56
5384540f
f1bbcdc8
8ff34781
2e2ac13a
cc623af3
6a99b4ac
08d12e65
a708a81e
454021d7
e3779b90
