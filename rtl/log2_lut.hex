d8f0
d928
d960
d998
d9d0
da07
da3e
da75
daac
dae2
db19
db4f
db85
dbbb
dbf0
dc25
dc5b
dc90
dcc4
dcf9
dd2d
dd61
dd95
ddc9
ddfd
de30
de64
de97
dec9
defc
df2f
df61
df93
dfc5
dff7
e029
e05a
e08c
e0bd
e0ee
e11f
e14f
e180
e1b0
e1e0
e210
e240
e270
e29f
e2cf
e2fe
e32d
e35c
e38b
e3b9
e3e8
e416
e444
e472
e4a0
e4ce
e4fb
e529
e556
e583
e5b0
e5dd
e60a
e637
e663
e68f
e6bb
e6e8
e713
e73f
e76b
e796
e7c2
e7ed
e818
e843
e86e
e899
e8c3
e8ee
e918
e943
e96d
e997
e9c1
e9ea
ea14
ea3d
ea67
ea90
eab9
eae2
eb0b
eb34
eb5d
eb85
ebae
ebd6
ebfe
ec27
ec4f
ec76
ec9e
ecc6
ecee
ed15
ed3c
ed64
ed8b
edb2
edd9
ee00
ee26
ee4d
ee73
ee9a
eec0
eee6
ef0d
ef33
ef58
ef7e
efa4
efca
efef
f015
f03a
f05f
f084
f0a9
f0ce
f0f3
f118
f13d
f161
f186
f1aa
f1ce
f1f2
f217
f23b
f25f
f282
f2a6
f2ca
f2ed
f311
f334
f358
f37b
f39e
f3c1
f3e4
f407
f42a
f44c
f46f
f492
f4b4
f4d6
f4f9
f51b
f53d
f55f
f581
f5a3
f5c5
f5e7
f608
f62a
f64b
f66d
f68e
f6b0
f6d1
f6f2
f713
f734
f755
f776
f796
f7b7
f7d8
f7f8
f819
f839
f859
f87a
f89a
f8ba
f8da
f8fa
f91a
f939
f959
f979
f999
f9b8
f9d8
f9f7
fa16
fa35
fa55
fa74
fa93
fab2
fad1
faf0
fb0e
fb2d
fb4c
fb6a
fb89
fba7
fbc6
fbe4
fc02
fc21
fc3f
fc5d
fc7b
fc99
fcb7
fcd5
fcf2
fd10
fd2e
fd4b
fd69
fd86
fda4
fdc1
fdde
fdfc
fe19
fe36
fe53
fe70
fe8d
feaa
fec7
fee3
ff00
ff1d
ff39
ff56
ff72
ff8f
ffab
ffc8
ffe4
