@001
aa
fa
@01f
c2
22
c1
02
b0
b0
