0005
002a
004f
0074
0099
00be
00e3
0108
012d
0152
0177
019c
01c1
01e6
020b
0230
0255
027a
029f
02c4
02e9
030e
0333
0358
037d
03a2
03c7
03ec
0411
0436
045b
0480
04a5
04ca
04ef
0514
0539
055e
0583
05a8
05cd
05f2
0617
063c
0661
0686
06ab
06d0
06f5
071a
073f
0764
0789
07ae
07d3
07f8
081d
0842
0867
088c
08b1
08d6
08fb
0920
