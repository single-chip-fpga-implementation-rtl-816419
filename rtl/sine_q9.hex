0000
0006
000d
0013
001a
0020
0027
002d
0033
003a
0040
0047
004d
0053
005a
0060
0066
006d
0073
0079
007f
0086
008c
0092
0098
009e
00a4
00aa
00b0
00b6
00bc
00c2
00c8
00ce
00d4
00da
00e0
00e6
00eb
00f1
00f7
00fc
0102
0107
010d
0112
0118
011d
0122
0128
012d
0132
0137
013c
0141
0146
014b
0150
0155
015a
015e
0163
0168
016c
0171
0175
017a
017e
0182
0186
018b
018f
0193
0197
019a
019e
01a2
01a6
01a9
01ad
01b0
01b4
01b7
01ba
01be
01c1
01c4
01c7
01ca
01cc
01cf
01d2
01d5
01d7
01da
01dc
01de
01e1
01e3
01e5
01e7
01e9
01eb
01ed
01ee
01f0
01f1
01f3
01f4
01f6
01f7
01f8
01f9
01fa
01fb
01fc
01fd
01fd
01fe
01ff
01ff
01ff
0200
0200
0200
0200
0200
0200
0200
01ff
01ff
01ff
01fe
01fd
01fd
01fc
01fb
01fa
01f9
01f8
01f7
01f6
01f4
01f3
01f1
01f0
01ee
01ed
01eb
01e9
01e7
01e5
01e3
01e1
01de
01dc
01da
01d7
01d5
01d2
01cf
01cc
01ca
01c7
01c4
01c1
01be
01ba
01b7
01b4
01b0
01ad
01a9
01a6
01a2
019e
019a
0197
0193
018f
018b
0186
0182
017e
017a
0175
0171
016c
0168
0163
015e
015a
0155
0150
014b
0146
0141
013c
0137
0132
012d
0128
0122
011d
0118
0112
010d
0107
0102
00fc
00f7
00f1
00eb
00e6
00e0
00da
00d4
00ce
00c8
00c2
00bc
00b6
00b0
00aa
00a4
009e
0098
0092
008c
0086
007f
0079
0073
006d
0066
0060
005a
0053
004d
0047
0040
003a
0033
002d
0027
0020
001a
0013
000d
0006
0000
fffa
fff3
ffed
ffe6
ffe0
ffd9
ffd3
ffcd
ffc6
ffc0
ffb9
ffb3
ffad
ffa6
ffa0
ff9a
ff93
ff8d
ff87
ff81
ff7a
ff74
ff6e
ff68
ff62
ff5c
ff56
ff50
ff4a
ff44
ff3e
ff38
ff32
ff2c
ff26
ff20
ff1a
ff15
ff0f
ff09
ff04
fefe
fef9
fef3
feee
fee8
fee3
fede
fed8
fed3
fece
fec9
fec4
febf
feba
feb5
feb0
feab
fea6
fea2
fe9d
fe98
fe94
fe8f
fe8b
fe86
fe82
fe7e
fe7a
fe75
fe71
fe6d
fe69
fe66
fe62
fe5e
fe5a
fe57
fe53
fe50
fe4c
fe49
fe46
fe42
fe3f
fe3c
fe39
fe36
fe34
fe31
fe2e
fe2b
fe29
fe26
fe24
fe22
fe1f
fe1d
fe1b
fe19
fe17
fe15
fe13
fe12
fe10
fe0f
fe0d
fe0c
fe0a
fe09
fe08
fe07
fe06
fe05
fe04
fe03
fe03
fe02
fe01
fe01
fe01
fe00
fe00
fe00
fe00
fe00
fe00
fe00
fe01
fe01
fe01
fe02
fe03
fe03
fe04
fe05
fe06
fe07
fe08
fe09
fe0a
fe0c
fe0d
fe0f
fe10
fe12
fe13
fe15
fe17
fe19
fe1b
fe1d
fe1f
fe22
fe24
fe26
fe29
fe2b
fe2e
fe31
fe34
fe36
fe39
fe3c
fe3f
fe42
fe46
fe49
fe4c
fe50
fe53
fe57
fe5a
fe5e
fe62
fe66
fe69
fe6d
fe71
fe75
fe7a
fe7e
fe82
fe86
fe8b
fe8f
fe94
fe98
fe9d
fea2
fea6
feab
feb0
feb5
feba
febf
fec4
fec9
fece
fed3
fed8
fede
fee3
fee8
feee
fef3
fef9
fefe
ff04
ff09
ff0f
ff15
ff1a
ff20
ff26
ff2c
ff32
ff38
ff3e
ff44
ff4a
ff50
ff56
ff5c
ff62
ff68
ff6e
ff74
ff7a
ff81
ff87
ff8d
ff93
ff9a
ffa0
ffa6
ffad
ffb3
ffb9
ffc0
ffc6
ffcd
ffd3
ffd9
ffe0
ffe6
ffed
fff3
fffa
