E3A014FF
E3E02000
E2923001
E3A0447F
E0945004
E0516004
E2647E3F
E0218002
E3849081
E002A009
E3B0B000
E1F0C004
E3140102
E1320002
E3720001
E1540001
C2800001
D2800002
82800004
92800008
42800010
62800020
72800040
22800080
32800C01
E3A0D008
E58D9004
E58D4000
E50D0008
E59D1004
E51D2008
E28F3000
E3A05005
E3A06000
E0866005
E2555001
1AFFFFFC
E356000F
0A000000
E3A07EBA
E3560010
AA000000
BA000000
E3A080EE
E356000F
CAFFFFFC
DA000000
EAFFFFFA
E356000E
9AFFFFF8
8A000000
EAFFFFF6
E3560010
5AFFFFF4
4A000000
EAFFFFF2
E356000F
1AFFFFF0
3AFFFFEF
6AFFFFEE
7A000000
EAFFFFEC
E58D600C
E59DA00C
E08AB006
E58DB010
EAFFFFFE
