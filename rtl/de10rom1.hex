E3A04004
E3A0C000
E584C000
E3A0C0F4
E59C8000
E3A09000
E3580000
0A00000A
E0899008
E2488001
E3580000
1AFFFFFB
E3A0A000
E24AA020
E009A00A
E35A0000
0A000000
E3A0A001
E584A000
E3A0C0FC
E58C9000
E3A0C0F8
E5943000
E58C3000
EAFFFFFE
