6300c64000
0020c64000
0000000000
0000000000
0000000000
0000000000
0000000000
0000000000
0000000000
0000000000
0000000000
0000000000
0000000000
0000000000
0000000000
0000000000
e02776c010
e02776c021
e02776c032
e02076c040
e021464000
3780464015
e023466001
e02540d011
e02040d011
3780464019
e02850c044
e02042c022
3400464016
e023466003
e024466004
e026464000
e020464000
3780464021
e022464000
0020c64000
0000000000
0000000000
0000000000
0000000000
e020464000
3d00464029
e022464000
0020c64000
