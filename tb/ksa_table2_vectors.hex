0E4A 075B 015A5
349A BDB1 0F24B
3291 05B0 03841
AF9C 234D 0D2E9
D6CC 7EB3 1557F
3EDA 120A 050E4
85FA F866 17E60
78A4 8059 0F8FD
CA13 3397 0FDAA
B3FC CE35 18231
60C3 2B20 08BE3
4FEC 4CE9 09CD5
6661 13C2 07A23
B11F FF4A 1B069
B380 6BFB 11F7B
7C9D 3E3B 0BAD8
C93A 836B 14CA5
2204 A274 0C478
2DEC 3876 06662
6D5B B819 12574
F5DB 25BA 11B95
9FE5 F771 19756
E74F C095 1A7E4
F4A2 9B2B 18FCD
6230 579F 0B9CF
0974 0209 00B7D
69C9 6D0D 0D6D6
267C B06B 0D6E7
C602 5098 1169A
D320 6D40 14060
95FB 6603 0FBFE
513A 6B27 0BC61
DD7A FBD7 1D951
3FDC F748 13724
F5B9 1601 10BBA
3DF8 3EA8 07CA0
4741 CA1D 1115E
6063 6A60 0CAC3
0242 2884 02AC6
2BD4 CC85 0F859
6C45 68A6 0D4EB
F8A2 F681 1EF23
1514 502C 06540
FC3D 004D 0FC8A
01D2 BBBB 0BD8D
A57A 37FF 0DD79
D00E 4853 11861
D35E 19E1 0ED3F
D4C9 CA61 19F2A
A42F C89B 16CCA
7B1D 8CA0 107BD
C6D8 25C5 0EC9D
20D9 876A 0A843
0BCD F39F 0FF6C
BADB E50B 19FE6
3CC6 EE08 12ACE
6D36 312F 09E65
2DC6 C74D 0F513
335F 0204 03563
12A9 76DB 08984
69B4 1A8C 08440
8984 EFEB 1796F
A5DF F479 19A58
0210 2F62 03172
8B3E FF92 18AD0
32AF CD67 10016
5C8B 42A1 09F2C
3A3A 3AD2 0750C
CE5D 742A 14287
6619 AFEB 11604
987D 6624 0FEA1
D2C9 52C0 12589
D7BB 0CC1 0E47C
0D6F 8F55 09CC4
F4F7 0D7D 10274
7391 5937 0CCC8
0B7B 59C2 0653D
