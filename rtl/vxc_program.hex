8002
8020
2e0c
300c
3804
0b08
0e00
3804
0b0c
0e01
3804
0b10
0e02
3804
0b14
0e03
3804
0b18
0e20
0e40
3804
0b1c
0e30
3c00
2c00
3b00
2800
0000
0000
0000
0000
801f
3304
3505
3804
0b00
0e10
0000
0000
0610
2a00
3900
2600
0000
0000
0000
0000
3600
04ff
0620
2d50
3808
1d20
3808
1f28
0c40
0000
0000
0240
1740
1941
04ff
0630
2d60
2130
0000
2330
0000
2530
2131
0000
2331
0000
2531
2132
0000
2332
0000
2532
2133
0000
2333
0000
2533
0000
0000
0000
0000
4000
