00000284
02840295
051902b9
07d202f9
0acb01a2
0c6c01c6
0e3201f7
1029023f
12680146
13ae0169
15170199
16af01dc
188c0112
199e0133
1ad1015f
1c30019e
1dce00f0
1ebe010f
1fcd0138
21040172
227600d8
234e00f4
2442011b
255d0151
26ae00c5
277400e0
28540104
29580137
2a9000b7
2b4700d0
2c1700f2
2d090123
2e2c00ab
2ed700c3
2f9a00e3
307d0111
318e00a1
323000b8
32e800d7
33be0103
34c10099
355a00af
360900cc
36d500f6
37cb0092
385d00a7
390300c3
39c600eb
3ab1008b
3b3d009f
3bdc00bb
3c9700e2
3d790086
3dfe0099
3e9700b3
3f4b00d9
40240081
40a50093
413800ad
41e500d1
42b7010b
43c10172
45330268
479b1c14
