00
14
14
7e
14
14
7e
14
14
00
00
00
00
00
00
00
00
00
3c
66
66
3c
00
00
02
02
02
02
02
02
1e
22
45
38
00
00
02
02
02
02
02
02
1e
22
44
38
00
00
02
02
02
02
02
02
1e
3e
7c
38
00
00
00
00
00
7e
7e
7e
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
7e
7e
7e
00
00
00
00
10
08
04
08
10
08
04
1c
20
10
00
00
00
00
00
00
00
00
00
00
00
00
00
00
ff
81
81
81
81
81
81
81
81
81
81
ff
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
