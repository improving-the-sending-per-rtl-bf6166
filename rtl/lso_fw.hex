20410000
23800001
37b80010
22000006
60840008
28880001
8083fffe
60c40000
61040000
654c0008
295400ff
658c0002
21c00014
85600003
21c00028
624c0018
0699c000
06d1c000
81600002
2aeffff8
030dc000
23400000
89180014
20800040
8898000d
60840020
28880001
8083fffe
23c00000
008fc000
60880000
213d8000
68900000
23fc0004
8bdbfffb
69840024
80000023
68c40010
68040014
0fdb8000
6bc40018
8000001e
8ae80004
01280000
21800001
80000003
012c0000
21800000
0091c000
6c8c0002
85600005
6a4c0018
03e50000
6bcc001c
80000005
3bf40003
85800002
2ffc2000
6fcc0006
68c40010
68040014
69c40018
6b040010
69c40014
0fd38000
6bc40018
06a90000
02650000
03310000
03750000
8183ffe4
68c40004
8003ffbc
