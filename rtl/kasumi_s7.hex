36
32
3e
38
16
22
5e
60
26
06
3f
5d
02
12
7b
21
37
71
27
72
15
43
41
0c
2f
49
2e
1b
19
6f
7c
51
35
09
79
4f
34
3c
3a
30
65
7f
28
78
68
46
47
2b
14
7a
48
3d
17
6d
0d
64
4d
01
10
07
52
0a
69
62
75
74
4c
0b
59
6a
00
7d
76
63
56
45
1e
39
7e
57
70
33
11
05
5f
0e
5a
54
5b
08
23
67
20
61
1c
42
66
1f
1a
2d
4b
04
55
5c
25
4a
50
31
44
1d
73
2c
40
6b
6c
18
6e
53
24
4e
2a
13
0f
29
58
77
3b
03
