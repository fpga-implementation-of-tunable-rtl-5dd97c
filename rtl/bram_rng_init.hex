50
64
97
43
19
37
56
79
33
49
45
09
93
54
31
32
