165,160,145,132,114,77,56,77,99,89,67,61,97,151,155,114
168,162,146,130,111,77,59,79,98,88,67,63,99,151,153,113
171,164,145,123,104,78,66,83,98,91,75,77,113,153,147,113
154,148,130,112,101,87,79,91,105,107,103,112,142,163,148,123
118,115,108,108,116,117,111,112,117,123,131,144,159,164,156,146
94,93,96,113,141,157,156,143,123,116,132,147,145,144,157,168
98,98,102,124,157,176,173,155,126,110,124,135,121,120,149,175
113,112,117,137,162,165,154,146,133,125,134,136,116,110,134,159
121,121,125,142,159,152,137,131,129,135,151,150,124,103,112,134
133,132,131,139,150,147,132,116,107,120,149,158,132,103,100,118
