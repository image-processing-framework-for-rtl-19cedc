165,77,202,24,37,48,187,29,109,19,44,222,214,35,123,46
217,30,63,114,31,203,25,113,23,68,148,214,73,60,157,92
52,96,190,49,32,30,105,254,218,160,238,232,185,153,127,92
124,41,153,253,175,229,147,37,60,214,84,175,77,250,215,20
39,160,174,179,254,233,35,47,138,242,33,31,158,228,145,197
177,11,236,181,86,59,252,30,111,147,66,126,203,200,254,41
85,229,205,142,70,220,142,212,183,194,118,77,42,90,77,118
119,6,248,93,134,144,2,74,214,189,163,64,27,233,200,203
204,201,53,246,205,31,97,34,106,225,83,56,174,26,52,0
77,51,186,13,36,106,192,76,129,177,186,242,62,59,249,238
