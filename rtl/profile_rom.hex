0078
0067
006a
0072
005a
006b
0056
007a
005c
006c
0069
006e
0081
0060
0079
005e
006e
006c
0065
005e
006e
0055
006a
0078
005b
005f
0075
007f
0068
0072
0075
006b
0076
005d
005f
0057
0060
0060
006c
0064
0062
0065
0067
006c
0065
0066
006c
0073
005c
0066
0060
006a
0061
006f
005f
0065
0065
006a
0061
0062
0062
006e
005e
0057
005e
0070
006f
006b
0066
0057
0065
0077
0070
0068
0056
0056
006b
0070
0074
005d
0061
0078
0077
0070
006c
0067
0062
006f
006b
006d
006f
0066
005b
0065
0056
0065
0058
005e
0076
006a
006e
005a
0070
006a
0065
0067
006d
006c
0069
006d
006a
006f
0062
0064
007c
005e
0065
0064
006f
0069
0064
0067
0070
0068
0062
005e
006e
0067
0072
0064
0065
006c
0064
0068
0060
0073
0062
0062
007f
0063
0069
0069
0064
0068
006b
0079
0070
005a
0065
0067
0060
0076
006a
005a
0060
006d
0067
0057
0069
005e
006a
0079
0063
0079
0063
0064
0078
007e
006b
007f
0072
0080
006d
0076
006d
0066
007b
007c
0078
0092
0061
0077
0074
007b
0073
0068
007b
007c
0072
0087
0098
0072
0082
007e
007f
0084
007a
0081
0092
006e
0096
007b
0089
0082
0087
008a
007f
008d
0090
0090
009f
0092
0097
00a0
008f
009c
00b5
00be
009b
00aa
00b0
00aa
00c2
00cd
00db
00ee
00cb
00df
00f8
00fb
012e
0148
0147
0165
018c
01ab
01ea
0229
0265
02f1
02eb
0368
03a0
0408
0484
04d1
054e
054c
05a8
05d7
068c
0631
0636
0682
061a
0612
05bb
0569
0517
04d4
0457
0413
0414
03eb
039b
0386
033a
036f
0379
0378
036a
03ad
039a
03b1
03c4
03ab
0397
0394
038a
038d
0382
0303
02f0
029d
0293
0239
0232
01f9
01c6
01a1
018a
014e
013f
0130
0111
00eb
00e4
00f9
00dc
00b6
00bf
00c0
00c9
00a9
00a6
009d
00ae
0082
0090
00a7
00a7
0090
0082
0086
007d
006a
0091
0081
008e
006b
0086
0092
0080
006d
008c
007b
008c
0077
007f
007f
005e
0085
0072
0081
0083
0081
0095
0070
0077
0068
0074
006b
0083
0064
007c
0073
007e
0076
006f
0065
007a
0067
0069
007b
0075
0062
006c
0068
007e
005a
0067
006e
0076
006a
0066
0055
0069
0058
0074
0066
006a
0069
0073
006b
0069
007e
006b
0069
006d
0071
0078
0073
007e
0068
005b
0070
007c
005f
006c
0073
0066
0059
005b
0070
0064
0058
005f
0069
006b
0060
0058
006e
0069
0069
0060
006b
005a
006b
005f
0074
007a
0068
0070
006c
006b
0051
0079
006b
0058
005b
006b
0069
005d
006b
006f
0054
0069
0067
0065
0064
005a
0057
006e
0066
0063
006f
0074
0074
0061
006b
0064
0074
0068
0063
0064
006c
0069
0055
0063
0068
0070
0065
005d
006f
006d
0056
004f
0058
005d
005c
0072
0066
0068
006a
0062
005b
004a
006d
0077
006d
0071
0071
005a
0062
0061
0066
0061
0068
0069
0059
005d
0057
0060
0065
0064
0062
0060
0064
005d
005c
0066
006e
0054
005e
0060
005f
0067
0051
006b
006f
0052
004d
0068
005d
0068
004b
0065
005a
006e
0060
0052
005c
