// Glyph table for display_rom: 128 ASCII codes x 8 rows, one byte per row; bit 7 is the leftmost pixel, glyphs use bits 6..2. Code 0x7F is a right arrow.
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
38
44
44
7c
44
44
44
00
78
44
44
78
44
44
78
00
38
44
40
40
40
44
38
00
00
00
00
00
00
00
00
00
7c
40
40
78
40
40
7c
00
00
00
00
00
00
00
00
00
38
44
40
5c
44
44
3c
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
44
48
50
60
50
48
44
00
40
40
40
40
40
40
7c
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
78
44
44
78
40
40
40
00
00
00
00
00
00
00
00
00
78
44
44
78
50
48
44
00
3c
40
40
38
04
04
78
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
44
44
44
54
54
6c
44
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
7c
04
08
10
20
40
7c
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
38
04
3c
44
3c
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
38
40
40
44
38
00
04
04
34
4c
44
44
3c
00
00
00
38
44
7c
40
38
00
18
24
20
70
20
20
20
00
00
00
3c
44
44
3c
04
38
40
40
58
64
44
44
44
00
10
00
30
10
10
10
38
00
08
00
18
08
08
08
48
30
00
00
00
00
00
00
00
00
30
10
10
10
10
10
38
00
00
00
68
54
54
54
54
00
00
00
58
64
44
44
44
00
00
00
38
44
44
44
38
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
58
64
40
40
40
00
00
00
3c
40
38
04
78
00
20
20
70
20
20
24
18
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
44
44
44
3c
04
38
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
10
08
7c
08
10
00
00
