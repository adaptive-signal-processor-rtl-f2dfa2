1b5d
0908
1304
2300
214c
2d5e
336c
3f7c
418c
4d9c
53ac
5fbc
61cc
6ddc
73ec
7efc
fefc
fefc
fefc
fefc
fefc
fefc
fefc
fefc
fefc
fefc
fefc
fefc
fefc
fefc
fefc
fefc
