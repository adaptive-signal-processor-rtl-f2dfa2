@0
02222302
04444484
06666546
088886c8
0aaaa70b
@200
140014d2
140035d4
140056d7
