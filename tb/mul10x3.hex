0000
500D
0003
500E
900C
2001
500E
400D
100A
500D
400E
8004
800C
0000
0000
