20010001  //  0: addi $1, $0, 1
20020001  //  1: addi $2, $0, 1
20030000  //  2: addi $3, $0, 0
2004000a  //  3: addi $4, $0, 10
00222820  //  4: fib: add $5, $1, $2
ac650010  //  5: sw $5, 16($3)
20220000  //  6: addi $2, $1, 0
20a10000  //  7: addi $1, $5, 0
20630001  //  8: addi $3, $3, 1
2084ffff  //  9: addi $4, $4, -1
1480fff9  // 10: bne $4, $0, fib
8c060010  // 11: lw $6, 16($0)
8c070019  // 12: lw $7, 25($0)
00c74022  // 13: sub $8, $6, $7
2009fff9  // 14: addi $9, $0, -7
01090018  // 15: mult $8, $9
00005010  // 16: mfhi $10
00005812  // 17: mflo $11
200c007b  // 18: addi $12, $0, 123
01890018  // 19: mult $12, $9
00006810  // 20: mfhi $13
00007012  // 21: mflo $14
ac0e0028  // 22: sw $14, 40($0)
8c0f0028  // 23: lw $15, 40($0)
15ee0003  // 24: bne $15, $14, bad
20100001  // 25: addi $16, $0, 1
2014001d  // 26: addi $20, $0, done
02800008  // 27: jr $20
20100002  // 28: bad: addi $16, $0, 2
22110064  // 29: done: addi $17, $16, 100
0800001e  // 30: halt: j halt
