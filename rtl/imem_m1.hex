20010005  //  0: addi $1, $0, 5
20020003  //  1: addi $2, $0, 3
00221820  //  2: add $3, $1, $2
00612022  //  3: sub $4, $3, $1
ac030000  //  4: sw $3, 0($0)
ac040001  //  5: sw $4, 1($0)
8c050000  //  6: lw $5, 0($0)
00a53020  //  7: add $6, $5, $5
00c33824  //  8: and $7, $6, $3
00e44025  //  9: or $8, $7, $4
0083482a  // 10: slt $9, $4, $3
00220018  // 11: mult $1, $2
00005012  // 12: mflo $10
00005810  // 13: mfhi $11
200c0004  // 14: addi $12, $0, 4
200d0000  // 15: addi $13, $0, 0
01ac6820  // 16: loop: add $13, $13, $12
218cffff  // 17: addi $12, $12, -1
1580fffd  // 18: bne $12, $0, loop
0c000019  // 19: jal func
ac0d0002  // 20: sw $13, 2($0)
8c0e0002  // 21: lw $14, 2($0)
11cd0001  // 22: beq $14, $13, skip
200f0063  // 23: addi $15, $0, 99
0800001e  // 24: skip: j end
00018080  // 25: func: sll $16, $1, 2
00108842  // 26: srl $17, $16, 1
3c121234  // 27: lui $18, 0x1234
36525678  // 28: ori $18, $18, 0x5678
03e00008  // 29: jr $31
3a53ffff  // 30: end: xori $19, $18, 0xFFFF
0022a027  // 31: nor $20, $1, $2
2835000a  // 32: slti $21, $1, 10
325600ff  // 33: andi $22, $18, 0xff
08000022  // 34: halt: j halt
