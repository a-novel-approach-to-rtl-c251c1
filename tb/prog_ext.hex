// Second test program: the rest of the 8051 instruction set
// (address: bytes  instruction)
@000
75 81 60    // 000 MOV SP,#60h
78 30       // 003 MOV R0,#30h
76 A5       // 005 MOV @R0,#0A5h
E6          // 007 MOV A,@R0
C4          // 008 SWAP A
F5 50       // 009 MOV 50h,A
06          // 00B INC @R0
86 51       // 00C MOV 51h,@R0
74 39       // 00E MOV A,#39h
24 48       // 010 ADD A,#48h
D4          // 012 DA A
F5 52       // 013 MOV 52h,A
C0 52       // 015 PUSH 52h
C0 50       // 017 PUSH 50h
D0 53       // 019 POP 53h
D0 54       // 01B POP 54h
12 00 80    // 01D LCALL 0080h
F5 55       // 020 MOV 55h,A
11 90       // 022 ACALL 0090h
85 81 56    // 024 MOV 56h,SP
90 01 00    // 027 MOV DPTR,#0100h
74 02       // 02A MOV A,#02h
93          // 02C MOVC A,@A+DPTR
F5 57       // 02D MOV 57h,A
A3          // 02F INC DPTR
E4          // 030 CLR A
93          // 031 MOVC A,@A+DPTR
F5 58       // 032 MOV 58h,A
74 03       // 034 MOV A,#03h
83          // 036 MOVC A,@A+PC
80 02       // 037 SJMP 003Bh
11 6D       // 039 table byte 6Dh at 003Ah
F5 59       // 03B MOV 59h,A
74 04       // 03D MOV A,#04h
90 00 A0    // 03F MOV DPTR,#00A0h
73          // 042 JMP @A+DPTR
75 20 00    // 043 MOV 20h,#00h
D2 00       // 046 SETB 00h
D2 07       // 048 SETB 07h
B2 01       // 04A CPL 01h
C2 00       // 04C CLR 00h
A2 07       // 04E MOV C,07h
92 08       // 050 MOV 08h,C
B0 00       // 052 ANL C,/00h
82 00       // 054 ANL C,00h
72 01       // 056 ORL C,01h
A0 07       // 058 ORL C,/07h
B3          // 05A CPL C
92 09       // 05B MOV 09h,C
D3          // 05D SETB C
92 E7       // 05E MOV ACC.7,C
F5 5B       // 060 MOV 5Bh,A
10 01 02    // 062 JBC 01h,+2
74 EE       // 065 MOV A,#0EEh (skipped)
30 01 02    // 067 JNB 01h,+2
74 EE       // 06A MOV A,#0EEh (skipped)
20 07 02    // 06C JB 07h,+2
74 EE       // 06F MOV A,#0EEh (skipped)
85 20 5C    // 071 MOV 5Ch,20h
85 21 5D    // 074 MOV 5Dh,21h
02 01 10    // 077 LJMP 0110h
@080
74 C3       // 080 sub1: MOV A,#0C3h
22          // 082 RET
@090
75 5F 77    // 090 sub2: MOV 5Fh,#77h
22          // 093 RET
@0A0
00 00 00 00 // 0A0 jump table padding
75 5A 11    // 0A4 MOV 5Ah,#11h
75 21 00    // 0A7 MOV 21h,#00h
7A 00       // 0AA MOV R2,#00h
02 00 43    // 0AC LJMP 0043h
@100
10 2F 4E    // 100 MOVC table
@110
74 40       // 110 MOV A,#40h
B4 40 02    // 112 CJNE A,#40h,+2 (not taken)
B4 41 02    // 115 CJNE A,#41h,+2 (taken, C=1)
74 EE       // 118 MOV A,#0EEh (skipped)
40 02       // 11A JC +2
74 EE       // 11C MOV A,#0EEh (skipped)
75 31 3F    // 11E MOV 31h,#3Fh
B5 31 02    // 121 CJNE A,31h,+2 (taken, C=0)
74 EE       // 124 MOV A,#0EEh (skipped)
50 02       // 126 JNC +2
74 EE       // 128 MOV A,#0EEh (skipped)
79 31       // 12A MOV R1,#31h
B7 3F 02    // 12C CJNE @R1,#3Fh,+2 (not taken)
B9 31 02    // 12F CJNE R1,#31h,+2 (not taken)
C7          // 132 XCH A,@R1
F5 70       // 133 MOV 70h,A
75 32 5C    // 135 MOV 32h,#5Ch
78 32       // 138 MOV R0,#32h
74 A7       // 13A MOV A,#0A7h
D6          // 13C XCHD A,@R0
F5 71       // 13D MOV 71h,A
85 32 72    // 13F MOV 72h,32h
C5 31       // 142 XCH A,31h
F5 73       // 144 MOV 73h,A
85 31 74    // 146 MOV 74h,31h
D2 D3       // 149 SETB RS0
7A 99       // 14B MOV R2,#99h (bank 1)
C2 D3       // 14D CLR RS0
85 0A 75    // 14F MOV 75h,0Ah
75 33 03    // 152 MOV 33h,#03h
E4          // 155 CLR A
04          // 156 loop: INC A
D5 33 FC    // 157 DJNZ 33h,loop
F5 76       // 15A MOV 76h,A
15 76       // 15C DEC 76h
14          // 15E DEC A
0A          // 15F INC R2
85 02 77    // 160 MOV 77h,02h
90 12 FF    // 163 MOV DPTR,#12FFh
A3          // 166 INC DPTR
85 83 78    // 167 MOV 78h,DPH
85 82 79    // 16A MOV 79h,DPL
62 77       // 16D XRL 77h,A
53 76 F0    // 16F ANL 76h,#0F0h
43 76 A5    // 172 ORL 76h,#0A5h
78 7A       // 175 MOV R0,#7Ah
A6 31       // 177 MOV @R0,31h
AC 30       // 179 MOV R4,30h
8C 7B       // 17B MOV 7Bh,R4
08          // 17D INC R0
E6          // 17E MOV A,@R0
23          // 17F RL A
08          // 180 INC R0
F6          // 181 MOV @R0,A
E8          // 182 MOV A,R0
F5 7D       // 183 MOV 7Dh,A
75 F0 03    // 185 MOV B,#03h
A4          // 188 MUL AB
F5 7E       // 189 MOV 7Eh,A
80 FE       // 18B done: SJMP done
