// Mixed test program: arithmetic, logic, MUL/DIV and conditional jumps (address: bytes  instruction)
74 15       // 00 MOV A,#15h
24 27       // 02 ADD A,#27h
F5 40       // 04 MOV 40h,A
75 41 F0    // 06 MOV 41h,#F0h
25 41       // 09 ADD A,41h
F5 42       // 0B MOV 42h,A
34 00       // 0D ADDC A,#00h
F5 43       // 0F MOV 43h,A
D3          // 11 SETB C
94 0D       // 12 SUBB A,#0Dh
F5 44       // 14 MOV 44h,A
54 0F       // 16 ANL A,#0Fh
44 A0       // 18 ORL A,#0A0h
64 FF       // 1A XRL A,#0FFh
F5 45       // 1C MOV 45h,A
78 05       // 1E MOV R0,#05h
E4          // 20 CLR A
24 03       // 21 loop: ADD A,#03h
D8 FC       // 23 DJNZ R0,loop
F5 46       // 25 MOV 46h,A
75 F0 07    // 27 MOV B,#07h
A4          // 2A MUL AB
F5 47       // 2B MOV 47h,A
75 F0 0A    // 2D MOV B,#0Ah
84          // 30 DIV AB
F5 48       // 31 MOV 48h,A
85 F0 49    // 33 MOV 49h,B
23          // 36 RL A
03          // 37 RR A
C3          // 38 CLR C
33          // 39 RLC A
D3          // 3A SETB C
13          // 3B RRC A
F5 4A       // 3C MOV 4Ah,A
F4          // 3E CPL A
04          // 3F INC A
14          // 40 DEC A
14          // 41 DEC A
F5 4B       // 42 MOV 4Bh,A
05 4B       // 44 INC 4Bh
15 40       // 46 DEC 40h
E4          // 48 CLR A
60 02       // 49 JZ +2
74 EE       // 4B MOV A,#0EEh (skipped)
70 02       // 4D JNZ +2 (not taken)
74 01       // 4F MOV A,#01h
70 02       // 51 JNZ +2
74 EE       // 53 MOV A,#0EEh (skipped)
C3          // 55 CLR C
40 02       // 56 JC +2 (not taken)
50 02       // 58 JNC +2
74 EE       // 5A MOV A,#0EEh (skipped)
F5 4C       // 5C MOV 4Ch,A
75 D0 08    // 5E MOV PSW,#08h (register bank 1)
79 33       // 61 MOV R1,#33h
E9          // 63 MOV A,R1
F8          // 64 MOV R0,A
28          // 65 ADD A,R0
F5 4D       // 66 MOV 4Dh,A
75 D0 00    // 68 MOV PSW,#00h
E5 09       // 6B MOV A,09h
F5 4E       // 6D MOV 4Eh,A
02 00 75    // 6F LJMP 0075h
74 EE 00    // 72 (skipped)
E5 90       // 75 MOV A,P1
F5 4F       // 77 MOV 4Fh,A
F5 A0       // 79 MOV P2,A
80 FE       // 7B SJMP $
