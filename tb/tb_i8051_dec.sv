// tb_i8051_dec: checks the instruction decoder in three ways.
//  1. The length of all 256 opcodes against the 8051 opcode map (written
//     out below row by row); MOVX and the unused opcode A5 must be one byte
//     long and decode as I_ILL, since this design has no external data bus.
//  2. The instruction class of all 256 opcodes against a reference function
//     written from the 8051 instruction list by opcode family.
//  3. The full decode record (operand source, destination, ALU operation
//     and operands, flags, B write, bit operation, offset position) for a
//     representative opcode of every family, with the expectations taken
//     from the instruction definitions (e.g. INC/DEC leave the flags alone,
//     CJNE compares without a carry in and writes only CY, MUL/DIV write B).
module tb_i8051_dec;
  import gals8051_pkg::*;

  logic [7:0] opcode;
  dec_t       dec;
  int checks = 0, failures = 0;

  i8051_dec dut (.opcode, .dec);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // 8051 opcode map: instruction length per row (high nibble), columns 0..F
  localparam string LEN_MAP [16] = '{
    "1231121111111111",  // 0x: NOP AJMP LJMP RR  INC...
    "3231121111111111",  // 1x: JBC ACALL LCALL RRC DEC...
    "3211221111111111",  // 2x: JB AJMP RET RL ADD...
    "3211221111111111",  // 3x: JNB ACALL RETI RLC ADDC...
    "2223221111111111",  // 4x: JC AJMP ORL...
    "2223221111111111",  // 5x: JNC ACALL ANL...
    "2223221111111111",  // 6x: JZ AJMP XRL...
    "2221232222222222",  // 7x: JNZ ACALL ORL C,bit JMP MOV #...
    "2221132222222222",  // 8x: SJMP AJMP ANL C,bit MOVC DIV MOV dir...
    "3221221111111111",  // 9x: MOV DPTR ACALL MOV bit,C MOVC SUBB...
    "2221112222222222",  // Ax: ORL C,/bit AJMP MOV C,bit INC DPTR MUL - MOV ...,dir
    "2221333333333333",  // Bx: ANL C,/bit ACALL CPL bit CPL C CJNE...
    "2221121111111111",  // Cx: PUSH AJMP CLR bit CLR C SWAP XCH...
    "2221131122222222",  // Dx: POP ACALL SETB SETB C DA DJNZ XCHD DJNZ Rn
    "1211121111111111",  // Ex: MOVX AJMP MOVX MOVX CLR A MOV A,...
    "1211121111111111"   // Fx: MOVX ACALL MOVX MOVX CPL A MOV ...,A
  };

  function automatic instr_cls_e ref_cls(input logic [7:0] o);
    logic [3:0] h, l;
    h = o[7:4]; l = o[3:0];
    if (l == 4'h1) return o[4] ? I_ACALL : I_AJMP;
    case (o)
      8'h00: return I_NOP;
      8'h02: return I_LJMP;
      8'h12: return I_LCALL;
      8'h22, 8'h32: return I_RET;
      8'h10: return I_JBC;
      8'h20: return I_JB;
      8'h30: return I_JNB;
      8'h40: return I_JC;
      8'h50: return I_JNC;
      8'h60: return I_JZ;
      8'h70: return I_JNZ;
      8'h80: return I_SJMP;
      8'h73: return I_JMPA;
      8'h83, 8'h93: return I_MOVC;
      8'h90: return I_MOVDPTR;
      8'hA3: return I_INCDPTR;
      8'hC0: return I_PUSH;
      8'hD0: return I_POP;
      8'hD5: return I_DJNZ;
      8'hD6, 8'hD7: return I_XCHD;
      8'h72, 8'h82, 8'h92, 8'hA0, 8'hA2, 8'hB0, 8'hB2, 8'hB3,
      8'hC2, 8'hC3, 8'hD2, 8'hD3: return I_BIT;
      8'hE0, 8'hE2, 8'hE3, 8'hF0, 8'hF2, 8'hF3, 8'hA5: return I_ILL;
      8'h84, 8'hA4, 8'hC4, 8'hD4, 8'hF4, 8'h03, 8'h13, 8'h23, 8'h33: return I_ALU;
      8'hE4: return I_MOV;
      default: ;
    endcase
    if (h == 4'hB && l >= 4'h4) return I_CJNE;
    if (h == 4'hD && l >= 4'h8) return I_DJNZ;
    if (h == 4'hC && l >= 4'h5) return I_XCH;
    // INC, DEC, ADD, ADDC, ORL, ANL, XRL, SUBB families
    if (h inside {4'h0, 4'h1} && l >= 4'h4) return I_ALU;
    if (h inside {4'h2, 4'h3, 4'h9} && l >= 4'h4) return I_ALU;
    if (h inside {4'h4, 4'h5, 4'h6} && l >= 4'h2) return I_ALU;
    // MOV families
    if (h == 4'h7 && l >= 4'h4) return I_MOV;
    if (h == 4'h8 && l >= 4'h5) return I_MOV;
    if (h == 4'hA && l >= 4'h6) return I_MOV;
    if (h inside {4'hE, 4'hF} && l >= 4'h5) return I_MOV;
    return I_ILL;
  endfunction

  task automatic full(input logic [7:0] op, input instr_cls_e cls, input src_e src, input dst_e dst,
                      input alu_op_e aop, input bit a1, input op2_e op2, input bit cz,
                      input bit wb, input flags_e fl, input bit r3);
    opcode = op;
    #1;
    check(dec.cls == cls && dec.src == src && dec.dst == dst && dec.alu_op == aop &&
          dec.op1_a == a1 && dec.op2 == op2 && dec.cin_zero == cz && dec.wr_b == wb &&
          dec.flags == fl && dec.rel3 == r3,
          $sformatf("opcode %02h: cls=%s src=%s dst=%s op=%s a1=%0d op2=%s cz=%0d wb=%0d fl=%s r3=%0d",
                    op, dec.cls.name(), dec.src.name(), dec.dst.name(), dec.alu_op.name(),
                    dec.op1_a, dec.op2.name(), dec.cin_zero, dec.wr_b, dec.flags.name(), dec.rel3));
  endtask

  task automatic bitop(input logic [7:0] op, input bit_op_e b);
    opcode = op;
    #1;
    check(dec.cls == I_BIT && dec.bop == b, $sformatf("opcode %02h: bop=%s", op, dec.bop.name()));
  endtask

  initial begin
    for (int o = 0; o < 256; o++) begin
      opcode = 8'(o);
      #1;
      check(int'(dec.nbytes) == LEN_MAP[o / 16][o % 16] - "0",
            $sformatf("opcode %02h: length %0d", o, dec.nbytes));
      check(dec.cls == ref_cls(8'(o)),
            $sformatf("opcode %02h: class %s, expected %s", o, dec.cls.name(), ref_cls(8'(o)).name()));
    end
    //         op     class    src        dst       alu       A  op2       cz wb flags     rel3
    full(8'h24, I_ALU,  SRC_IMM2, DST_A,    ALU_ADD,  1, OP2_OPND, 0, 0, FL_ALL,   0);
    full(8'h35, I_ALU,  SRC_DIR2, DST_A,    ALU_ADDC, 1, OP2_OPND, 0, 0, FL_ALL,   0);
    full(8'h96, I_ALU,  SRC_IND,  DST_A,    ALU_SUBB, 1, OP2_OPND, 0, 0, FL_ALL,   0);
    full(8'h4B, I_ALU,  SRC_RN,   DST_A,    ALU_OR,   1, OP2_OPND, 0, 0, FL_NONE,  0);
    full(8'h52, I_ALU,  SRC_DIR2, DST_DIR2, ALU_AND,  1, OP2_OPND, 0, 0, FL_NONE,  0);
    full(8'h63, I_ALU,  SRC_DIR2, DST_DIR2, ALU_XOR,  0, OP2_IMM3, 0, 0, FL_NONE,  0);
    full(8'h04, I_ALU,  SRC_A,    DST_A,    ALU_ADD,  0, OP2_ONE,  0, 0, FL_NONE,  0);
    full(8'h15, I_ALU,  SRC_DIR2, DST_DIR2, ALU_ADD,  0, OP2_FF,   0, 0, FL_NONE,  0);
    full(8'h07, I_ALU,  SRC_IND,  DST_IND,  ALU_ADD,  0, OP2_ONE,  0, 0, FL_NONE,  0);
    full(8'h1D, I_ALU,  SRC_RN,   DST_RN,   ALU_ADD,  0, OP2_FF,   0, 0, FL_NONE,  0);
    full(8'hA4, I_ALU,  SRC_B,    DST_A,    ALU_MUL,  1, OP2_OPND, 0, 1, FL_CY_OV, 0);
    full(8'h84, I_ALU,  SRC_B,    DST_A,    ALU_DIV,  1, OP2_OPND, 0, 1, FL_CY_OV, 0);
    full(8'h33, I_ALU,  SRC_A,    DST_A,    ALU_RLC,  0, OP2_ZERO, 0, 0, FL_CY,    0);
    full(8'hD4, I_ALU,  SRC_A,    DST_A,    ALU_DA,   0, OP2_ZERO, 0, 0, FL_CY,    0);
    full(8'hC4, I_ALU,  SRC_A,    DST_A,    ALU_SWAP, 0, OP2_ZERO, 0, 0, FL_NONE,  0);
    full(8'hB4, I_CJNE, SRC_IMM2, DST_NONE, ALU_SUBB, 1, OP2_OPND, 1, 0, FL_CY,    1);
    full(8'hB5, I_CJNE, SRC_DIR2, DST_NONE, ALU_SUBB, 1, OP2_OPND, 1, 0, FL_CY,    1);
    full(8'hB7, I_CJNE, SRC_IND,  DST_NONE, ALU_SUBB, 0, OP2_IMM2, 1, 0, FL_CY,    1);
    full(8'hBA, I_CJNE, SRC_RN,   DST_NONE, ALU_SUBB, 0, OP2_IMM2, 1, 0, FL_CY,    1);
    full(8'h76, I_MOV,  SRC_IMM2, DST_IND,  ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE,  0);
    full(8'h75, I_MOV,  SRC_IMM3, DST_DIR2, ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE,  0);
    full(8'h85, I_MOV,  SRC_DIR2, DST_DIR3, ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE,  0);
    full(8'h87, I_MOV,  SRC_IND,  DST_DIR2, ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE,  0);
    full(8'hA9, I_MOV,  SRC_DIR2, DST_RN,   ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE,  0);
    full(8'hE7, I_MOV,  SRC_IND,  DST_A,    ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE,  0);
    full(8'hF6, I_MOV,  SRC_A,    DST_IND,  ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE,  0);
    full(8'hD5, I_DJNZ, SRC_DIR2, DST_DIR2, ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE,  1);
    full(8'hDB, I_DJNZ, SRC_RN,   DST_RN,   ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE,  0);
    full(8'h10, I_JBC,  SRC_BIT,  DST_NONE, ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE,  1);
    full(8'h30, I_JNB,  SRC_BIT,  DST_NONE, ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE,  1);
    full(8'hC0, I_PUSH, SRC_DIR2, DST_NONE, ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE,  0);
    full(8'hD0, I_POP,  SRC_STACK, DST_DIR2, ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE, 0);
    full(8'hC6, I_XCH,  SRC_IND,  DST_NONE, ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE,  0);
    full(8'hD7, I_XCHD, SRC_IND,  DST_NONE, ALU_NONE, 0, OP2_ZERO, 0, 0, FL_NONE,  0);
    bitop(8'hC2, B_CLR);    bitop(8'hD2, B_SETB);   bitop(8'hB2, B_CPL);   bitop(8'h92, B_MOV_TO_BIT);
    bitop(8'hC3, B_CLR_C);  bitop(8'hD3, B_SETB_C); bitop(8'hB3, B_CPL_C); bitop(8'hA2, B_MOV_C);
    bitop(8'h82, B_ANL_C);  bitop(8'hB0, B_ANL_CN); bitop(8'h72, B_ORL_C); bitop(8'hA0, B_ORL_CN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
