// gals8051_pkg: types and constants shared by the GALS 8051 blocks.
//
// The ALU operation code is 4 bits wide. Its values are this design's own
// encoding; 4'hF is "no operation", the value the ALU operation code holds
// between requests, 4'h4 is division and 4'h2 subtraction, which matches the
// values seen on the operation-code bus while a division and then a
// subtraction run. The remaining codes are assigned freely. Increment and
// decrement are additions of 8'h01 and 8'hFF without flag write-back.
//
// Direct addresses 8'h80..8'hFF are the special function registers (SFRs) of
// the 8051; the ones this design implements are listed below.
package gals8051_pkg;

  typedef enum logic [3:0] {
    ALU_ADD  = 4'h0,
    ALU_ADDC = 4'h1,
    ALU_SUBB = 4'h2,
    ALU_MUL  = 4'h3,
    ALU_DIV  = 4'h4,
    ALU_AND  = 4'h5,
    ALU_OR   = 4'h6,
    ALU_XOR  = 4'h7,
    ALU_CPL  = 4'h8,
    ALU_RL   = 4'h9,
    ALU_RLC  = 4'hA,
    ALU_RR   = 4'hB,
    ALU_RRC  = 4'hC,
    ALU_DA   = 4'hD,  // decimal adjust after BCD addition
    ALU_SWAP = 4'hE,  // exchange the nibbles of src1
    ALU_NONE = 4'hF
  } alu_op_e;

  // Operation and operands handed from the controller to the ALU island.
  // src3[0] is the carry input, src3[1] the auxiliary carry (for DA).
  typedef struct packed {
    alu_op_e    op;
    logic [7:0] src1;
    logic [7:0] src2;
    logic [7:0] src3;
  } alu_req_t;

  // Results: des1 is the main result, des2 the second one (high byte of a
  // product, remainder of a division); cy/ac/ov are the new PSW flags.
  typedef struct packed {
    logic [7:0] des1;
    logic [7:0] des2;
    logic       cy;
    logic       ac;
    logic       ov;
  } alu_rsp_t;

  // SFR direct addresses (standard 8051 map).
  localparam logic [7:0] SFR_P0  = 8'h80;
  localparam logic [7:0] SFR_SP  = 8'h81;
  localparam logic [7:0] SFR_DPL = 8'h82;
  localparam logic [7:0] SFR_DPH = 8'h83;
  localparam logic [7:0] SFR_P1  = 8'h90;
  localparam logic [7:0] SFR_P2  = 8'hA0;
  localparam logic [7:0] SFR_P3  = 8'hB0;
  localparam logic [7:0] SFR_PSW = 8'hD0;
  localparam logic [7:0] SFR_ACC = 8'hE0;
  localparam logic [7:0] SFR_B   = 8'hF0;

  // Instruction classes produced by the decoder.
  typedef enum logic [4:0] {
    I_NOP,     // no operation
    I_MOV,     // dst <- operand
    I_ALU,     // dst <- ALU(op1, op2); may also write B and PSW flags
    I_CJNE,    // CY <- op1 < op2 (ALU SUBB); jump if op1 != op2
    I_SJMP,    // PC <- PC + rel
    I_AJMP,    // PC <- {PC[15:11], opcode[7:5], byte2}
    I_LJMP,    // PC <- addr16
    I_JMPA,    // PC <- A + DPTR
    I_JZ,      // jump if A == 0
    I_JNZ,     // jump if A != 0
    I_JC,      // jump if CY
    I_JNC,     // jump if !CY
    I_JB,      // jump if bit set
    I_JNB,     // jump if bit clear
    I_JBC,     // jump if bit set, and clear it
    I_DJNZ,    // operand <- operand - 1, jump if not zero
    I_ACALL,   // push PC, AJMP
    I_LCALL,   // push PC, LJMP
    I_RET,     // pop PC (RET and RETI)
    I_PUSH,    // SP <- SP + 1, (SP) <- operand
    I_POP,     // dst <- (SP), SP <- SP - 1
    I_XCH,     // exchange A and operand
    I_XCHD,    // exchange low nibbles of A and operand
    I_BIT,     // bit operation, see bit_op_e
    I_MOVDPTR, // DPTR <- imm16
    I_INCDPTR, // DPTR <- DPTR + 1
    I_MOVC,    // A <- code memory (A + DPTR or A + PC)
    I_ILL      // opcode outside the implemented set (executed as NOP)
  } instr_cls_e;

  // Where the operand comes from.
  typedef enum logic [3:0] {
    SRC_NONE,
    SRC_IMM2,  // second instruction byte
    SRC_IMM3,  // third instruction byte
    SRC_DIR2,  // RAM/SFR at the direct address in the second byte
    SRC_RN,    // register R0..R7 of the selected bank
    SRC_IND,   // RAM at the address held in R0/R1 (@Ri)
    SRC_A,     // accumulator
    SRC_B,     // B register
    SRC_BIT,   // byte holding the bit addressed by the second byte
    SRC_STACK  // RAM at SP
  } src_e;

  // Where the main result goes.
  typedef enum logic [2:0] {
    DST_NONE,
    DST_A,
    DST_DIR2,  // direct address in the second byte
    DST_DIR3,  // direct address in the third byte
    DST_RN,
    DST_IND
  } dst_e;

  // Second ALU operand.
  typedef enum logic [2:0] {
    OP2_ZERO,
    OP2_OPND,  // the operand
    OP2_IMM2,  // second instruction byte (CJNE Rn/@Ri,#imm)
    OP2_IMM3,  // third instruction byte (ANL/ORL/XRL dir,#imm)
    OP2_ONE,   // 8'h01 (increment)
    OP2_FF     // 8'hFF (decrement)
  } op2_e;

  // PSW flags written after an ALU operation.
  typedef enum logic [1:0] {
    FL_NONE,
    FL_CY,     // CY only
    FL_CY_OV,  // CY and OV
    FL_ALL     // CY, AC and OV
  } flags_e;

  typedef enum logic [3:0] {
    B_CLR, B_SETB, B_CPL, B_MOV_TO_BIT,     // on the addressed bit
    B_CLR_C, B_SETB_C, B_CPL_C, B_MOV_C,    // on CY (B_MOV_C: CY <- bit)
    B_ANL_C, B_ANL_CN, B_ORL_C, B_ORL_CN    // CY <- CY op bit / op !bit
  } bit_op_e;

  typedef struct packed {
    instr_cls_e cls;
    src_e       src;
    dst_e       dst;
    alu_op_e    alu_op;
    logic       op1_a;     // ALU src1 = A (else the operand)
    op2_e       op2;       // ALU src2
    logic       cin_zero;  // carry input forced to 0 (CJNE compare)
    logic       wr_b;      // ALU des2 is written to B (MUL, DIV)
    flags_e     flags;
    bit_op_e    bop;
    logic       rel3;      // relative offset is the third byte
    logic [1:0] nbytes;    // instruction length, 1..3
  } dec_t;

endpackage
