// i8051_dec: combinational instruction decoder of the 8051 controller.
//
// It maps the opcode byte fetched from the ROM to a dec_t record: the
// instruction class, where the operand comes from, where the result goes,
// which ALU operation is needed and with which second operand, which PSW
// flags and whether B are written, the bit operation, where the relative
// offset sits and the instruction length in bytes. The controller sequences
// each instruction from this record alone.
//
// The whole 8051 instruction set is decoded except the external data memory
// moves (MOVX, opcodes E0, E2, E3, F0, F2, F3), since this design has no
// external data bus; those and the unused opcode A5 decode as I_ILL, one
// byte long, and the controller skips them. RETI decodes as RET (there are
// no interrupts). Increment and decrement use the ALU's ADD with a constant
// second operand and write no flags, as on the 8051.
module i8051_dec
  import gals8051_pkg::*;
(
  input  logic [7:0] opcode,
  output dec_t       dec
);

  logic [3:0] hi, lo;
  src_e       col_src;   // operand of columns 5, 6/7 and 8..F
  dst_e       col_dst;
  logic [1:0] col_len;   // length added by the operand (direct: +1)

  assign hi = opcode[7:4];
  assign lo = opcode[3:0];

  always_comb begin
    if (lo == 4'h5) begin
      col_src = SRC_DIR2; col_dst = DST_DIR2; col_len = 2'd1;
    end else if (lo == 4'h6 || lo == 4'h7) begin
      col_src = SRC_IND;  col_dst = DST_IND;  col_len = 2'd0;
    end else begin
      col_src = SRC_RN;   col_dst = DST_RN;   col_len = 2'd0;
    end
  end

  always_comb begin
    dec          = '0;
    dec.cls      = I_ILL;
    dec.src      = SRC_NONE;
    dec.dst      = DST_NONE;
    dec.alu_op   = ALU_NONE;
    dec.op2      = OP2_ZERO;
    dec.flags    = FL_NONE;
    dec.bop      = B_CLR;
    dec.nbytes   = 2'd1;

    if (lo >= 4'h5 || (lo == 4'h4 && hi inside {4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h9})) begin
      // ---- columns 4 (#imm for the A-op rows), 5 (direct), 6/7 (@Ri), 8..F (Rn)
      unique case (hi)
        4'h0, 4'h1: begin                                   // INC / DEC operand
          dec.cls    = I_ALU;
          dec.src    = col_src; dec.dst = col_dst;
          dec.alu_op = ALU_ADD;
          dec.op2    = (hi == 4'h0) ? OP2_ONE : OP2_FF;
          dec.nbytes = 2'd1 + col_len;
        end
        4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h9: begin           // A <- A op operand
          dec.cls    = I_ALU;
          dec.op1_a  = 1'b1;
          dec.op2    = OP2_OPND;
          dec.dst    = DST_A;
          unique case (hi)
            4'h2:    dec.alu_op = ALU_ADD;
            4'h3:    dec.alu_op = ALU_ADDC;
            4'h4:    dec.alu_op = ALU_OR;
            4'h5:    dec.alu_op = ALU_AND;
            4'h6:    dec.alu_op = ALU_XOR;
            default: dec.alu_op = ALU_SUBB;
          endcase
          dec.flags  = (hi inside {4'h2, 4'h3, 4'h9}) ? FL_ALL : FL_NONE;
          if (lo == 4'h4) begin
            dec.src = SRC_IMM2; dec.nbytes = 2'd2;
          end else begin
            dec.src = col_src; dec.nbytes = 2'd1 + col_len;
          end
        end
        4'h7: begin                                         // MOV operand,#imm
          dec.cls = I_MOV;
          dec.dst = col_dst;
          if (lo == 4'h5) begin                              // 75: MOV dir,#imm
            dec.src = SRC_IMM3; dec.nbytes = 2'd3;
          end else begin
            dec.src = SRC_IMM2; dec.nbytes = 2'd2;
          end
        end
        4'h8: begin                                         // MOV dir,operand
          dec.cls = I_MOV;
          if (lo == 4'h5) begin                              // 85: MOV dir(3),dir(2)
            dec.src = SRC_DIR2; dec.dst = DST_DIR3; dec.nbytes = 2'd3;
          end else begin
            dec.src = col_src; dec.dst = DST_DIR2; dec.nbytes = 2'd2;
          end
        end
        4'hA: begin                                         // MOV operand,dir
          if (lo == 4'h5) begin
            dec.cls = I_ILL;                                 // A5 is unused
          end else begin
            dec.cls = I_MOV; dec.src = SRC_DIR2; dec.dst = col_dst; dec.nbytes = 2'd2;
          end
        end
        4'hB: begin                                         // CJNE
          dec.cls      = I_CJNE;
          dec.alu_op   = ALU_SUBB;
          dec.cin_zero = 1'b1;
          dec.flags    = FL_CY;
          dec.rel3     = 1'b1;
          dec.nbytes   = 2'd3;
          if (lo == 4'h5) begin                              // B5: CJNE A,dir,rel
            dec.op1_a = 1'b1; dec.src = SRC_DIR2; dec.op2 = OP2_OPND;
          end else begin                                     // CJNE @Ri/Rn,#imm,rel
            dec.src = col_src; dec.op2 = OP2_IMM2;
          end
        end
        4'hC: begin                                         // XCH A,operand
          dec.cls = I_XCH; dec.src = col_src; dec.nbytes = 2'd1 + col_len;
        end
        4'hD: begin
          if (lo == 4'h6 || lo == 4'h7) begin                // XCHD A,@Ri
            dec.cls = I_XCHD; dec.src = SRC_IND;
          end else begin                                     // DJNZ Rn,rel / DJNZ dir,rel
            dec.cls    = I_DJNZ;
            dec.src    = col_src; dec.dst = col_dst;
            dec.rel3   = (lo == 4'h5);
            dec.nbytes = 2'd2 + col_len;
          end
        end
        4'hE: begin                                         // MOV A,operand
          dec.cls = I_MOV; dec.src = col_src; dec.dst = DST_A; dec.nbytes = 2'd1 + col_len;
        end
        default: begin                                      // F: MOV operand,A
          dec.cls = I_MOV; dec.src = SRC_A; dec.dst = col_dst; dec.nbytes = 2'd1 + col_len;
        end
      endcase
    end else if (lo == 4'h1) begin
      // ---- column 1: AJMP / ACALL with an 11-bit address
      dec.cls    = hi[0] ? I_ACALL : I_AJMP;
      dec.nbytes = 2'd2;
    end else begin
      unique case (opcode)
        8'h00: dec.cls = I_NOP;
        // column 0
        8'h10: begin dec.cls = I_JBC;  dec.src = SRC_BIT; dec.rel3 = 1'b1; dec.nbytes = 2'd3; end
        8'h20: begin dec.cls = I_JB;   dec.src = SRC_BIT; dec.rel3 = 1'b1; dec.nbytes = 2'd3; end
        8'h30: begin dec.cls = I_JNB;  dec.src = SRC_BIT; dec.rel3 = 1'b1; dec.nbytes = 2'd3; end
        8'h40: begin dec.cls = I_JC;   dec.nbytes = 2'd2; end
        8'h50: begin dec.cls = I_JNC;  dec.nbytes = 2'd2; end
        8'h60: begin dec.cls = I_JZ;   dec.nbytes = 2'd2; end
        8'h70: begin dec.cls = I_JNZ;  dec.nbytes = 2'd2; end
        8'h80: begin dec.cls = I_SJMP; dec.nbytes = 2'd2; end
        8'h90: begin dec.cls = I_MOVDPTR; dec.nbytes = 2'd3; end
        8'hA0: begin dec.cls = I_BIT; dec.bop = B_ORL_CN; dec.src = SRC_BIT; dec.nbytes = 2'd2; end
        8'hB0: begin dec.cls = I_BIT; dec.bop = B_ANL_CN; dec.src = SRC_BIT; dec.nbytes = 2'd2; end
        8'hC0: begin dec.cls = I_PUSH; dec.src = SRC_DIR2; dec.nbytes = 2'd2; end
        8'hD0: begin dec.cls = I_POP;  dec.src = SRC_STACK; dec.dst = DST_DIR2; dec.nbytes = 2'd2; end
        // column 2
        8'h02: begin dec.cls = I_LJMP;  dec.nbytes = 2'd3; end
        8'h12: begin dec.cls = I_LCALL; dec.nbytes = 2'd3; end
        8'h22, 8'h32: begin dec.cls = I_RET; dec.src = SRC_STACK; end
        8'h42, 8'h52, 8'h62: begin                           // ORL/ANL/XRL dir,A
          dec.cls = I_ALU; dec.src = SRC_DIR2; dec.dst = DST_DIR2; dec.op1_a = 1'b1;
          dec.op2 = OP2_OPND; dec.nbytes = 2'd2;
          dec.alu_op = (hi == 4'h4) ? ALU_OR : (hi == 4'h5) ? ALU_AND : ALU_XOR;
        end
        8'h72: begin dec.cls = I_BIT; dec.bop = B_ORL_C;      dec.src = SRC_BIT; dec.nbytes = 2'd2; end
        8'h82: begin dec.cls = I_BIT; dec.bop = B_ANL_C;      dec.src = SRC_BIT; dec.nbytes = 2'd2; end
        8'h92: begin dec.cls = I_BIT; dec.bop = B_MOV_TO_BIT; dec.src = SRC_BIT; dec.nbytes = 2'd2; end
        8'hA2: begin dec.cls = I_BIT; dec.bop = B_MOV_C;      dec.src = SRC_BIT; dec.nbytes = 2'd2; end
        8'hB2: begin dec.cls = I_BIT; dec.bop = B_CPL;        dec.src = SRC_BIT; dec.nbytes = 2'd2; end
        8'hC2: begin dec.cls = I_BIT; dec.bop = B_CLR;        dec.src = SRC_BIT; dec.nbytes = 2'd2; end
        8'hD2: begin dec.cls = I_BIT; dec.bop = B_SETB;       dec.src = SRC_BIT; dec.nbytes = 2'd2; end
        // column 3
        8'h03, 8'h13, 8'h23, 8'h33: begin                    // rotates
          dec.cls = I_ALU; dec.src = SRC_A; dec.dst = DST_A;
          unique case (hi)
            4'h0:    dec.alu_op = ALU_RR;
            4'h1:    begin dec.alu_op = ALU_RRC; dec.flags = FL_CY; end
            4'h2:    dec.alu_op = ALU_RL;
            default: begin dec.alu_op = ALU_RLC; dec.flags = FL_CY; end
          endcase
        end
        8'h43, 8'h53, 8'h63: begin                           // ORL/ANL/XRL dir,#imm
          dec.cls = I_ALU; dec.src = SRC_DIR2; dec.dst = DST_DIR2; dec.op2 = OP2_IMM3;
          dec.nbytes = 2'd3;
          dec.alu_op = (hi == 4'h4) ? ALU_OR : (hi == 4'h5) ? ALU_AND : ALU_XOR;
        end
        8'h73: dec.cls = I_JMPA;
        8'h83: dec.cls = I_MOVC;
        8'h93: dec.cls = I_MOVC;
        8'hA3: dec.cls = I_INCDPTR;
        8'hB3: begin dec.cls = I_BIT; dec.bop = B_CPL_C;  end
        8'hC3: begin dec.cls = I_BIT; dec.bop = B_CLR_C;  end
        8'hD3: begin dec.cls = I_BIT; dec.bop = B_SETB_C; end
        // column 4, rows without an A-op
        8'h04, 8'h14: begin                                  // INC A / DEC A
          dec.cls = I_ALU; dec.src = SRC_A; dec.dst = DST_A; dec.alu_op = ALU_ADD;
          dec.op2 = (hi == 4'h0) ? OP2_ONE : OP2_FF;
        end
        8'h74: begin dec.cls = I_MOV; dec.src = SRC_IMM2; dec.dst = DST_A; dec.nbytes = 2'd2; end
        8'h84, 8'hA4: begin                                  // DIV AB / MUL AB
          dec.cls = I_ALU; dec.src = SRC_B; dec.dst = DST_A; dec.op1_a = 1'b1;
          dec.op2 = OP2_OPND; dec.wr_b = 1'b1; dec.flags = FL_CY_OV;
          dec.alu_op = (hi == 4'h8) ? ALU_DIV : ALU_MUL;
        end
        8'hB4: begin                                         // CJNE A,#imm,rel
          dec.cls = I_CJNE; dec.op1_a = 1'b1; dec.src = SRC_IMM2; dec.op2 = OP2_OPND;
          dec.alu_op = ALU_SUBB; dec.cin_zero = 1'b1; dec.flags = FL_CY;
          dec.rel3 = 1'b1; dec.nbytes = 2'd3;
        end
        8'hC4: begin dec.cls = I_ALU; dec.src = SRC_A; dec.dst = DST_A; dec.alu_op = ALU_SWAP; end
        8'hD4: begin
          dec.cls = I_ALU; dec.src = SRC_A; dec.dst = DST_A; dec.alu_op = ALU_DA; dec.flags = FL_CY;
        end
        8'hE4: begin dec.cls = I_MOV; dec.src = SRC_NONE; dec.dst = DST_A; end   // CLR A
        8'hF4: begin dec.cls = I_ALU; dec.src = SRC_A; dec.dst = DST_A; dec.alu_op = ALU_CPL; end
        default: dec.cls = I_ILL;                            // MOVX
      endcase
    end
  end

endmodule
