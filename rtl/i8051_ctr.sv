// i8051_ctr: the 8051 controller, the island that runs on the stoppable
// clock.
//
// It fetches instruction bytes from the ROM, has them decoded by the
// instruction decoder, reads its operands from the RAM/SFR block, hands
// arithmetic and logic to the ALU island through the controller wrapper and
// writes the results back into the RAM. Accumulator, B, PSW, SP and DPTR
// live in the RAM block's SFRs, as in the reference 8051, so every
// instruction reads them from there.
//
// Each instruction runs as a fixed sequence of states, one per clock:
//   FETCH (opcode), B2/B3 (further instruction bytes, if any);
//   RD, eleven clocks of RAM reads: ACC, PSW, B, SP, DPL, DPH, the pointer
//     register R0/R1 of the bank, a spare slot, the operand (direct, Rn,
//     @Ri, the byte holding an addressed bit, or the stack top) and the byte
//     below the stack top. The RAM reads synchronously, so each value is
//     captured one clock after its address;
//   EXEC: moves, jumps and bit instructions are worked out here; ALU
//     instructions (and CJNE's compare) start a handshake;
//   ALU_WAIT: wait for the wrapper's done (the clock is stopped meanwhile);
//   WB: up to three RAM writes, one per clock (result, B, PSW; or the stack
//     and SP; or the two halves of an exchange or of DPTR).
// The program counter takes a jump target when the instruction retires;
// retire pulses for one clock then.
//
// Decoded: the whole instruction set except MOVX, which needs external data
// memory this design does not have. There are no interrupts (RETI acts as
// RET) and no timers or serial port. @Ri and the stack address the same
// 256-byte direct space as direct addressing, so addresses 80h..FFh reach
// the SFRs rather than an upper RAM. These limits are choices of this design.
// The ALU request's op field is the decoder's alu_op passed through, and only
// bits 0 (CY) and 1 (AC) of its third source byte are used; bits 7:2 are 0.
module i8051_ctr
  import gals8051_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // program ROM
  output logic [15:0] rom_addr,
  input  logic [7:0]  rom_data,
  // instruction decoder
  output logic [7:0]  dec_opcode,
  input  dec_t        dec,
  // RAM / SFR block
  output logic [7:0]  ram_rd_addr,
  input  logic [7:0]  ram_rd_data,
  output logic        ram_wr_en,
  output logic [7:0]  ram_wr_addr,
  output logic [7:0]  ram_wr_data,
  // ALU, through the controller wrapper
  output logic        alu_start,
  output alu_req_t    alu_req,
  input  logic        alu_ready,
  input  logic        alu_done,
  input  alu_rsp_t    alu_rsp,
  // status
  output logic [15:0] pc,
  output logic        retire
);

  typedef enum logic [2:0] {S_FETCH, S_B2, S_B3, S_RD, S_EXEC, S_ALU_WAIT, S_WB} cstate_e;

  localparam logic [3:0] RD_LAST = 4'd10;

  cstate_e     state;
  logic [3:0]  ridx;
  logic [1:0]  widx;
  logic [7:0]  ir, b2, b3;
  logic [7:0]  acc_r, psw_r, b_r, sp_r, dpl_r, dph_r, ptr_r, mem_r, mem2_r, code_r;
  logic [15:0] pc_tgt;
  logic        jmp;

  // addresses
  logic [7:0]  rn_addr, ri_addr, bit_byte, src_addr, dst_addr;
  logic [7:0]  bit_mask, opnd, rel;
  logic        bitval, cy, cond;
  logic [15:0] dptr, rel_target, abs11, target, movc_addr;

  assign rn_addr  = {3'b000, psw_r[4:3], ir[2:0]};
  assign ri_addr  = {3'b000, psw_r[4:3], 2'b00, ir[0]};
  assign bit_byte = b2[7] ? {b2[7:3], 3'b000} : {4'h2, b2[6:3]};
  assign bit_mask = 8'h01 << b2[2:0];
  assign bitval   = |(mem_r & bit_mask);
  assign cy       = psw_r[7];
  assign dptr     = {dph_r, dpl_r};

  always_comb begin
    unique case (dec.src)
      SRC_RN:    src_addr = rn_addr;
      SRC_IND:   src_addr = ptr_r;
      SRC_BIT:   src_addr = bit_byte;
      SRC_STACK: src_addr = sp_r;
      default:   src_addr = b2;
    endcase
  end

  always_comb begin
    unique case (dec.src)
      SRC_IMM2:                               opnd = b2;
      SRC_IMM3:                               opnd = b3;
      SRC_A:                                  opnd = acc_r;
      SRC_B:                                  opnd = b_r;
      SRC_DIR2, SRC_RN, SRC_IND, SRC_BIT, SRC_STACK: opnd = mem_r;
      default:                                opnd = 8'h00;
    endcase
  end

  always_comb begin
    unique case (dec.dst)
      DST_DIR2: dst_addr = b2;
      DST_DIR3: dst_addr = b3;
      DST_RN:   dst_addr = rn_addr;
      DST_IND:  dst_addr = ptr_r;
      default:  dst_addr = SFR_ACC;
    endcase
  end

  // ---------------------------------------------------------------- ROM
  // The MOVC address mux looks at the opcode register itself (83h/93h), not
  // at the decoder, whose input is the ROM output during FETCH.
  logic is_movc;
  assign is_movc    = (ir == 8'h83) || (ir == 8'h93);
  assign movc_addr  = (ir[4] ? dptr : pc) + {8'h00, acc_r};
  assign rom_addr   = (state == S_EXEC && is_movc) ? movc_addr : pc;
  assign dec_opcode = (state == S_FETCH) ? rom_data : ir;

  // ---------------------------------------------------------------- reads
  always_comb begin
    unique case (ridx)
      4'd0:    ram_rd_addr = SFR_ACC;
      4'd1:    ram_rd_addr = SFR_PSW;
      4'd2:    ram_rd_addr = SFR_B;
      4'd3:    ram_rd_addr = SFR_SP;
      4'd4:    ram_rd_addr = SFR_DPL;
      4'd5:    ram_rd_addr = SFR_DPH;
      4'd6:    ram_rd_addr = ri_addr;
      4'd8:    ram_rd_addr = src_addr;
      4'd9:    ram_rd_addr = sp_r - 8'd1;
      default: ram_rd_addr = SFR_ACC;
    endcase
  end

  // ---------------------------------------------------------------- ALU
  always_comb begin
    alu_req.op   = dec.alu_op;
    alu_req.src1 = dec.op1_a ? acc_r : opnd;
    unique case (dec.op2)
      OP2_OPND: alu_req.src2 = opnd;
      OP2_IMM2: alu_req.src2 = b2;
      OP2_IMM3: alu_req.src2 = b3;
      OP2_ONE:  alu_req.src2 = 8'h01;
      OP2_FF:   alu_req.src2 = 8'hFF;
      default:  alu_req.src2 = 8'h00;
    endcase
    alu_req.src3 = dec.cin_zero ? 8'h00 : {6'b0, psw_r[6], psw_r[7]};
  end

  assign alu_start = (state == S_EXEC) && (dec.cls inside {I_ALU, I_CJNE}) && alu_ready;

  // ---------------------------------------------------------------- jumps
  assign rel        = dec.rel3 ? b3 : b2;
  assign rel_target = pc + {{8{rel[7]}}, rel};
  assign abs11      = {pc[15:11], ir[7:5], b2};

  always_comb begin
    unique case (dec.cls)
      I_SJMP, I_AJMP, I_LJMP, I_JMPA, I_ACALL, I_LCALL, I_RET: cond = 1'b1;
      I_JZ:    cond = (acc_r == 8'h00);
      I_JNZ:   cond = (acc_r != 8'h00);
      I_JC:    cond = cy;
      I_JNC:   cond = !cy;
      I_JB:    cond = bitval;
      I_JBC:   cond = bitval;
      I_JNB:   cond = !bitval;
      I_DJNZ:  cond = (opnd != 8'h01);
      default: cond = 1'b0;
    endcase
    unique case (dec.cls)
      I_AJMP, I_ACALL: target = abs11;
      I_LJMP, I_LCALL: target = {b2, b3};
      I_JMPA:          target = dptr + {8'h00, acc_r};
      I_RET:           target = {mem_r, mem2_r};
      default:         target = rel_target;
    endcase
  end

  // ---------------------------------------------------------------- write-back slots
  logic [7:0] wa [3];
  logic [7:0] wd [3];
  logic [1:0] w_cnt;
  logic [7:0] psw_alu, bit_new;
  logic       c_new;

  always_comb begin
    unique case (dec.flags)
      FL_CY:    psw_alu = {alu_rsp.cy, psw_r[6:0]};
      FL_CY_OV: psw_alu = {alu_rsp.cy, psw_r[6:3], alu_rsp.ov, psw_r[1:0]};
      default:  psw_alu = {alu_rsp.cy, alu_rsp.ac, psw_r[5:3], alu_rsp.ov, psw_r[1:0]};
    endcase
    unique case (dec.bop)
      B_CLR:        bit_new = mem_r & ~bit_mask;
      B_SETB:       bit_new = mem_r | bit_mask;
      B_CPL:        bit_new = mem_r ^ bit_mask;
      default:      bit_new = cy ? (mem_r | bit_mask) : (mem_r & ~bit_mask);  // MOV bit,C
    endcase
    unique case (dec.bop)
      B_CLR_C:  c_new = 1'b0;
      B_SETB_C: c_new = 1'b1;
      B_CPL_C:  c_new = !cy;
      B_MOV_C:  c_new = bitval;
      B_ANL_C:  c_new = cy & bitval;
      B_ANL_CN: c_new = cy & !bitval;
      B_ORL_C:  c_new = cy | bitval;
      default:  c_new = cy | !bitval;    // B_ORL_CN
    endcase
  end

  always_comb begin
    w_cnt = 2'd0;
    for (int i = 0; i < 3; i++) begin
      wa[i] = SFR_ACC;
      wd[i] = 8'h00;
    end
    unique case (dec.cls)
      I_MOV: begin
        w_cnt = 2'd1; wa[0] = dst_addr; wd[0] = opnd;
      end
      I_ALU: begin
        w_cnt = 2'd1; wa[0] = dst_addr; wd[0] = alu_rsp.des1;
        if (dec.wr_b) begin
          w_cnt = 2'd2; wa[1] = SFR_B; wd[1] = alu_rsp.des2;
          if (dec.flags != FL_NONE) begin
            w_cnt = 2'd3; wa[2] = SFR_PSW; wd[2] = psw_alu;
          end
        end else if (dec.flags != FL_NONE) begin
          w_cnt = 2'd2; wa[1] = SFR_PSW; wd[1] = psw_alu;
        end
      end
      I_CJNE: begin
        w_cnt = 2'd1; wa[0] = SFR_PSW; wd[0] = psw_alu;
      end
      I_DJNZ: begin
        w_cnt = 2'd1; wa[0] = dst_addr; wd[0] = opnd - 8'd1;
      end
      I_JBC: if (bitval) begin
        w_cnt = 2'd1; wa[0] = bit_byte; wd[0] = mem_r & ~bit_mask;
      end
      I_BIT: begin
        w_cnt = 2'd1;
        if (dec.bop inside {B_CLR, B_SETB, B_CPL, B_MOV_TO_BIT}) begin
          wa[0] = bit_byte; wd[0] = bit_new;
        end else begin
          wa[0] = SFR_PSW;  wd[0] = {c_new, psw_r[6:0]};
        end
      end
      I_XCH: begin
        w_cnt = 2'd2;
        wa[0] = src_addr; wd[0] = acc_r;
        wa[1] = SFR_ACC;  wd[1] = opnd;
      end
      I_XCHD: begin
        w_cnt = 2'd2;
        wa[0] = src_addr; wd[0] = {opnd[7:4], acc_r[3:0]};
        wa[1] = SFR_ACC;  wd[1] = {acc_r[7:4], opnd[3:0]};
      end
      I_PUSH: begin
        w_cnt = 2'd2;
        wa[0] = sp_r + 8'd1; wd[0] = opnd;
        wa[1] = SFR_SP;      wd[1] = sp_r + 8'd1;
      end
      I_POP: begin
        w_cnt = 2'd2;
        wa[0] = SFR_SP; wd[0] = sp_r - 8'd1;
        wa[1] = b2;     wd[1] = opnd;
      end
      I_ACALL, I_LCALL: begin
        w_cnt = 2'd3;
        wa[0] = sp_r + 8'd1; wd[0] = pc[7:0];
        wa[1] = sp_r + 8'd2; wd[1] = pc[15:8];
        wa[2] = SFR_SP;      wd[2] = sp_r + 8'd2;
      end
      I_RET: begin
        w_cnt = 2'd1; wa[0] = SFR_SP; wd[0] = sp_r - 8'd2;
      end
      I_MOVDPTR: begin
        w_cnt = 2'd2;
        wa[0] = SFR_DPH; wd[0] = b2;
        wa[1] = SFR_DPL; wd[1] = b3;
      end
      I_INCDPTR: begin
        w_cnt = 2'd2;
        wa[0] = SFR_DPL; wd[0] = dpl_r + 8'd1;
        wa[1] = SFR_DPH; wd[1] = dph_r + {7'b0, (dpl_r == 8'hFF)};
      end
      I_MOVC: begin
        w_cnt = 2'd1; wa[0] = SFR_ACC; wd[0] = code_r;
      end
      default: ;
    endcase
  end

  assign ram_wr_en   = (state == S_WB);
  assign ram_wr_addr = wa[widx];
  assign ram_wr_data = wd[widx];

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_FETCH;
      pc     <= 16'h0000;
      ir     <= 8'h00;
      b2     <= 8'h00;
      b3     <= 8'h00;
      ridx   <= '0;
      widx   <= '0;
      acc_r  <= 8'h00;
      psw_r  <= 8'h00;
      b_r    <= 8'h00;
      sp_r   <= 8'h07;
      dpl_r  <= 8'h00;
      dph_r  <= 8'h00;
      ptr_r  <= 8'h00;
      mem_r  <= 8'h00;
      mem2_r <= 8'h00;
      code_r <= 8'h00;
      pc_tgt <= 16'h0000;
      jmp    <= 1'b0;
      retire <= 1'b0;
    end else begin
      retire <= 1'b0;
      unique case (state)
        S_FETCH: begin
          ir    <= rom_data;
          pc    <= pc + 16'd1;
          ridx  <= '0;
          state <= (dec.nbytes > 2'd1) ? S_B2 : S_RD;
        end
        S_B2: begin
          b2    <= rom_data;
          pc    <= pc + 16'd1;
          state <= (dec.nbytes > 2'd2) ? S_B3 : S_RD;
        end
        S_B3: begin
          b3    <= rom_data;
          pc    <= pc + 16'd1;
          state <= S_RD;
        end
        S_RD: begin
          unique case (ridx)
            4'd1:    acc_r  <= ram_rd_data;
            4'd2:    psw_r  <= ram_rd_data;
            4'd3:    b_r    <= ram_rd_data;
            4'd4:    sp_r   <= ram_rd_data;
            4'd5:    dpl_r  <= ram_rd_data;
            4'd6:    dph_r  <= ram_rd_data;
            4'd7:    ptr_r  <= ram_rd_data;
            4'd9:    mem_r  <= ram_rd_data;
            4'd10:   mem2_r <= ram_rd_data;
            default: ;
          endcase
          ridx <= ridx + 4'd1;
          if (ridx == RD_LAST) state <= S_EXEC;
        end
        S_EXEC: begin
          widx   <= '0;
          code_r <= rom_data;
          jmp    <= cond;
          pc_tgt <= target;
          if (dec.cls inside {I_ALU, I_CJNE}) begin
            if (alu_ready) state <= S_ALU_WAIT;
          end else if (w_cnt != 2'd0) begin
            state <= S_WB;
          end else begin
            if (cond) pc <= target;
            retire <= 1'b1;
            state  <= S_FETCH;
          end
        end
        S_ALU_WAIT: if (alu_done) begin
          // CJNE jumps when its operands differ
          jmp   <= (dec.cls == I_CJNE) && (alu_req.src1 != alu_req.src2);
          state <= S_WB;
        end
        S_WB: begin
          if (widx == w_cnt - 2'd1) begin
            if (jmp) pc <= pc_tgt;
            retire <= 1'b1;
            state  <= S_FETCH;
          end
          widx <= widx + 2'd1;
        end
        default: state <= S_FETCH;
      endcase
    end
  end

endmodule
