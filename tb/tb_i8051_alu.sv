// tb_i8051_alu: self-checking test of the combinational 8051 ALU.
// Every operation is applied to directed corner cases and to random operands
// and compared with a reference written from the 8051 instruction-set rules
// (integer arithmetic on wider values, flags from their definitions),
// including the decimal adjust with its carry and auxiliary-carry inputs.
module tb_i8051_alu;
  import gals8051_pkg::*;

  alu_req_t req;
  alu_rsp_t rsp;
  int checks = 0, failures = 0;

  i8051_alu dut (.req, .rsp);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic alu_rsp_t model(input alu_op_e op, input int a, input int b, input int c, input int ac_in);
    alu_rsp_t r;
    int s, h;
    r = '0;
    r.cy = c[0];
    case (op)
      ALU_ADD, ALU_ADDC: begin
        s = a + b + ((op == ALU_ADDC) ? c : 0);
        h = (a % 16) + (b % 16) + ((op == ALU_ADDC) ? c : 0);
        r.des1 = s[7:0]; r.cy = (s > 255); r.ac = (h > 15);
        r.ov = ((a + ((a>127)? -256:0)) + (b + ((b>127)? -256:0)) + ((op == ALU_ADDC) ? c : 0)) > 127 ||
               ((a + ((a>127)? -256:0)) + (b + ((b>127)? -256:0)) + ((op == ALU_ADDC) ? c : 0)) < -128;
      end
      ALU_SUBB: begin
        s = a - b - c;
        h = (a % 16) - (b % 16) - c;
        r.des1 = s[7:0]; r.cy = (s < 0); r.ac = (h < 0);
        r.ov = ((a + ((a>127)? -256:0)) - (b + ((b>127)? -256:0)) - c) > 127 ||
               ((a + ((a>127)? -256:0)) - (b + ((b>127)? -256:0)) - c) < -128;
      end
      ALU_MUL: begin
        s = a * b; r.des1 = s[7:0]; r.des2 = s[15:8]; r.cy = 0; r.ov = (s > 255);
      end
      ALU_DIV: begin
        r.cy = 0;
        if (b == 0) begin r.des1 = 8'hFF; r.des2 = 8'hFF; r.ov = 1; end
        else begin s = a / b; h = a % b; r.des1 = s[7:0]; r.des2 = h[7:0]; r.ov = 0; end
      end
      ALU_AND: begin s = a & b; r.des1 = s[7:0]; end
      ALU_OR:  begin s = a | b; r.des1 = s[7:0]; end
      ALU_XOR: begin s = a ^ b; r.des1 = s[7:0]; end
      ALU_CPL: begin s = 255 - a; r.des1 = s[7:0]; end
      ALU_RL:  begin s = (a * 2) % 256 + a / 128; r.des1 = s[7:0]; end
      ALU_RR:  begin s = a / 2 + (a % 2) * 128; r.des1 = s[7:0]; end
      ALU_RLC: begin s = (a * 2) % 256 + c; r.des1 = s[7:0]; r.cy = (a >= 128); end
      ALU_RRC: begin s = a / 2 + c * 128; r.des1 = s[7:0]; r.cy = a % 2; end
      ALU_DA: begin
        s = a; h = c % 2;
        if ((a % 16) > 9 || (ac_in == 1)) s = s + 6;
        if (s > 255) begin h = 1; s = s - 256; end
        if ((s / 16) > 9 || h == 1) s = s + 96;
        if (s > 255) begin h = 1; s = s - 256; end
        r.des1 = s[7:0]; r.cy = h[0];
      end
      ALU_SWAP: begin s = (a % 16) * 16 + a / 16; r.des1 = s[7:0]; end
      default: r.des1 = a[7:0];
    endcase
    return r;
  endfunction

  task automatic apply(input alu_op_e op, input int a, input int b, input int c, input int ac_in = 0);
    alu_rsp_t exp;
    req = '{op: op, src1: a[7:0], src2: b[7:0], src3: {6'b0, ac_in[0], c[0]}};
    #1;
    exp = model(op, a, b, c, ac_in);
    // ac is defined only for ADD/ADDC/SUBB; ov only for those and MUL/DIV
    checks++;
    if (rsp.des1 !== exp.des1 || rsp.des2 !== exp.des2 || rsp.cy !== exp.cy ||
        (op inside {ALU_ADD, ALU_ADDC, ALU_SUBB} && (rsp.ac !== exp.ac || rsp.ov !== exp.ov)) ||
        (op inside {ALU_MUL, ALU_DIV} && rsp.ov !== exp.ov)) begin
      failures++;
      $display("FAIL: op=%s a=%02h b=%02h c=%0d got %02h/%02h cy%0d ac%0d ov%0d exp %02h/%02h cy%0d ac%0d ov%0d",
               op.name(), a, b, c, rsp.des1, rsp.des2, rsp.cy, rsp.ac, rsp.ov,
               exp.des1, exp.des2, exp.cy, exp.ac, exp.ov);
    end
  endtask

  initial begin
    // the division and subtraction of the demonstration program
    apply(ALU_DIV, 8'hFB, 8'h12, 0);
    checks++; if (rsp.des1 != 8'h0D || rsp.des2 != 8'h11) begin failures++; $display("FAIL: FB/12"); end
    apply(ALU_SUBB, 8'h0D, 8'h04, 0);
    checks++; if (rsp.des1 != 8'h09) begin failures++; $display("FAIL: 0D-04"); end
    apply(ALU_DIV, 8'h10, 8'h00, 0);
    apply(ALU_ADD, 8'h7F, 8'h01, 0);
    apply(ALU_ADD, 8'hFF, 8'h01, 0);
    apply(ALU_SUBB, 8'h80, 8'h01, 0);
    apply(ALU_SUBB, 8'h00, 8'h00, 1);
    apply(ALU_MUL, 8'hFF, 8'hFF, 0);
    // decimal adjust: 0x49 + 0x38 = 0x81 with AC -> 87
    apply(ALU_DA, 8'h81, 0, 0, 1);
    checks++; if (rsp.des1 != 8'h87 || rsp.cy) begin failures++; $display("FAIL: DA 81"); end
    apply(ALU_DA, 8'h9A, 0, 0, 0);   // 0x9A -> 0x00 with CY
    checks++; if (rsp.des1 != 8'h00 || !rsp.cy) begin failures++; $display("FAIL: DA 9A"); end
    apply(ALU_SWAP, 8'h3C, 0, 0);
    checks++; if (rsp.des1 != 8'hC3) begin failures++; $display("FAIL: SWAP"); end
    for (int i = 0; i < 4000; i++) begin
      apply(alu_op_e'(4'($urandom_range(0, 15))), int'($urandom_range(0, 255)),
            int'($urandom_range(0, 255)), int'($urandom_range(0, 1)), int'($urandom_range(0, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
