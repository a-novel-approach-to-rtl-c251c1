// i8051_alu: the 8-bit arithmetic/logic unit of the 8051, purely combinational.
//
// The controller hands it an operation code and up to three source bytes
// (src3[0] is the carry input); it returns a main result des1, a second
// result des2 and the carry, auxiliary-carry and overflow flags. The ALU has
// no clock: in the GALS arrangement the ALU wrapper around it decides when
// the result is valid, with a delay that depends on the operation (division
// being the slowest, about 140 ns in the reference implementation).
//
// Flag rules follow the 8051 instruction set: ADD/ADDC/SUBB set CY, AC and
// OV; MUL clears CY and sets OV when the product exceeds 255; DIV clears CY
// and sets OV on a zero divisor (results are then 8'hFF, a choice of this
// design). DA adds 06h and/or 60h as the 8051 decimal adjust does, using CY
// and AC from src3, and can only set CY. SWAP exchanges the nibbles. Logical
// and rotate operations pass CY through, except RLC/RRC.
// Operation codes are defined in gals8051_pkg.
module i8051_alu
  import gals8051_pkg::*;
(
  input  alu_req_t req,
  output alu_rsp_t rsp
);

  logic [7:0] a, b;
  logic       cin, acin;
  logic [8:0] da1, da2;
  logic [8:0] sum9;
  logic [15:0] prod;

  assign a   = req.src1;
  assign b   = req.src2;
  assign cin  = req.src3[0];
  assign acin = req.src3[1];
  assign prod = a * b;

  always_comb begin
    rsp      = '0;
    rsp.cy   = cin;
    sum9     = '0;
    da1      = '0;
    da2      = '0;
    unique case (req.op)
      ALU_ADD, ALU_ADDC: begin
        sum9     = {1'b0, a} + {1'b0, b} + 9'((req.op == ALU_ADDC) ? cin : 1'b0);
        rsp.des1 = sum9[7:0];
        rsp.cy   = sum9[8];
        rsp.ac   = a[4] ^ b[4] ^ sum9[4];   // carry/borrow out of bit 3
        rsp.ov   = (a[7] == b[7]) && (sum9[7] != a[7]);
      end
      ALU_SUBB: begin
        sum9     = {1'b0, a} - {1'b0, b} - 9'(cin);
        rsp.des1 = sum9[7:0];
        rsp.cy   = sum9[8];
        rsp.ac   = a[4] ^ b[4] ^ sum9[4];   // carry/borrow out of bit 3
        rsp.ov   = (a[7] != b[7]) && (sum9[7] != a[7]);
      end
      ALU_MUL: begin
        rsp.des1 = prod[7:0];
        rsp.des2 = prod[15:8];
        rsp.cy   = 1'b0;
        rsp.ov   = |prod[15:8];
      end
      ALU_DIV: begin
        rsp.cy = 1'b0;
        if (b == 8'h00) begin
          rsp.des1 = 8'hFF;
          rsp.des2 = 8'hFF;
          rsp.ov   = 1'b1;
        end else begin
          rsp.des1 = a / b;
          rsp.des2 = a % b;
          rsp.ov   = 1'b0;
        end
      end
      ALU_AND:  rsp.des1 = a & b;
      ALU_OR:   rsp.des1 = a | b;
      ALU_XOR:  rsp.des1 = a ^ b;
      ALU_CPL:  rsp.des1 = ~a;
      ALU_RL:   rsp.des1 = {a[6:0], a[7]};
      ALU_RR:   rsp.des1 = {a[0], a[7:1]};
      ALU_RLC: begin
        rsp.des1 = {a[6:0], cin};
        rsp.cy   = a[7];
      end
      ALU_RRC: begin
        rsp.des1 = {cin, a[7:1]};
        rsp.cy   = a[0];
      end
      ALU_DA: begin
        da1 = (a[3:0] > 4'd9 || acin) ? {1'b0, a} + 9'h006 : {1'b0, a};
        da2 = (da1[7:4] > 4'd9 || cin || da1[8]) ? {1'b0, da1[7:0]} + 9'h060 : {1'b0, da1[7:0]};
        rsp.des1 = da2[7:0];
        rsp.cy   = cin | da1[8] | da2[8];
      end
      ALU_SWAP: rsp.des1 = {a[3:0], a[7:4]};
      ALU_NONE: rsp.des1 = a;
      default:  rsp.des1 = a;
    endcase
  end

endmodule
