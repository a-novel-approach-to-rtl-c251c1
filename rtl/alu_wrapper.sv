// alu_wrapper: acknowledge side of the 4-phase handshake, around the ALU
// island.
//
// The wrapper runs on the ALU island's own clock. It synchronizes the
// incoming req through SYNC_STAGES flip-flops; on a rising req it latches the
// bundled operation and operands (stable while req is high) into alu_op,
// which feeds the combinational ALU, and waits a number of clocks that
// depends on the operation: DIV_DELAY for division, MUL_DELAY for
// multiplication, BASE_DELAY for every other operation. It then registers
// the ALU's results on rsp and raises ack. When the synchronized req falls it
// drops ack, closing the handshake.
//
// Timing from req rising to ack rising: SYNC_STAGES + delay + 1 clocks.
// DIV_DELAY = 20 follows the division time of the reference implementation
// (about 140 ns, roughly 20 cycles of a 150 MHz clock). MUL_DELAY and
// BASE_DELAY are this design's choices. The per-operation delay plays the
// part of a matched delay line in a bundled-data asynchronous wrapper.
module alu_wrapper
  import gals8051_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned DIV_DELAY   = 20,
  parameter int unsigned MUL_DELAY   = 20,
  parameter int unsigned BASE_DELAY  = 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req,
  input  alu_req_t op_in,
  output logic     ack,
  output alu_rsp_t rsp,
  // to/from the ALU
  output alu_req_t alu_op,
  input  alu_rsp_t alu_res
);

  localparam int unsigned CW = $clog2(DIV_DELAY + MUL_DELAY + BASE_DELAY + 2);

  typedef enum logic [1:0] {A_IDLE, A_BUSY, A_ACK} astate_e;
  astate_e state;

  logic [SYNC_STAGES-1:0] req_sync;
  logic                   req_s;
  logic [CW-1:0]          cnt;

  assign req_s = req_sync[SYNC_STAGES-1];

  function automatic logic [CW-1:0] op_delay(input alu_op_e op);
    unique case (op)
      ALU_DIV: return CW'(DIV_DELAY);
      ALU_MUL: return CW'(MUL_DELAY);
      default: return CW'(BASE_DELAY);
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) req_sync <= '0;
    else        req_sync <= {req_sync[SYNC_STAGES-2:0], req};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= A_IDLE;
      ack    <= 1'b0;
      cnt    <= '0;
      rsp    <= '0;
      alu_op <= '{op: ALU_NONE, default: '0};
    end else begin
      unique case (state)
        A_IDLE: if (req_s) begin
          alu_op <= op_in;
          cnt    <= op_delay(op_in.op);
          state  <= A_BUSY;
        end
        A_BUSY: begin
          if (cnt <= CW'(1)) begin
            rsp   <= alu_res;
            ack   <= 1'b1;
            state <= A_ACK;
          end
          cnt <= cnt - CW'(1);
        end
        A_ACK: if (!req_s) begin
          ack    <= 1'b0;
          alu_op <= '{op: ALU_NONE, default: '0};
          state  <= A_IDLE;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  // ack is only raised in answer to a request and held until it is withdrawn.
  a_ack_held : assert property (@(posedge clk) disable iff (!rst_n) (ack && req_s) |=> ack);

endmodule
