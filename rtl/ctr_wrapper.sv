// ctr_wrapper: request side of the 4-phase handshake between the 8051
// controller island and the ALU island.
//
// When the controller pulses start (while ready is high) the wrapper latches
// the ALU operation and operands (alu_req_t) and raises req. The operands on
// op_out stay stable while req is high (bundled data). When ack arrives the
// wrapper captures the ALU results, drops req and pulses done for one clock;
// it then waits for ack to fall before accepting the next start, which
// completes the four phases: req+, ack+, req-, ack-.
//
// Timing: clk is the controller's stoppable clock. While req is high and ack
// low the clocking element holds that clock stopped, so ack is seen on the
// first edge after it rises; the stopped clock itself keeps ack from being
// sampled while it changes, which is why ack has no synchronizer here.
// Latency from start to done is the ALU wrapper's delay plus two edges.
module ctr_wrapper
  import gals8051_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // controller side
  input  logic     start,
  input  alu_req_t op_in,
  output logic     ready,
  output logic     done,
  output alu_rsp_t rsp_out,
  // handshake side
  output logic     req,
  output alu_req_t op_out,
  input  logic     ack,
  input  alu_rsp_t rsp_in
);

  typedef enum logic [1:0] {W_IDLE, W_REQ, W_RELEASE} wstate_e;
  wstate_e state;

  assign ready = (state == W_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= W_IDLE;
      req     <= 1'b0;
      done    <= 1'b0;
      op_out  <= '{op: ALU_NONE, default: '0};
      rsp_out <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        W_IDLE: if (start) begin
          op_out <= op_in;
          req    <= 1'b1;
          state  <= W_REQ;
        end
        W_REQ: if (ack) begin
          rsp_out <= rsp_in;
          req     <= 1'b0;
          done    <= 1'b1;
          state   <= W_RELEASE;
        end
        W_RELEASE: if (!ack) state <= W_IDLE;
        default: state <= W_IDLE;
      endcase
    end
  end

  // 4-phase rules seen from this side: req is held until ack, and is not
  // raised again before ack has fallen.
  a_req_held : assert property (@(posedge clk) disable iff (!rst_n) (req && !ack) |=> req);
  a_no_early : assert property (@(posedge clk) disable iff (!rst_n) (!req && ack) |=> !req);

endmodule
