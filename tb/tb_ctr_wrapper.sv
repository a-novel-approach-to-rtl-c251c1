// tb_ctr_wrapper: checks the request side of the 4-phase handshake.
// A responder in the testbench plays the ALU side with a random delay and
// returns a result computed from the operands. The test checks that req
// rises only after start, that op_out holds the latched operands while req
// is high, that done pulses once with the responder's result, that req falls
// after ack, and that a new start is refused (ready low) until ack has fallen.
module tb_ctr_wrapper;
  import gals8051_pkg::*;

  logic     clk = 0, rst_n = 0;
  logic     start = 0, ready, done, req, ack = 0;
  alu_req_t op_in = '0, op_out;
  alu_rsp_t rsp_out, rsp_in = '0;
  int checks = 0, failures = 0;

  ctr_wrapper dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ALU-side responder: ack after a random delay, drop ack after req falls
  int n_done = 0;
  initial begin
    wait (rst_n);
    forever begin
      do @(posedge clk); while (!req);
      repeat ($urandom_range(1, 6)) @(posedge clk);
      rsp_in <= '{des1: op_out.src1 + op_out.src2, des2: op_out.src1 ^ op_out.src2,
                  cy: op_out.src3[0], ac: 1'b0, ov: 1'b1};
      ack    <= 1'b1;
      do @(posedge clk); while (req);
      repeat ($urandom_range(0, 4)) begin
        @(posedge clk);
        check(!ready, "ready before ack fell");
      end
      ack <= 1'b0;
    end
  end

  always @(posedge clk) if (rst_n && done) n_done++;

  initial begin
    alu_req_t op;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!req && ready, "idle after reset");
    for (int n = 0; n < 200; n++) begin
      op = '{op: alu_op_e'(4'($urandom)), src1: 8'($urandom), src2: 8'($urandom), src3: 8'($urandom)};
      do @(posedge clk); while (!ready);
      op_in <= op; start <= 1;
      @(posedge clk);
      start <= 0;
      op_in <= '0;   // the wrapper must have latched the operands
      #1;
      check(req, "req not raised after start");
      while (!done) begin
        check(op_out == op, "operands changed while req high");
        @(posedge clk); #1;
      end
      check(!req, "req still high when done");
      check(rsp_out.des1 == 8'(op.src1 + op.src2) && rsp_out.des2 == (op.src1 ^ op.src2) &&
            rsp_out.ov, "result not captured");
    end
    repeat (10) @(posedge clk);
    check(n_done == 200, $sformatf("done pulsed %0d times", n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
