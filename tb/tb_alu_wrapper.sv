// tb_alu_wrapper: checks the acknowledge side of the 4-phase handshake
// together with the ALU it wraps. The testbench acts as the controller
// wrapper: it raises req with bundled operands, waits for ack, checks the
// result against the expected values and the req-to-ack latency
// (2 synchronizer clocks + operation delay + 1: 23 clocks for DIV and MUL at
// the default delay of 20, 4 for the other operations), then drops req and
// checks that ack falls.
module tb_alu_wrapper;
  import gals8051_pkg::*;

  logic     clk = 0, rst_n = 0, req = 0, ack;
  alu_req_t op_in = '0, alu_op;
  alu_rsp_t rsp, alu_res;
  int checks = 0, failures = 0;

  alu_wrapper dut (.*);
  i8051_alu   u_alu (.req(alu_op), .rsp(alu_res));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input alu_op_e op, input logic [7:0] a, input logic [7:0] b,
                     input logic [7:0] e1, input logic [7:0] e2, input int lat);
    int t;
    @(posedge clk);
    op_in <= '{op: op, src1: a, src2: b, src3: 8'h00};
    req   <= 1;
    t = 0;
    do begin @(posedge clk); #1; t++; end while (!ack && t < 100);
    check(t == lat, $sformatf("%s latency %0d, expected %0d", op.name(), t, lat));
    check(rsp.des1 == e1 && rsp.des2 == e2,
          $sformatf("%s %02h,%02h -> %02h/%02h", op.name(), a, b, rsp.des1, rsp.des2));
    req <= 0;
    t = 0;
    do begin @(posedge clk); #1; t++; end while (ack && t < 100);
    check(t <= 4, "ack did not fall after req");
    check(!ack, "ack stuck");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!ack, "ack low after reset");
    run(ALU_DIV,  8'hFB, 8'h12, 8'h0D, 8'h11, 23);
    run(ALU_SUBB, 8'h0D, 8'h04, 8'h09, 8'h00, 4);
    run(ALU_MUL,  8'h10, 8'h21, 8'h10, 8'h02, 23);
    run(ALU_ADD,  8'h70, 8'h25, 8'h95, 8'h00, 4);
    run(ALU_XOR,  8'hF0, 8'h3C, 8'hCC, 8'h00, 4);
    for (int n = 0; n < 100; n++) begin
      logic [7:0] a, b;
      a = 8'($urandom); b = 8'($urandom_range(1, 255));
      run(ALU_DIV, a, b, a / b, a % b, 23);
      run(ALU_AND, a, b, a & b, 8'h00, 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
