// tb_i8051_ctr: runs the controller with the decoder, ROM and RAM on a
// free-running clock and the ALU behind a testbench responder that answers
// each request after a random delay (standing in for the wrapper pair).
// The ROM holds tb/prog_mix.hex, a program built mostly from ALU
// instructions and conditional jumps (tb_i8051_ext covers the rest of the
// instruction set); the final RAM, SFR and port contents are compared with
// values worked out by hand from the 8051 instruction definitions. It also
// checks the number of instructions retired (72 before the final loop) and
// that the first instruction, MOV A,#imm (FETCH, B2, eleven read states,
// EXEC and one write), retires 16 clocks
// after reset is released (the retire pulse is registered).
module tb_i8051_ctr;
  import gals8051_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [15:0] rom_addr, pc;
  logic [7:0]  rom_data, dec_opcode, ram_rd_addr, ram_rd_data, ram_wr_addr, ram_wr_data;
  logic        ram_wr_en, alu_start, alu_ready = 1, alu_done = 0, retire;
  dec_t        dec;
  alu_req_t    alu_req, held;
  alu_rsp_t    alu_rsp, calc;
  logic [3:0][7:0] port_in = {8'h00, 8'h00, 8'h5E, 8'h00}, port_out;
  int checks = 0, failures = 0;

  i8051_ctr dut (.*);
  i8051_dec u_dec (.opcode(dec_opcode), .dec);
  i8051_rom #(.INIT_FILE("tb/prog_mix.hex")) u_rom (.addr(rom_addr[11:0]), .data(rom_data));
  i8051_ram u_ram (.clk, .rst_n, .rd_addr(ram_rd_addr), .rd_data(ram_rd_data),
                   .wr_en(ram_wr_en), .wr_addr(ram_wr_addr), .wr_data(ram_wr_data),
                   .port_in, .port_out);
  i8051_alu u_alu (.req(held), .rsp(calc));

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

  // ALU responder
  int n_alu = 0;
  initial begin
    held = '{op: ALU_NONE, default: '0};
    forever begin
      @(posedge clk);
      if (rst_n && alu_start) begin
        held      <= alu_req;
        alu_ready <= 0;
        n_alu++;
        repeat ($urandom_range(1, 8)) @(posedge clk);
        alu_rsp  <= calc;
        alu_done <= 1;
        @(posedge clk);
        alu_done  <= 0;
        alu_ready <= 1;
      end
    end
  end

  int n_retire = 0, first_retire = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && retire) begin
      n_retire++;
      if (first_retire < 0) first_retire = cyc;
    end
  end

  task automatic mem(input logic [7:0] a, input logic [7:0] v);
    check(u_ram.iram[a] == v, $sformatf("RAM[%02h] = %02h, expected %02h", a, u_ram.iram[a], v));
  endtask

  int rst_cyc;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    rst_cyc = cyc + 1;
    wait (n_retire >= 72);
    repeat (30) @(posedge clk);
    check(first_retire - rst_cyc == 16, $sformatf("first retire after %0d clocks", first_retire - rst_cyc));
    check(pc inside {[16'h007B:16'h007D]}, $sformatf("PC = %04h", pc));
    mem(8'h40, 8'h3B); mem(8'h41, 8'hF0); mem(8'h42, 8'h2C); mem(8'h43, 8'h2D);
    mem(8'h44, 8'h1F); mem(8'h45, 8'h50); mem(8'h46, 8'h0F); mem(8'h47, 8'h69);
    mem(8'h48, 8'h0A); mem(8'h49, 8'h05); mem(8'h4A, 8'h8A); mem(8'h4B, 8'h75);
    mem(8'h4C, 8'h01); mem(8'h4D, 8'h66); mem(8'h4E, 8'h33); mem(8'h4F, 8'h5E);
    mem(8'h00, 8'h00); mem(8'h08, 8'h33); mem(8'h09, 8'h33);
    check(u_ram.acc == 8'h5E, "ACC");
    check(u_ram.b == 8'h05, "B");
    check(u_ram.psw == 8'h00, $sformatf("PSW = %02h", u_ram.psw));
    check(port_out[2] == 8'h5E && port_out[1] == 8'hFF, "ports");
    check(n_alu == 25, $sformatf("%0d ALU requests, expected 25", n_alu));
    $display("retired=%0d alu_requests=%0d", n_retire, n_alu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
