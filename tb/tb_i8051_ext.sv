// tb_i8051_ext: runs the controller with the decoder, ROM, RAM and ALU on a
// free-running clock, executing tb/prog_ext.hex. That program covers the
// parts of the 8051 instruction set that tb_i8051_ctr does not: indirect
// addressing, register banks, PUSH/POP, LCALL/ACALL/RET, LJMP, AJMP-page
// calls, JMP @A+DPTR, MOVC from both bases, DPTR loads and increments, every
// CJNE form, the bit instructions and bit jumps, XCH/XCHD, SWAP and DA, and
// DJNZ on a direct byte, and ends with a MUL. The expected RAM and SFR contents were worked out by
// hand from the 8051 instruction definitions and are listed next to each
// check. The ALU sits behind a testbench responder with a random delay, as in
// tb_i8051_ctr, so results must not depend on the ALU latency.
module tb_i8051_ext;
  import gals8051_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [15:0] rom_addr, pc;
  logic [7:0]  rom_data, dec_opcode, ram_rd_addr, ram_rd_data, ram_wr_addr, ram_wr_data;
  logic        ram_wr_en, alu_start, alu_ready = 1, alu_done = 0, retire;
  dec_t        dec;
  alu_req_t    alu_req, held;
  alu_rsp_t    alu_rsp, calc;
  logic [3:0][7:0] port_in = '0, port_out;
  int checks = 0, failures = 0;

  i8051_ctr dut (.*);
  i8051_dec u_dec (.opcode(dec_opcode), .dec);
  i8051_rom #(.INIT_FILE("tb/prog_ext.hex")) u_rom (.addr(rom_addr[11:0]), .data(rom_data));
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
    repeat (30000) @(posedge clk);
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

  // instructions retired when the PC first reaches the final SJMP (the MOV
  // before it has been fetched but not yet retired)
  int n_retire = 0, n_at_end = -1;
  always @(posedge clk) begin
    if (rst_n && retire) n_retire++;
    if (rst_n && pc == 16'h018B && n_at_end < 0) n_at_end = n_retire;
  end

  task automatic mem(input logic [7:0] a, input logic [7:0] v);
    check(u_ram.iram[a] == v, $sformatf("RAM[%02h] = %02h, expected %02h", a, u_ram.iram[a], v));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (n_at_end >= 0);
    repeat (60) @(posedge clk);
    check(pc inside {[16'h018B:16'h018D]}, $sformatf("PC = %04h", pc));
    check(n_at_end == 123, $sformatf("%0d instructions before the final loop, expected 123", n_at_end));
    mem(8'h50, 8'h5A);  // SWAP of A5h
    mem(8'h51, 8'hA6);  // INC @R0
    mem(8'h52, 8'h87);  // 39h + 48h, decimal adjusted
    mem(8'h53, 8'h5A);  // POP order
    mem(8'h54, 8'h87);
    mem(8'h55, 8'hC3);  // set by the LCALLed routine
    mem(8'h56, 8'h60);  // SP back after both calls
    mem(8'h57, 8'h4E);  // MOVC @A+DPTR, DPTR=0100h, A=2
    mem(8'h58, 8'h2F);  // after INC DPTR, A=0
    mem(8'h59, 8'h6D);  // MOVC @A+PC
    mem(8'h5A, 8'h11);  // reached through JMP @A+DPTR
    mem(8'h5B, 8'h84);  // MOV ACC.7,C
    mem(8'h5C, 8'h80);  // bit byte 20h after SETB/CPL/CLR/JBC
    mem(8'h5D, 8'h01);  // bit byte 21h after MOV bit,C twice
    mem(8'h5F, 8'h77);  // set by the ACALLed routine
    mem(8'h61, 8'h24);  // return address pushed by ACALL, low byte
    mem(8'h62, 8'h00);  //   high byte
    mem(8'h70, 8'h3F);  // XCH A,@R1
    mem(8'h71, 8'hAC);  // XCHD: A
    mem(8'h72, 8'h57);  // XCHD: memory
    mem(8'h73, 8'h40);  // XCH A,dir: A
    mem(8'h74, 8'hAC);  // XCH A,dir: memory
    mem(8'h75, 8'h99);  // R2 of bank 1
    mem(8'h76, 8'hA5);  // DJNZ loop count, DEC, ANL, ORL
    mem(8'h77, 8'h03);  // INC R2 then XRL
    mem(8'h78, 8'h13);  // DPH after INC DPTR from 12FFh
    mem(8'h79, 8'h00);  // DPL
    mem(8'h7A, 8'hAC);  // MOV @R0,dir
    mem(8'h7B, 8'hA6);  // MOV dir,R4
    mem(8'h7C, 8'h4D);  // MOV @R0,A after RL
    mem(8'h7D, 8'h7C);  // MOV A,R0
    mem(8'h7E, 8'h74);  // 7Ch * 3 = 0174h, low byte
    mem(8'h00, 8'h7C); mem(8'h01, 8'h31); mem(8'h02, 8'h01); mem(8'h04, 8'hA6);
    mem(8'h0A, 8'h99); mem(8'h30, 8'hA6); mem(8'h31, 8'hAC); mem(8'h33, 8'h00);
    check(u_ram.acc == 8'h74 && u_ram.b == 8'h01, $sformatf("ACC = %02h", u_ram.acc));
    check(u_ram.sp == 8'h60, $sformatf("SP = %02h", u_ram.sp));
    check({u_ram.dph, u_ram.dpl} == 16'h1300, "DPTR");
    // AC from the ADD before DA remains; CY cleared, OV set by the MUL
    check(u_ram.psw[7:1] == 7'h22, $sformatf("PSW = %02h", u_ram.psw));
    $display("retired=%0d alu_requests=%0d", n_retire, n_alu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
