// i8051_rom: program memory of the 8051, read asynchronously by the controller.
//
// 2**ADDR_W bytes (4 KiB by default, the on-chip program memory size of the
// 8051). The byte at addr appears on data in the same cycle (combinational
// read), so the controller fetches one instruction byte per clock.
//
// Contents: when INIT_FILE is empty the memory holds the built-in
// demonstration program, a division followed by a subtraction:
//   0000 74 FB     MOV  A,#0FBh
//   0002 75 F0 12  MOV  B,#12h
//   0005 84        DIV  AB          ; A = 0Dh, B = 11h (251 / 18)
//   0006 94 04     SUBB A,#04h      ; A = 09h
//   0008 F5 30     MOV  30h,A
//   000A 85 F0 31  MOV  31h,B
//   000D F5 90     MOV  P1,A
//   000F 80 FE     SJMP $
// and every other byte is 00 (NOP). Otherwise the file named by INIT_FILE is
// loaded with $readmemh, to run other programs. The demonstration program and
// the file option are choices of this design; the ROM holds whatever program
// is to run.
module i8051_rom #(
  parameter int unsigned ADDR_W    = 12,
  parameter string       INIT_FILE = ""
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [7:0]        data
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [7:0] mem [DEPTH];

  function automatic logic [7:0] demo_byte(input int unsigned a);
    unique case (a)
      0:  return 8'h74;  1:  return 8'hFB;
      2:  return 8'h75;  3:  return 8'hF0;  4:  return 8'h12;
      5:  return 8'h84;
      6:  return 8'h94;  7:  return 8'h04;
      8:  return 8'hF5;  9:  return 8'h30;
      10: return 8'h85;  11: return 8'hF0; 12: return 8'h31;
      13: return 8'hF5;  14: return 8'h90;
      15: return 8'h80;  16: return 8'hFE;
      default: return 8'h00;
    endcase
  endfunction

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = demo_byte(i);
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign data = mem[addr];

endmodule
