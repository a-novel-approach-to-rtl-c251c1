// tb_i8051_rom: checks the program ROM. The default instance must hold the
// built-in demonstration program (bytes listed in the ROM's header) and
// NOPs elsewhere; a second, smaller instance is loaded from tb/rom_test.hex
// (bytes 12 34 56 78 9A BC DE F0) and must read those back, with the
// rest of its space still holding the built-in program's bytes.
module tb_i8051_rom;

  logic [11:0] addr;
  logic [7:0]  data;
  logic [3:0]  addr_s;
  logic [7:0]  data_s;
  int checks = 0, failures = 0;

  i8051_rom dut (.addr, .data);
  i8051_rom #(.ADDR_W(4), .INIT_FILE("tb/rom_test.hex")) dut_file (.addr(addr_s), .data(data_s));

  localparam logic [7:0] DEMO [17] = '{8'h74, 8'hFB, 8'h75, 8'hF0, 8'h12, 8'h84, 8'h94, 8'h04,
                                       8'hF5, 8'h30, 8'h85, 8'hF0, 8'h31, 8'hF5, 8'h90, 8'h80, 8'hFE};
  localparam logic [7:0] FILE [8] = '{8'h12, 8'h34, 8'h56, 8'h78, 8'h9A, 8'hBC, 8'hDE, 8'hF0};

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4096; a++) begin
      addr = 12'(a);
      #1;
      checks++;
      if (data !== ((a < 17) ? DEMO[a] : 8'h00)) begin
        failures++;
        $display("FAIL: rom[%03h] = %02h", a, data);
      end
    end
    for (int a = 0; a < 16; a++) begin
      addr_s = 4'(a);
      #1;
      checks++;
      if (data_s !== ((a < 8) ? FILE[a] : DEMO[a])) begin
        failures++;
        $display("FAIL: file rom[%0h] = %02h", a, data_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
