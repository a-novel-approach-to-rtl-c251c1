// tb_gals8051_ext: runs tb/prog_ext.hex (stack, calls, @Ri, bit operations,
// CJNE, MOVC, DPTR, XCH/XCHD, DA, SWAP, ending with a MUL) on the complete
// GALS 8051 with its other parameters at their defaults. The expected memory
// contents are the hand-computed ones also used by tb_i8051_ext. Here every
// ALU operation crosses the real wrapper pair and stops the controller's
// clock. Of the 22 handshakes (five CJNE compares, eight INC/DEC, SWAP, DA,
// ADD, XRL, ANL, ORL, RL, INC @Ri and MUL) only the MUL is long enough to
// power-gate the RAM. The testbench counts handshakes, gated and ungated
// handshakes and the save/switch-off/restore sequence.
module tb_gals8051_ext;

  logic            osc = 1'b0;
  logic            rst_n = 1'b0;
  logic [3:0][7:0] port_in = '0;
  logic [3:0][7:0] port_out;
  logic [15:0]     pc;
  logic            retire, req, ack, gclk_running, n_pwr_req, n_pwr_ack;
  logic            ram_vdd_on, iso_en, ret_save, ret_restore, ram_gated;
  int checks = 0, failures = 0;

  gals8051_top #(.ROM_INIT_FILE("tb/prog_ext.hex")) dut (.*);

  always #5 osc = ~osc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30000) @(posedge osc);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_hs = 0, n_gated = 0, n_ungated = 0, n_save = 0, n_restore = 0, n_off = 0;
  logic req_q = 0, gated_seen = 0, vdd_q = 1;
  always @(posedge osc) if (rst_n) begin
    if (ret_save) n_save++;
    if (ret_restore) n_restore++;
    if (vdd_q && !ram_vdd_on) n_off++;
    vdd_q = ram_vdd_on;
    if (req && !req_q) begin n_hs++; gated_seen = 0; end
    if (ram_gated) gated_seen = 1;
    if (!req && req_q) begin
      if (gated_seen) n_gated++; else n_ungated++;
    end
    req_q = req;
  end

  task automatic mem(input logic [7:0] a, input logic [7:0] v);
    check(dut.u_ram.iram[a] == v, $sformatf("RAM[%02h] = %02h, expected %02h", a, dut.u_ram.iram[a], v));
  endtask

  initial begin
    repeat (6) @(posedge osc);
    rst_n <= 1'b1;
    wait (pc == 16'h018D);
    repeat (60) @(posedge osc);
    mem(8'h50, 8'h5A); mem(8'h51, 8'hA6); mem(8'h52, 8'h87); mem(8'h53, 8'h5A);
    mem(8'h54, 8'h87); mem(8'h55, 8'hC3); mem(8'h56, 8'h60); mem(8'h57, 8'h4E);
    mem(8'h58, 8'h2F); mem(8'h59, 8'h6D); mem(8'h5A, 8'h11); mem(8'h5B, 8'h84);
    mem(8'h5C, 8'h80); mem(8'h5D, 8'h01); mem(8'h5F, 8'h77);
    mem(8'h70, 8'h3F); mem(8'h71, 8'hAC); mem(8'h72, 8'h57); mem(8'h73, 8'h40);
    mem(8'h74, 8'hAC); mem(8'h75, 8'h99); mem(8'h76, 8'hA5); mem(8'h77, 8'h03);
    mem(8'h78, 8'h13); mem(8'h79, 8'h00); mem(8'h7A, 8'hAC); mem(8'h7B, 8'hA6);
    mem(8'h7C, 8'h4D); mem(8'h7D, 8'h7C); mem(8'h7E, 8'h74);
    check(dut.u_ram.acc == 8'h74 && dut.u_ram.b == 8'h01, "ACC/B after MUL");
    check(dut.u_ram.sp == 8'h60, "SP");
    $display("handshakes=%0d gated=%0d ungated=%0d save=%0d restore=%0d switch_off=%0d",
             n_hs, n_gated, n_ungated, n_save, n_restore, n_off);
    check(n_hs == 22, $sformatf("%0d ALU handshakes, expected 22", n_hs));
    check(n_gated == 1, "only the MUL power-gates the RAM");
    check(n_ungated == 21, "short operations do not gate");
    check(n_save == 1 && n_restore == 1 && n_off == 1, "one save/off/restore sequence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
