// tb_gals8051_prog: runs the mixed instruction program tb/prog_mix.hex on the
// complete GALS 8051 (all other parameters at their defaults) and checks the
// final memory contents against hand-computed values. In this program only
// MUL AB and DIV AB are long enough to power-gate the RAM; the other 23 ALU
// operations must complete with the RAM powered. The test counts
// handshakes, gated and ungated handshakes, save/restore pulses and switch
// cycles.
module tb_gals8051_prog;

  logic            osc = 1'b0;
  logic            rst_n = 1'b0;
  logic [3:0][7:0] port_in = {8'h00, 8'h00, 8'h5E, 8'h00};
  logic [3:0][7:0] port_out;
  logic [15:0]     pc;
  logic            retire, req, ack, gclk_running, n_pwr_req, n_pwr_ack;
  logic            ram_vdd_on, iso_en, ret_save, ret_restore, ram_gated;
  int checks = 0, failures = 0;

  gals8051_top #(.ROM_INIT_FILE("tb/prog_mix.hex")) dut (.*);

  always #5 osc = ~osc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge osc);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_retire = 0, n_hs = 0, n_gated = 0, n_ungated = 0, n_save = 0, n_restore = 0, n_off = 0;
  int n_stop = 0;
  logic req_q = 0, gated_seen = 0, vdd_q = 1;
  always @(posedge osc) if (rst_n) begin
    if (retire) n_retire++;
    if (!gclk_running) n_stop++;
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
    wait (n_retire >= 72);
    repeat (40) @(posedge osc);
    mem(8'h40, 8'h3B); mem(8'h41, 8'hF0); mem(8'h42, 8'h2C); mem(8'h43, 8'h2D);
    mem(8'h44, 8'h1F); mem(8'h45, 8'h50); mem(8'h46, 8'h0F); mem(8'h47, 8'h69);
    mem(8'h48, 8'h0A); mem(8'h49, 8'h05); mem(8'h4A, 8'h8A); mem(8'h4B, 8'h75);
    mem(8'h4C, 8'h01); mem(8'h4D, 8'h66); mem(8'h4E, 8'h33); mem(8'h4F, 8'h5E);
    check(dut.u_ram.acc == 8'h5E && dut.u_ram.b == 8'h05, "ACC/B");
    check(port_out[2] == 8'h5E, "P2");
    $display("handshakes=%0d gated=%0d ungated=%0d save=%0d restore=%0d switch_off=%0d stopped=%0d",
             n_hs, n_gated, n_ungated, n_save, n_restore, n_off, n_stop);
    check(n_hs == 25, "25 ALU handshakes");
    check(n_gated == 2, "MUL and DIV power-gate the RAM");
    check(n_ungated == 23, "short operations do not gate");
    check(n_save == 2 && n_restore == 2 && n_off == 2, "two save/off/restore sequences");
    check(n_stop > 0, "clock stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
