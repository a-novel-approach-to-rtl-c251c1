// tb_gals8051_top: end-to-end test of the GALS 8051 at its default parameters.
//
// Runs the built-in ROM program (MOV A,#FBh; MOV B,#12h; DIV AB; SUBB A,#4;
// store A and B; A to P1; SJMP $) and checks the results against the values
// worked out by hand: 251 / 18 = 13 (0Dh) remainder 17 (11h), 13 - 4 = 9.
// It also checks the mechanisms of the design and counts how often each one
// happened: handshakes, stopped controller clock, power-gating of the RAM
// (save, isolation, switch off, switch on, restore), and the division's
// request-to-acknowledge latency (2 synchronizer clocks + 20 + 1).
module tb_gals8051_top;
  import gals8051_pkg::*;

  logic            osc = 1'b0;
  logic            rst_n = 1'b0;
  logic [3:0][7:0] port_in = {8'hA5, 8'h5A, 8'h3C, 8'hC3};
  logic [3:0][7:0] port_out;
  logic [15:0]     pc;
  logic            retire, req, ack, gclk_running, n_pwr_req, n_pwr_ack;
  logic            ram_vdd_on, iso_en, ret_save, ret_restore, ram_gated;

  int checks = 0, failures = 0;
  int cyc = 0;

  gals8051_top dut (.*);

  always #5 osc = ~osc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // event counters (free-running oscillator)
  int n_hs = 0, n_stop = 0, n_save = 0, n_restore = 0, n_iso = 0, n_off = 0, n_ack_seen = 0;
  int n_retire = 0, n_gated_hs = 0, n_ungated_hs = 0;
  int req_t0 = 0, div_latency = -1, div_stopped = 0, stop_run = 0, max_stop_run = 0;
  logic req_q = 0, save_q = 0, restore_q = 0, iso_q = 0, vdd_q = 1, gated_in_hs = 0;

  always_ff @(posedge osc) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      req_q     <= req;
      save_q    <= ret_save;
      restore_q <= ret_restore;
      iso_q     <= iso_en;
      vdd_q     <= ram_vdd_on;
      if (retire) n_retire <= n_retire + 1;
      if (req && !req_q) begin
        n_hs        <= n_hs + 1;
        req_t0      <= cyc;
        gated_in_hs <= 1'b0;
      end
      if (ack && req && (stop_run == 0)) ;
      if (!gclk_running) begin
        n_stop   <= n_stop + 1;
        stop_run <= stop_run + 1;
      end else begin
        if (stop_run > max_stop_run) max_stop_run <= stop_run;
        stop_run <= 0;
      end
      if (ram_gated) gated_in_hs <= 1'b1;
      if (!req && req_q) begin
        if (gated_in_hs) n_gated_hs <= n_gated_hs + 1;
        else             n_ungated_hs <= n_ungated_hs + 1;
      end
      if (ret_save && !save_q)       n_save <= n_save + 1;
      if (ret_restore && !restore_q) n_restore <= n_restore + 1;
      if (iso_en && !iso_q)          n_iso <= n_iso + 1;
      if (!ram_vdd_on && vdd_q)      n_off <= n_off + 1;
    end
  end

  // latency of the division handshake: req rise to ack rise
  always @(posedge ack) begin
    n_ack_seen++;
    if (dut.hs_op.op == ALU_DIV) div_latency = cyc - req_t0;
  end

  // watchdog
  initial begin
    repeat (5000) @(posedge osc);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6) @(posedge osc);
    rst_n <= 1'b1;
    // run until the program sits in its final SJMP $ (address 000F)
    wait (n_retire >= 8 && pc == 16'h000F);
    repeat (40) @(posedge osc);

    check(dut.u_ram.acc == 8'h09, $sformatf("ACC = %02h, expected 09", dut.u_ram.acc));
    check(dut.u_ram.b   == 8'h11, $sformatf("B = %02h, expected 11", dut.u_ram.b));
    check(dut.u_ram.iram[8'h30] == 8'h09, "RAM[30h] != 09");
    check(dut.u_ram.iram[8'h31] == 8'h11, "RAM[31h] != 11");
    check(port_out[1] == 8'h09, $sformatf("P1 = %02h, expected 09", port_out[1]));
    check(port_out[0] == 8'hFF, "P0 not at reset value");
    check(dut.u_ram.psw[7] == 1'b0, "CY set after SUBB");
    check(pc inside {[16'h000F:16'h0011]}, $sformatf("PC = %04h, not in the final loop", pc));

    // mechanisms
    $display("handshakes=%0d gated=%0d ungated=%0d stopped_cycles=%0d longest_stop=%0d",
             n_hs, n_gated_hs, n_ungated_hs, n_stop, max_stop_run);
    $display("save=%0d iso=%0d switch_off=%0d restore=%0d div_latency=%0d retired=%0d",
             n_save, n_iso, n_off, n_restore, div_latency, n_retire);
    check(n_hs == 2, "expected two ALU handshakes (DIV, SUBB)");
    check(n_gated_hs == 1, "the division should power-gate the RAM once");
    check(n_ungated_hs == 1, "the subtraction should complete without gating");
    check(n_save == 1 && n_restore == 1, "save/restore pulses");
    check(n_iso == 1, "isolation applied once");
    check(n_off == 1, "RAM supply switched off once");
    check(n_stop > 0, "stoppable clock never stopped");
    check(div_latency == 2 + 20 + 1, $sformatf("division latency %0d, expected 23", div_latency));
    check(max_stop_run >= 20, "controller clock not stopped for the division");
    check(ram_vdd_on && !iso_en && !n_pwr_req && !n_pwr_ack, "RAM domain not back on");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
