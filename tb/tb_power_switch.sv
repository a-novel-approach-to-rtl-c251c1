// tb_power_switch: checks the switch-fabric model. After reset the domain is
// on with N_PWR_ACK low. Raising N_PWR_REQ must take the supply down and
// raise N_PWR_ACK after the off ramp (OFF_CYCLES + 1 clocks); lowering it
// must bring the supply back and drop N_PWR_ACK after the on ramp
// (ON_CYCLES + 1 clocks), with vdd_on high only while fully on.
module tb_power_switch;

  logic clk = 0, rst_n = 0, n_pwr_req = 0, n_pwr_ack, vdd_on;
  int checks = 0, failures = 0;

  power_switch dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(vdd_on && !n_pwr_ack, "on after reset");
    for (int n = 0; n < 20; n++) begin
      n_pwr_req <= 1;
      t = 0;
      do begin @(posedge clk); #1; t++; if (t == 1) check(!vdd_on, "supply not falling"); end
      while (!n_pwr_ack && t < 50);
      check(t == 2 + 1, $sformatf("off ack after %0d clocks", t));
      check(!vdd_on, "vdd_on while off");
      repeat ($urandom_range(0, 5)) begin @(posedge clk); #1; check(n_pwr_ack && !vdd_on, "off not held"); end
      n_pwr_req <= 0;
      t = 0;
      do begin
        @(posedge clk); #1; t++;
        if (n_pwr_ack) check(t <= 3 ? !vdd_on : vdd_on, "vdd_on not at ramp end");
      end while (n_pwr_ack && t < 50);
      check(t == 4 + 1, $sformatf("on ack after %0d clocks", t));
      check(vdd_on, "not on after ack fell");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
