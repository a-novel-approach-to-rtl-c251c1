// tb_pg_ctrl: checks the handshake-driven power-gating sequence.
// The testbench plays both islands (req, ack) and the switch fabric (a
// simple model: N_PWR_ACK follows N_PWR_REQ after a random number of
// clocks). For long ALU waits it checks the order save -> isolation ->
// N_PWR_REQ -> N_PWR_ACK -> (ack) -> N_PWR_REQ low -> N_PWR_ACK low ->
// restore -> isolation off -> dom_ready, and the entry timing (gating starts
// 2 synchronizer clocks + ENTRY_DELAY clocks after req, 8 in all). Short waits, ending
// before ENTRY_DELAY, must not gate. Protocol rules are checked every clock.
module tb_pg_ctrl;

  logic clk = 0, rst_n = 0, req = 0, ack = 0, n_pwr_ack = 0;
  logic n_pwr_req, iso_en, save, restore, dom_ready, gated;
  int checks = 0, failures = 0;

  pg_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // switch fabric model
  initial begin
    forever begin
      @(posedge clk);
      if (n_pwr_req != n_pwr_ack) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        n_pwr_ack <= n_pwr_req;
      end
    end
  end

  // per-clock protocol rules
  logic saved = 0, restored = 0;
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (n_pwr_req && !iso_en)        begin failures++; $display("FAIL: switch off without isolation"); end
    if (n_pwr_ack && !iso_en)        begin failures++; $display("FAIL: domain off without isolation"); end
    if (dom_ready && (iso_en || n_pwr_ack)) begin failures++; $display("FAIL: ready while isolated/off"); end
    if (restore && n_pwr_ack)        begin failures++; $display("FAIL: restore before power is back"); end
  end

  int n_gate = 0, n_short = 0;

  initial begin
    int t;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      bit long_op;
      long_op = (n % 2 == 0);
      @(posedge clk);
      req <= 1;
      if (!long_op) begin
        // short operation: ack within 2 clocks, no gating may start
        repeat ($urandom_range(1, 2)) @(posedge clk);
        ack <= 1;
        repeat (2) @(posedge clk);
        req <= 0;
        repeat (2) @(posedge clk);
        ack <= 0;
        repeat (12) begin @(posedge clk); #1; check(!save && !iso_en && dom_ready, "short op gated"); end
        n_short++;
      end else begin
        // long operation: wait for the save pulse
        t = 0;
        do begin @(posedge clk); #1; t++; end while (!save && t < 100);
        check(t == 2 + 6, $sformatf("save %0d clocks after req, expected 8", t));
        @(posedge clk); #1;
        check(iso_en && !save && !n_pwr_req, "isolation after save");
        @(posedge clk); #1;
        check(n_pwr_req, "switch request after isolation");
        do @(posedge clk); while (!n_pwr_ack);
        repeat (2) @(posedge clk); #1;
        check(gated && !dom_ready, "domain gated while waiting");
        repeat ($urandom_range(0, 15)) @(posedge clk);
        ack <= 1;                               // ALU done: start power-up
        t = 0;
        do begin @(posedge clk); #1; t++; end while (!restore && t < 100);
        check(restore && !n_pwr_ack && !n_pwr_req, "restore after power-up");
        @(posedge clk); #1;
        check(!iso_en && !dom_ready, "isolation released after restore");
        @(posedge clk); #1;
        check(dom_ready, "domain ready");
        req <= 0;
        repeat (2) @(posedge clk);
        ack <= 0;
        repeat (4) @(posedge clk);
        n_gate++;
      end
    end
    check(n_gate == 30 && n_short == 30, "sequence count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
