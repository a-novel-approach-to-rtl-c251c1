// tb_clock_gen: checks the stoppable clock. For every combination of req,
// ack and dom_ready it counts the gclk edges over a window of osc cycles:
// gclk must follow osc exactly when the clock is enabled and give no edge at
// all when req is high with ack low, or when dom_ready is low. During reset
// it must always run. It also checks that gclk never shows a high phase
// shorter than osc's (no glitch) when the enable changes in the middle of a
// high phase.
module tb_clock_gen;

  logic osc = 0, rst_n = 0, req = 0, ack = 0, dom_ready = 1;
  logic gclk, running;
  int checks = 0, failures = 0;
  int gedges = 0;
  realtime rise_t;

  clock_gen dut (.*);

  always #5 osc = ~osc;

  always @(posedge gclk) begin
    gedges++;
    rise_t = $realtime;
  end
  always @(negedge gclk) if ($time > 20) begin
    checks++;
    if ($realtime - rise_t < 5.0) begin
      failures++;
      $display("FAIL: short gclk pulse at %0t", $time);
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic window(input logic r, input logic a, input logic d, input logic rn, input int expect_edges);
    int e0;
    @(negedge osc);
    req = r; ack = a; dom_ready = d; rst_n = rn;
    @(negedge osc);           // let the enable latch settle
    e0 = gedges;
    repeat (10) @(negedge osc);
    checks++;
    if (gedges - e0 != expect_edges) begin
      failures++;
      $display("FAIL: req=%b ack=%b ready=%b rst_n=%b: %0d edges, expected %0d",
               r, a, d, rn, gedges - e0, expect_edges);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic r, a, d, rn;
      {rn, r, a, d} = 4'(i);
      window(r, a, d, rn, (!rn || (!(r && !a) && d)) ? 10 : 0);
    end
    // enable toggled at random times, including during osc high
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      #($urandom_range(1, 23));
      req = 1'($urandom); ack = 1'($urandom); dom_ready = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
