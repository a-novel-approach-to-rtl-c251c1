// tb_i8051_ram: checks the RAM/SFR block against a reference array.
// After reset the SFRs must hold their 8051 reset values. Then random reads
// and writes over the whole direct address space are compared with a model
// that knows which SFRs exist, that port addresses read the pins, that PSW
// bit 0 reads as the parity of ACC (8051 P flag), and that a
// read returns the value before a same-cycle write (synchronous read, one
// clock latency).
module tb_i8051_ram;

  logic            clk = 0, rst_n = 0;
  logic [7:0]      rd_addr = 0, rd_data, wr_addr = 0, wr_data = 0;
  logic            wr_en = 0;
  logic [3:0][7:0] port_in = {8'h44, 8'h33, 8'h22, 8'h11};
  logic [3:0][7:0] port_out;
  int checks = 0, failures = 0;

  i8051_ram dut (.*);

  always #5 clk = ~clk;

  logic [7:0] model [256];
  bit         impl  [256];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] expected(input logic [7:0] a);
    if (a inside {8'h80, 8'h90, 8'hA0, 8'hB0}) return port_in[(a - 8'h80) >> 4];
    if (a == 8'hD0) return {model[a][7:1], ^model[8'hE0]};   // P = parity of ACC
    if (a < 8'h80 || impl[a]) return model[a];
    return 8'h00;
  endfunction

  initial begin
    logic [7:0] a, exp_v;
    foreach (impl[i]) impl[i] = (i < 128) || (i inside {8'hE0, 8'hF0, 8'hD0, 8'h81, 8'h82, 8'h83,
                                                        8'h80, 8'h90, 8'hA0, 8'hB0});
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // SFR reset values
    foreach (model[i]) model[i] = 8'h00;
    model[8'h81] = 8'h07;
    for (int i = 0; i < 6; i++) begin
      a = (i == 0) ? 8'hE0 : (i == 1) ? 8'hF0 : (i == 2) ? 8'hD0 : (i == 3) ? 8'h81 :
          (i == 4) ? 8'h82 : 8'h83;
      rd_addr <= a;
      @(posedge clk); #1;
      checks++;
      if (rd_data !== model[a]) begin failures++; $display("FAIL: reset %02h = %02h", a, rd_data); end
    end
    checks++;
    if (port_out !== {4{8'hFF}}) begin failures++; $display("FAIL: port reset"); end
    // initialize internal RAM
    for (int i = 0; i < 128; i++) begin
      wr_en <= 1; wr_addr <= 8'(i); wr_data <= 8'(i * 7 + 3); model[i] = 8'(i * 7 + 3);
      @(posedge clk);
    end
    wr_en <= 0;
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] ra, wa, wd;
      logic       we;
      ra = 8'($urandom); wa = ($urandom_range(0, 3) == 0) ? 8'($urandom_range(8'hD0, 8'hF0) & 8'hF0) : 8'($urandom);
      wd = 8'($urandom); we = 1'($urandom);
      rd_addr <= ra; wr_addr <= wa; wr_data <= wd; wr_en <= we;
      exp_v = expected(ra);
      @(posedge clk); #1;
      checks++;
      if (rd_data !== exp_v) begin
        failures++;
        $display("FAIL: read %02h = %02h, expected %02h", ra, rd_data, exp_v);
      end
      if (we && impl[wa]) model[wa] = wd;
      if (we && wa inside {8'h80, 8'h90, 8'hA0, 8'hB0}) begin
        checks++;
        if (port_out[(wa - 8'h80) >> 4] !== wd) begin failures++; $display("FAIL: port latch %02h", wa); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
