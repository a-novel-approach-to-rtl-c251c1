// clock_gen: the clocking element, an on-chip stoppable clock for the
// controller island.
//
// The clock runs like a free-running clock except while the controller waits
// for the ALU, i.e. while req is high and ack low: then it is stopped, and
// the controller's flip-flops (and the RAM behind them) see no edges. It is
// also held while the power-gated RAM domain is not ready (dom_ready low),
// so the controller never resumes into a RAM that is still powering up; that
// second condition is this design's addition, needed because the RAM's power
// comes back only after ack.
//
// Implementation: a standard latch-based clock gate. The enable is sampled
// by a latch that is transparent while osc is low and gclk = osc & latched
// enable, so gclk never has a shortened high phase. The latch is intended
// (it is the clock-gating cell). osc stands for the on-chip oscillator.
// During reset the clock always runs, so the islands can be reset.
module clock_gen (
  input  logic osc,
  input  logic rst_n,
  input  logic req,
  input  logic ack,
  input  logic dom_ready,
  output logic gclk,
  output logic running
);

  logic en, en_l;

  assign en = !rst_n || (!(req && !ack) && dom_ready);

  always_latch begin
    if (!osc) en_l = en;
  end

  assign gclk    = osc & en_l;
  assign running = en_l;

endmodule
