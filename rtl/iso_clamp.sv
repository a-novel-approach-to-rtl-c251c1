// iso_clamp: isolation cells on the outputs of a power-gated domain.
// While iso_en is high the outputs are clamped to 0, so the always-on logic
// never sees the undefined values of an unpowered block; otherwise the
// domain's outputs pass through. Combinational.
module iso_clamp #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] din,
  input  logic         iso_en,
  output logic [W-1:0] dout
);

  assign dout = din & {W{!iso_en}};

endmodule
