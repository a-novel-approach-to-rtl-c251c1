// power_switch: behavioural model of the power-switch fabric of the RAM
// domain (an analog part: header switches between the always-on supply and
// the domain's virtual supply). It is a model for simulation, not logic to
// synthesize into the chip.
//
// n_pwr_req high asks the fabric to switch the domain off; the virtual supply
// then falls over OFF_CYCLES clocks and n_pwr_ack goes high once it is fully
// off. n_pwr_req low switches it back on; the supply rises over ON_CYCLES
// clocks, slower than it falls because a real fabric limits the in-rush
// current, and n_pwr_ack goes low once it is fully on. vdd_on is high while
// the domain's supply is fully up. The supply level is modelled as a count
// of clocks. The ramp lengths are this model's choices.
module power_switch #(
  parameter int unsigned OFF_CYCLES = 2,
  parameter int unsigned ON_CYCLES  = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic n_pwr_req,
  output logic n_pwr_ack,
  output logic vdd_on
);

  localparam int unsigned LW = $clog2(ON_CYCLES + 1) + 1;

  // Supply level: ON_CYCLES = fully on, 0 = fully off.
  logic [LW-1:0] level;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      level     <= LW'(ON_CYCLES);
      n_pwr_ack <= 1'b0;
    end else if (n_pwr_req) begin
      // falling supply: OFF_CYCLES clocks from full to zero
      if (level > LW'(0)) begin
        level <= (level > LW'((ON_CYCLES + OFF_CYCLES - 1) / OFF_CYCLES))
                 ? level - LW'((ON_CYCLES + OFF_CYCLES - 1) / OFF_CYCLES) : LW'(0);
      end else begin
        n_pwr_ack <= 1'b1;
      end
    end else begin
      if (level < LW'(ON_CYCLES)) level <= level + LW'(1);
      else                        n_pwr_ack <= 1'b0;
    end
  end

  assign vdd_on = (level == LW'(ON_CYCLES));

endmodule
