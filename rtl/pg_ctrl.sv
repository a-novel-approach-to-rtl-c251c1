// pg_ctrl: power-gating sequencer of the RAM domain, driven by the
// 4-phase handshake between the controller and ALU islands.
//
// Instead of a separate power-management unit, the handshake itself tells
// when the RAM is idle: while req is high and ack low the controller's clock
// is stopped and nothing can touch the RAM. The sequencer turns that window
// into a power-down / power-up sequence:
//
//   ON --(req & !ack for ENTRY_DELAY clocks)--> SAVE -> ISO -> PWR_OFF
//   PWR_OFF: n_pwr_req high, wait for n_pwr_ack high (switch fully off)
//   OFF:     wait for ack (ALU done) or req low
//   PWR_ON:  n_pwr_req low, wait for n_pwr_ack low (supply settled)
//   RESTORE -> UNISO -> ON
//
// save and restore are one-clock pulses for retention registers, iso_en is
// held from ISO to RESTORE so the domain's outputs are clamped while it is
// unpowered, and dom_ready is low from SAVE to UNISO; the clocking element
// keeps the controller's clock stopped while it is low. The switch protocol
// (N_PWR_REQ high to switch off, N_PWR_ACK answering, restore only after the
// acknowledge on power-up) is the usual request/acknowledge control of a
// switch fabric. ENTRY_DELAY, which keeps short ALU operations from gating
// the RAM, and the synchronizers are this design's choices.
//
// clk is the always-on free-running clock. req and ack come from other
// islands and pass through two-flop synchronizers.
module pg_ctrl #(
  parameter int unsigned ENTRY_DELAY = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  input  logic ack,
  input  logic n_pwr_ack,
  output logic n_pwr_req,
  output logic iso_en,
  output logic save,
  output logic restore,
  output logic dom_ready,
  output logic gated        // high while the domain is switched off
);

  typedef enum logic [3:0] {
    P_ON, P_ENTRY, P_SAVE, P_ISO, P_PWR_OFF, P_OFF, P_PWR_ON, P_RESTORE, P_UNISO
  } pstate_e;

  localparam int unsigned CW = (ENTRY_DELAY > 1) ? $clog2(ENTRY_DELAY + 1) : 1;

  pstate_e       state;
  logic [1:0]    req_sync, ack_sync;
  logic          req_s, ack_s, wait_alu;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_sync <= '0;
      ack_sync <= '0;
    end else begin
      req_sync <= {req_sync[0], req};
      ack_sync <= {ack_sync[0], ack};
    end
  end

  assign req_s    = req_sync[1];
  assign ack_s    = ack_sync[1];
  assign wait_alu = req_s && !ack_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= P_ON;
      cnt   <= '0;
    end else begin
      unique case (state)
        P_ON: if (wait_alu) begin
          cnt   <= CW'(1);
          state <= (ENTRY_DELAY <= 1) ? P_SAVE : P_ENTRY;
        end
        P_ENTRY: begin
          if (!wait_alu)                   state <= P_ON;
          else if (cnt >= CW'(ENTRY_DELAY - 1)) state <= P_SAVE;
          cnt <= cnt + CW'(1);
        end
        P_SAVE:    state <= P_ISO;
        P_ISO:     state <= P_PWR_OFF;
        P_PWR_OFF: if (n_pwr_ack) state <= P_OFF;
        P_OFF:     if (!wait_alu) state <= P_PWR_ON;
        P_PWR_ON:  if (!n_pwr_ack) state <= P_RESTORE;
        P_RESTORE: state <= P_UNISO;
        P_UNISO:   state <= P_ON;
        default:   state <= P_ON;
      endcase
    end
  end

  assign save      = (state == P_SAVE);
  assign restore   = (state == P_RESTORE);
  assign iso_en    = state inside {P_ISO, P_PWR_OFF, P_OFF, P_PWR_ON, P_RESTORE};
  assign n_pwr_req = state inside {P_PWR_OFF, P_OFF};
  assign dom_ready = state inside {P_ON, P_ENTRY};
  assign gated     = (state == P_OFF);

  // Isolation must be on whenever the switch is asked to be off.
  a_iso_cover : assert property (@(posedge clk) disable iff (!rst_n) n_pwr_req |-> iso_en);

endmodule
