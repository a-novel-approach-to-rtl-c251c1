// i8051_ram: internal data memory and special function registers of the 8051.
//
// The 8-bit direct address space is split as in the 8051: 8'h00..8'h7F is
// the 128-byte internal RAM (register banks R0..R7 at 8'h00..8'h1F), and
// 8'h80..8'hFF holds the SFRs. Implemented SFRs: ACC (E0), B (F0), PSW (D0),
// SP (81), DPL (82), DPH (83) and the port latches P0..P3 (80, 90, A0, B0).
// Reading a port address returns the port pins (port_in), as the 8051 does
// for MOV A,Pn; the latches drive port_out. Other SFR addresses read as 0
// and ignore writes. PSW bit 0 (P) reads as the even parity of ACC, as on
// the 8051; the bit written to it is kept but never read back.
//
// Timing: one read and one write per clock. rd_addr is sampled on the rising
// edge and rd_data is valid after it (synchronous read); a write with wr_en
// takes effect on the same edge. A read of the address being written returns
// the old value. Reset (active low, synchronous to clk) sets the SFRs to
// their 8051 reset values (SP = 07, ports = FF, others 0); the internal RAM
// is not cleared, as on the 8051.
//
// In the GALS design this block sits in its own switchable power domain; the
// isolation of its outputs and the power switch are outside this module.
module i8051_ram
  import gals8051_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       rd_addr,
  output logic [7:0]       rd_data,
  input  logic             wr_en,
  input  logic [7:0]       wr_addr,
  input  logic [7:0]       wr_data,
  input  logic [3:0][7:0]  port_in,
  output logic [3:0][7:0]  port_out
);

  logic [7:0] iram [128];
  logic [7:0] acc, b, psw, sp, dpl, dph;

  always_ff @(posedge clk) begin
    if (wr_en && !wr_addr[7]) iram[wr_addr[6:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc      <= 8'h00;
      b        <= 8'h00;
      psw      <= 8'h00;
      sp       <= 8'h07;
      dpl      <= 8'h00;
      dph      <= 8'h00;
      port_out <= {4{8'hFF}};
    end else if (wr_en && wr_addr[7]) begin
      unique case (wr_addr)
        SFR_ACC: acc <= wr_data;
        SFR_B:   b   <= wr_data;
        SFR_PSW: psw <= wr_data;
        SFR_SP:  sp  <= wr_data;
        SFR_DPL: dpl <= wr_data;
        SFR_DPH: dph <= wr_data;
        SFR_P0:  port_out[0] <= wr_data;
        SFR_P1:  port_out[1] <= wr_data;
        SFR_P2:  port_out[2] <= wr_data;
        SFR_P3:  port_out[3] <= wr_data;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rd_addr[7]) begin
      rd_data <= iram[rd_addr[6:0]];
    end else begin
      unique case (rd_addr)
        SFR_ACC: rd_data <= acc;
        SFR_B:   rd_data <= b;
        SFR_PSW: rd_data <= {psw[7:1], ^acc};   // P flag: parity of ACC
        SFR_SP:  rd_data <= sp;
        SFR_DPL: rd_data <= dpl;
        SFR_DPH: rd_data <= dph;
        SFR_P0:  rd_data <= port_in[0];
        SFR_P1:  rd_data <= port_in[1];
        SFR_P2:  rd_data <= port_in[2];
        SFR_P3:  rd_data <= port_in[3];
        default: rd_data <= 8'h00;
      endcase
    end
  end

endmodule
