// gals8051_top: a globally-asynchronous, locally-synchronous 8051 whose RAM
// is power-gated by the request/acknowledge handshake between its islands.
//
// Structure:
//   * controller island on the stoppable clock gclk: controller (i8051_ctr),
//     decoder, program ROM, and the RAM/SFR block;
//   * ALU island on its own clock (here the free-running oscillator osc):
//     ALU wrapper and combinational ALU;
//   * controller wrapper and ALU wrapper carry each ALU operation over a
//     4-phase req/ack handshake with bundled data;
//   * clocking element: stops gclk while req is high and ack low, so the
//     controller and the RAM see no clock edges while the ALU works;
//   * power gating: pg_ctrl watches the same req/ack pair and, when the
//     controller has been waiting for ENTRY_DELAY clocks, saves, isolates and
//     switches off the RAM domain through the power switch, and powers it
//     back up (restore, release isolation) once ack arrives; gclk stays
//     stopped until the RAM is ready again.
//
// Ports: osc is the on-chip oscillator (free-running), rst_n an active-low
// reset held for a few osc cycles. port_in/port_out are the 8051 ports P0..P3.
// The remaining outputs expose the handshake and power-control signals and
// the program counter for observation. The RAM's read data passes through
// isolation clamps; the RAM array itself is assumed to keep its contents
// while its domain is off (retention), which this RTL does not model further.
module gals8051_top
  import gals8051_pkg::*;
#(
  parameter int unsigned ROM_ADDR_W    = 12,
  parameter string       ROM_INIT_FILE = "",
  parameter int unsigned DIV_DELAY     = 20,
  parameter int unsigned MUL_DELAY     = 20,
  parameter int unsigned ENTRY_DELAY   = 6,
  parameter int unsigned SW_OFF_CYCLES = 2,
  parameter int unsigned SW_ON_CYCLES  = 4
) (
  input  logic            osc,
  input  logic            rst_n,
  input  logic [3:0][7:0] port_in,
  output logic [3:0][7:0] port_out,
  output logic [15:0]     pc,
  output logic            retire,
  output logic            req,
  output logic            ack,
  output logic            gclk_running,
  output logic            n_pwr_req,
  output logic            n_pwr_ack,
  output logic            ram_vdd_on,
  output logic            iso_en,
  output logic            ret_save,
  output logic            ret_restore,
  output logic            ram_gated
);

  logic gclk, dom_ready;

  // controller island
  logic [15:0] rom_addr;
  logic [7:0]  rom_data, opcode;
  dec_t        dec;
  logic [7:0]  ram_rd_addr, ram_rd_data_raw, ram_rd_data, ram_wr_addr, ram_wr_data;
  logic        ram_wr_en;
  logic        alu_start, alu_ready, alu_done;
  alu_req_t    ctr_alu_req, hs_op;
  alu_rsp_t    ctr_alu_rsp, hs_rsp;

  // ALU island
  alu_req_t    alu_op;
  alu_rsp_t    alu_res;

  clock_gen u_clk (
    .osc, .rst_n, .req, .ack, .dom_ready,
    .gclk, .running(gclk_running)
  );

  i8051_ctr u_ctr (
    .clk(gclk), .rst_n,
    .rom_addr, .rom_data,
    .dec_opcode(opcode), .dec,
    .ram_rd_addr, .ram_rd_data,
    .ram_wr_en, .ram_wr_addr, .ram_wr_data,
    .alu_start, .alu_req(ctr_alu_req), .alu_ready, .alu_done, .alu_rsp(ctr_alu_rsp),
    .pc, .retire
  );

  i8051_dec u_dec (.opcode, .dec);

  i8051_rom #(.ADDR_W(ROM_ADDR_W), .INIT_FILE(ROM_INIT_FILE)) u_rom (
    .addr(rom_addr[ROM_ADDR_W-1:0]), .data(rom_data)
  );

  // RAM block: power-gated domain
  i8051_ram u_ram (
    .clk(gclk), .rst_n,
    .rd_addr(ram_rd_addr), .rd_data(ram_rd_data_raw),
    .wr_en(ram_wr_en), .wr_addr(ram_wr_addr), .wr_data(ram_wr_data),
    .port_in, .port_out
  );

  iso_clamp #(.W(8)) u_iso (.din(ram_rd_data_raw), .iso_en, .dout(ram_rd_data));

  ctr_wrapper u_ctr_wrpr (
    .clk(gclk), .rst_n,
    .start(alu_start), .op_in(ctr_alu_req), .ready(alu_ready),
    .done(alu_done), .rsp_out(ctr_alu_rsp),
    .req, .op_out(hs_op), .ack, .rsp_in(hs_rsp)
  );

  alu_wrapper #(.DIV_DELAY(DIV_DELAY), .MUL_DELAY(MUL_DELAY)) u_alu_wrpr (
    .clk(osc), .rst_n,
    .req, .op_in(hs_op), .ack, .rsp(hs_rsp),
    .alu_op, .alu_res
  );

  i8051_alu u_alu (.req(alu_op), .rsp(alu_res));

  pg_ctrl #(.ENTRY_DELAY(ENTRY_DELAY)) u_pg (
    .clk(osc), .rst_n, .req, .ack, .n_pwr_ack,
    .n_pwr_req, .iso_en, .save(ret_save), .restore(ret_restore),
    .dom_ready, .gated(ram_gated)
  );

  power_switch #(.OFF_CYCLES(SW_OFF_CYCLES), .ON_CYCLES(SW_ON_CYCLES)) u_sw (
    .clk(osc), .rst_n, .n_pwr_req, .n_pwr_ack, .vdd_on(ram_vdd_on)
  );

  // The RAM is never written while its supply is not fully up.
  a_no_write_unpowered : assert property (@(posedge osc) disable iff (!rst_n)
                                          (ram_wr_en && gclk_running) |-> ram_vdd_on);

endmodule
