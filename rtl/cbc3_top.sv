// cbc3_top: digital part of the CBC3 binary readout chip for the 2S modules
// of a tracker with track-trigger capability.
//
// The chip reads 254 binary channels whose comparators come from the
// analogue front end (not modelled: `comp` is an input). Every 25 ns bunch
// crossing the hits follow two paths:
//   * trigger path: hit_detect -> pipeline (254 x 512) -> on a Trigger
//     command, the crossing `latency` back is copied into l1_buffer (254 x 32)
//     -> triggered_data_assembler sends one 276-bit frame per 950 ns on
//     l1_out;
//   * stub path: hit_detect -> stub_finder (clusters, half-strip centres,
//     correlation window, 5-bit bend) -> stub_select (three lowest
//     addresses, overflow flag) -> bend_lut (5 to 4 bits) ->
//     stub_data_assembler, a 40-bit packet per crossing on the five stub_out
//     lines.
// Timing comes from the fast command line: clock_recovery aligns to the
// timing pattern of the 8-bit command words and produces the bunch-crossing
// strobe; fast_cmd_interface decodes Trigger, Fast Reset, Test Pulse and
// Orbit Reset. Settings live in config_regs, written over I2C (i2c_slave).
// dll_model delays the exported 40 MHz clock in 1 ns steps.
//
// All logic runs on the 320 MHz bit clock `clk` with the bunch-crossing
// strobe as clock enable (this design's choice; the specified chip runs its
// crossing-rate logic on the recovered 40 MHz clock). Stub latency: hits of
// the crossing ending at strobe k are sent in the crossing after strobe k+3.
// Fast Reset clears the pipeline write pointer, the event buffer, the
// trigger count and the error flags. Test Pulse and Orbit Reset are only
// brought out: the circuits they act on are outside this design.
`timescale 1ns / 1ps
module cbc3_top
  import cbc3_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 fcmd_in,
  input  logic [NCH-1:0]       comp,
  input  logic                 scl,
  input  logic                 sda_in,
  output logic                 sda_oe,
  input  logic [6:0]           chip_addr,
  output logic [4:0]           stub_out,
  output logic                 l1_out,
  output logic                 clk40_out,
  output logic                 locked,
  output logic                 test_pulse,
  output logic                 orbit_reset,
  output logic                 cmd_conflict,
  output logic [NREG-1:0][7:0] cfg_raw
);

  // timing and commands
  logic       bx_en, clk40, trigger, fast_reset;
  logic [2:0] bx_phase;
  logic [7:0] window;

  fast_cmd_interface u_fcmd (
    .clk, .rst_n, .fcmd_in, .bx_en, .locked, .window,
    .trigger, .fast_reset, .test_pulse, .orbit_reset, .conflict(cmd_conflict)
  );

  clock_recovery u_clkrec (
    .clk, .rst_n, .window, .bx_en, .bx_phase, .clk40, .locked
  );

  // configuration
  logic [7:0] reg_addr, reg_wdata, reg_rdata;
  logic       reg_wr, reg_rd;
  cfg_t       cfg;

  i2c_slave u_i2c (
    .clk, .rst_n, .scl, .sda_in, .sda_oe, .chip_addr,
    .reg_addr, .wr_en(reg_wr), .wdata(reg_wdata), .rd_en(reg_rd), .rdata(reg_rdata)
  );

  config_regs u_cfg (
    .clk, .rst_n, .addr(reg_addr), .wr_en(reg_wr), .wdata(reg_wdata),
    .rdata(reg_rdata), .cfg, .regs(cfg_raw)
  );

  dll_model u_dll (.clk_in(clk40), .phase(cfg.dll_phase), .clk_out(clk40_out));

  // hit detection
  hits_t hits;

  hit_detect u_hit (
    .clk, .rst_n, .bx_en, .comp, .hip_count(cfg.hip_count), .hits
  );

  // trigger path
  hits_t              l1_data;
  logic [PADDR_W-1:0] l1_addr;
  logic               l1_valid, ev_valid, ev_pop, buf_overflow, l1_busy;
  l1_event_t          ev;

  pipeline u_pipe (
    .clk, .rst_n, .bx_en, .wdata(hits), .latency(cfg.latency), .fast_reset,
    .trigger, .rdata(l1_data), .raddr(l1_addr), .rvalid(l1_valid)
  );

  l1_buffer u_buf (
    .clk, .rst_n, .clear(fast_reset), .wr(l1_valid), .wdata(l1_data),
    .waddr(l1_addr), .rd(ev_pop), .ev, .ev_valid, .overflow(buf_overflow)
  );

  triggered_data_assembler u_l1out (
    .clk, .rst_n, .bx_en, .ev, .ev_valid, .ev_pop, .sdo(l1_out), .busy(l1_busy)
  );

  // stub path
  logic [NPOS-1:0]                stub_vld;
  logic [NPOS-1:0][BEND_W-1:0]    stub_bend;
  logic [NSTUB-1:0][SADDR_W-1:0]  sel_addr;
  logic [NSTUB-1:0][BEND_W-1:0]   sel_bend;
  logic [NSTUB-1:0][CODE_W-1:0]   sel_code;
  logic                           sel_ovf;
  logic [1:0]                     or254_q;   // OR of hits, aligned with stubs

  stub_finder u_find (
    .clk, .rst_n, .bx_en, .hits, .window(cfg.window), .offset(cfg.offset),
    .stub_vld, .stub_bend
  );

  stub_select u_sel (
    .clk, .rst_n, .bx_en, .stub_vld, .stub_bend,
    .addr(sel_addr), .bend(sel_bend), .overflow(sel_ovf)
  );

  bend_lut u_lut (.lut(cfg.lut), .bend(sel_bend), .code(sel_code));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     or254_q <= '0;
    else if (bx_en) or254_q <= {or254_q[0], |hits};

  stub_data_assembler u_stubout (
    .clk, .rst_n, .bx_en, .addr(sel_addr), .code(sel_code),
    .err(buf_overflow), .or254(or254_q[1]), .ovf(sel_ovf), .sdo(stub_out)
  );

endmodule
