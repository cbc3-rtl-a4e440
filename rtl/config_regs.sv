// config_regs: the 330 eight-bit configuration registers and the decoding of
// the settings used by the digital logic.
//
// The I2C register pointer is 8 bits wide, so the 330 registers are split in
// two pages. Bit 7 of register 0 selects the page and register 0 is seen at
// address 0 of both pages; page 0 address a (1..255) is register a, page 1
// address a (1..74) is register 255+a, and other page-1 addresses read 0
// and ignore writes. Register 0 and the map of the digital settings (see
// cbc3_pkg: HIP count, trigger latency, correlation window and offset, DLL
// phase and the 32-entry bend table) are this design's choice; the remaining
// registers hold analogue settings (thresholds, biases, trims) and are only
// stored and brought out on `regs`. All registers reset to 0.
//
// Timing: writes take effect on the clock edge of wr_en; rdata is
// combinational from the current address.
`timescale 1ns / 1ps
module config_regs
  import cbc3_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0]           addr,
  input  logic                 wr_en,
  input  logic [7:0]           wdata,
  output logic [7:0]           rdata,
  output cfg_t                 cfg,
  output logic [NREG-1:0][7:0] regs
);

  logic       page;
  logic       hit;
  logic [8:0] idx;

  assign page = regs[0][7];

  always_comb begin
    hit = 1'b1;
    if (addr == 8'd0 || !page) idx = {1'b0, addr};
    else begin
      idx = 9'd255 + 9'(addr);
      hit = (32'(idx) < NREG);
    end
    rdata = hit ? regs[idx] : 8'h00;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) regs <= '0;
    else if (wr_en && hit) regs[idx] <= wdata;

  always_comb begin
    cfg.hip_count = regs[REG_HIP][2:0];
    cfg.latency   = {regs[REG_LAT_HI][0], regs[REG_LAT_LO]};
    cfg.window    = regs[REG_WINDOW][3:0];
    cfg.offset    = regs[REG_OFFSET][3:0];
    cfg.dll_phase = regs[REG_DLL][4:0];
    for (int i = 0; i < int'(NLUT_REG); i++) begin
      cfg.lut[2*i]   = regs[32'(REG_LUT) + i][3:0];
      cfg.lut[2*i+1] = regs[32'(REG_LUT) + i][7:4];
    end
  end

endmodule
