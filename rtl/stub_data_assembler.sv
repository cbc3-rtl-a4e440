// stub_data_assembler: sends the stub packet of every bunch crossing on five
// 320 Mb/s lines, eight bits per line per crossing (40 bits per 25 ns).
//
// Line layout, each byte MSB first (this design's choice; the specification
// gives the contents - three 8-bit stub addresses, their bend codes, a timing
// bit and flags - but not their placement):
//   sdo[0]  address of stub 1        sdo[3]  bend code 1 | bend code 2
//   sdo[1]  address of stub 2        sdo[4]  1 | err | or254 | ovf | code 3
//   sdo[2]  address of stub 3
// The timing bit (always 1) is the first bit of sdo[4] and so falls in bit
// slot 0, aligned with the rising edge of the recovered 40 MHz clock. `err`
// is the triggered-data error flag, `or254` the OR of all hit bits and `ovf`
// the more-than-three-stubs flag.
//
// Timing: inputs are loaded on bx_en; the packet is sent in slots 0-7 of the
// following crossing.
`timescale 1ns / 1ps
module stub_data_assembler
  import cbc3_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           bx_en,
  input  logic [NSTUB-1:0][SADDR_W-1:0]  addr,
  input  logic [NSTUB-1:0][CODE_W-1:0]   code,
  input  logic                           err,
  input  logic                           or254,
  input  logic                           ovf,
  output logic [4:0]                     sdo
);

  logic [4:0][7:0] shreg;

  always_comb
    for (int l = 0; l < 5; l++) sdo[l] = shreg[l][7];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) shreg <= '0;
    else if (bx_en) begin
      shreg[0] <= addr[0];
      shreg[1] <= addr[1];
      shreg[2] <= addr[2];
      shreg[3] <= {code[0], code[1]};
      shreg[4] <= {1'b1, err, or254, ovf, code[2]};
    end else begin
      for (int l = 0; l < 5; l++) shreg[l] <= {shreg[l][6:0], 1'b0};
    end

endmodule
