// bend_lut: reduces the 5-bit bend of each of the three output stubs to a
// 4-bit code through a programmable 32-entry table.
//
// The table is indexed by the bend read as an unsigned 5-bit number (so
// entries 0-15 hold bends 0..+15 and entries 16-31 bends -16..-1) and is
// held in the configuration registers. Purely combinational.
`timescale 1ns / 1ps
module bend_lut
  import cbc3_pkg::*;
(
  input  logic [31:0][CODE_W-1:0]       lut,
  input  logic [NSTUB-1:0][BEND_W-1:0]  bend,
  output logic [NSTUB-1:0][CODE_W-1:0]  code
);

  always_comb
    for (int s = 0; s < int'(NSTUB); s++) code[s] = lut[bend[s]];

endmodule
