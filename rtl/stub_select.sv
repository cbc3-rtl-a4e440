// stub_select: gives the stubs their 8-bit addresses and keeps at most three
// per bunch crossing.
//
// A stub at half-strip position p gets address p+1 (1..253), leaving 0 to
// mark an empty slot on the output lines (this design's choice). As
// specified, stubs are taken in order of position, lowest address first, and
// `overflow` is raised when more than three stubs were found in the
// crossing. Slots are filled from slot 0 upwards; unused slots carry
// address 0 and bend 0.
//
// Timing: registered on bx_en, one crossing after stub_finder.
`timescale 1ns / 1ps
module stub_select
  import cbc3_pkg::*;
#(
  parameter int unsigned NP = NPOS
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            bx_en,
  input  logic [NP-1:0]                   stub_vld,
  input  logic [NP-1:0][BEND_W-1:0]       stub_bend,
  output logic [NSTUB-1:0][SADDR_W-1:0]   addr,
  output logic [NSTUB-1:0][BEND_W-1:0]    bend,
  output logic                            overflow
);

  logic [NSTUB-1:0][SADDR_W-1:0] addr_d;
  logic [NSTUB-1:0][BEND_W-1:0]  bend_d;
  logic                          ovf_d;

  always_comb begin
    int n;
    n      = 0;
    addr_d = '0;
    bend_d = '0;
    ovf_d  = 1'b0;
    for (int p = 0; p < int'(NP); p++) begin
      if (stub_vld[p]) begin
        if (n < int'(NSTUB)) begin
          addr_d[n] = SADDR_W'(p + 1);
          bend_d[n] = stub_bend[p];
        end else begin
          ovf_d = 1'b1;
        end
        n = n + 1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      addr     <= '0;
      bend     <= '0;
      overflow <= 1'b0;
    end else if (bx_en) begin
      addr     <= addr_d;
      bend     <= bend_d;
      overflow <= ovf_d;
    end

endmodule
