// stub_finder: finds stubs, pairs of correlated clusters in the two sensor
// layers of a 2S module, at half-strip resolution.
//
// Even channels (0, 2, ...) are the seed layer, odd channels the
// correlation layer, so strip k of a layer is channel 2k or 2k+1. In each
// layer a cluster is a run of adjacent hit strips; a cluster from strip a to
// strip b is given the centre a+b in half-strip units, so a cluster with an
// even number of strips sits between its two middle strips and a one-strip
// cluster sits on its strip. The NPOS = 2*NSTRIP-1 possible centres are
// flagged in a bit vector per layer (no cluster width limit is applied).
//
// For each seed cluster at p the correlation layer is searched for a cluster
// centre q with |q - p - offset| <= window (window and offset in half
// strips, programmable); the smallest such q is taken and the stub's bend is
// q - p, a 5-bit two's-complement number. Candidates whose bend does not fit
// in 5 bits are not matched, and no stub is produced from outside the
// window. The choice of the lowest q and the register widths (window 4 bits,
// offset 4 bits signed) are this design's.
//
// Timing: the result for the hit word present at a bx_en is registered at
// that bx_en, one crossing after hit_detect.
`timescale 1ns / 1ps
module stub_finder
  import cbc3_pkg::*;
#(
  parameter int unsigned NS   = NSTRIP,
  localparam int unsigned NP  = 2 * NS - 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    bx_en,
  input  logic [2*NS-1:0]         hits,
  input  logic [3:0]              window,
  input  logic signed [3:0]       offset,
  output logic [NP-1:0]           stub_vld,
  output logic [NP-1:0][BEND_W-1:0] stub_bend
);

  logic [NS-1:0] seed, corr;
  logic [NP-1:0] seed_cen, corr_cen;
  logic [NP-1:0] vld_d;
  logic [NP-1:0][BEND_W-1:0] bend_d;

  always_comb
    for (int k = 0; k < int'(NS); k++) begin
      seed[k] = hits[2*k];
      corr[k] = hits[2*k+1];
    end

  // centres of the runs of ones in a layer, in half-strip units
  function automatic logic [NP-1:0] centres(input logic [NS-1:0] s);
    logic [NP-1:0] c;
    int start;
    logic in_run;
    c = '0;
    start = 0;
    in_run = 1'b0;
    for (int k = 0; k <= int'(NS); k++) begin
      logic h;
      h = (k < int'(NS)) ? s[k] : 1'b0;
      if (h && !in_run) begin
        start  = k;
        in_run = 1'b1;
      end else if (!h && in_run) begin
        c[start + k - 1] = 1'b1;
        in_run = 1'b0;
      end
    end
    return c;
  endfunction

  always_comb begin
    seed_cen = centres(seed);
    corr_cen = centres(corr);
  end

  // one matcher per seed position
  for (genvar p = 0; p < int'(NP); p++) begin : g_pos
    always_comb begin
      vld_d[p]  = 1'b0;
      bend_d[p] = '0;
      if (seed_cen[p]) begin
        // bends in ascending order, so the lowest q is found first
        for (int b = -16; b <= 15; b++) begin
          if (!vld_d[p] && p + b >= 0 && p + b < int'(NP) &&
              corr_cen[p + b] &&
              b - int'(offset) <= int'(window) &&
              int'(offset) - b <= int'(window)) begin
            vld_d[p]  = 1'b1;
            bend_d[p] = BEND_W'(b);
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      stub_vld  <= '0;
      stub_bend <= '0;
    end else if (bx_en) begin
      stub_vld  <= vld_d;
      stub_bend <= bend_d;
    end

endmodule
