// hit_detect: per-channel hit logic with suppression of highly ionising
// particles (HIPs).
//
// The comparator of each channel is sampled by the 320 MHz clock, eight
// times per bunch crossing. A channel has a hit in a crossing if any of the
// eight samples was high, so pulses much shorter than 25 ns are kept, and a
// pulse that stays high (pile-up) gives a hit in every crossing it covers.
//
// HIP suppression follows the specified rule: the logic counts the crossings
// for which the comparator has stayed active and, on reaching the global
// 3-bit count `hip_count`, suppresses the hit output until the comparator
// returns to the inactive state. Here a pulse that is high through whole
// crossings yields hits in its first hip_count crossings and none after,
// until a low sample is seen. hip_count = 0 disables suppression (this
// design's choice).
//
// Timing: `hits` is registered and changes on the bx_en cycle (slot 7) that
// ends a crossing; it then holds that crossing's hits for the next 25 ns.
`timescale 1ns / 1ps
module hit_detect
  import cbc3_pkg::*;
#(
  parameter int unsigned N = NCH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bx_en,
  input  logic [N-1:0] comp,
  input  logic [2:0]   hip_count,
  output logic [N-1:0] hits
);

  logic [N-1:0]      seen_hi, seen_lo;   // samples so far in this crossing
  logic [N-1:0][2:0] run;                // whole high crossings in the pulse
  logic [N-1:0]      any_hi, any_lo;     // including the current sample

  assign any_hi = seen_hi | comp;
  assign any_lo = seen_lo | ~comp;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      seen_hi <= '0;
      seen_lo <= '0;
      run     <= '0;
      hits    <= '0;
    end else begin
      for (int i = 0; i < int'(N); i++) begin
        if (bx_en) begin
          seen_hi[i] <= 1'b0;
          seen_lo[i] <= 1'b0;
          if (any_lo[i]) begin
            // the comparator was inactive in this crossing: no suppression
            hits[i] <= any_hi[i];
            run[i]  <= comp[i] ? 3'd1 : 3'd0;
          end else begin
            hits[i] <= (hip_count == 3'd0) || (run[i] < hip_count);
            run[i]  <= (run[i] == 3'd7) ? 3'd7 : run[i] + 3'd1;
          end
        end else begin
          seen_hi[i] <= seen_hi[i] | comp[i];
          seen_lo[i] <= seen_lo[i] | ~comp[i];
        end
      end
    end

endmodule
