// clock_recovery: recovers the 40 MHz bunch-crossing timing from the fast
// command stream.
//
// Every command word carries the same timing pattern (110 in its first three
// bits, 1 in its last). A 3-bit counter `bx_phase` counts the eight bit slots
// of a bunch crossing; in slot 7 the receive shift register should hold one
// whole word. While unlocked, a word without the pattern makes the counter
// hold in slot 7 for one extra cycle (a one-bit slip), so the check point
// walks through all eight alignments. LOCK_N good words in a row give lock;
// once locked the counter runs freely and LOCK_N bad words in a row drop the
// lock. The bit-slip search and the lock counts are this design's choice.
//
// Outputs: bx_en is high in slot 7 of every bunch crossing while locked; it
// is the clock enable of all bunch-crossing-rate logic. clk40 is a registered
// 40 MHz clock, high in slots 0-3, so its rising edge comes with the first
// bit of a word and with the timing bit of the stub packet.
`timescale 1ns / 1ps
module clock_recovery #(
  parameter int unsigned LOCK_N = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] window,
  output logic       bx_en,
  output logic [2:0] bx_phase,
  output logic       clk40,
  output logic       locked
);
  import cbc3_pkg::*;

  logic       pattern_ok;
  logic [2:0] good_cnt, bad_cnt;
  logic [2:0] phase_next;

  assign pattern_ok = (window[7:5] == FC_SYNC) && window[0];
  assign bx_en      = locked && (bx_phase == 3'd7);

  always_comb begin
    phase_next = bx_phase + 3'd1;
    if (bx_phase == 3'd7 && !locked && !pattern_ok) phase_next = 3'd7;  // slip
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      bx_phase <= '0;
      good_cnt <= '0;
      bad_cnt  <= '0;
      locked   <= 1'b0;
      clk40    <= 1'b1;
    end else begin
      bx_phase <= phase_next;
      clk40    <= ~phase_next[2];
      if (bx_phase == 3'd7) begin
        if (!locked) begin
          bad_cnt <= '0;
          if (pattern_ok) begin
            good_cnt <= good_cnt + 3'd1;
            if (32'(good_cnt) + 1 >= LOCK_N) locked <= 1'b1;
          end else begin
            good_cnt <= '0;
          end
        end else begin
          good_cnt <= '0;
          if (pattern_ok) bad_cnt <= '0;
          else begin
            bad_cnt <= bad_cnt + 3'd1;
            if (32'(bad_cnt) + 1 >= LOCK_N) locked <= 1'b0;
          end
        end
      end
    end

endmodule
