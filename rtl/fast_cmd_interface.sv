// fast_cmd_interface: receiver and decoder of the 320 Mb/s fast command line.
//
// One 8-bit command word arrives every 25 ns bunch crossing. The word is not
// encoded: three bits form the timing pattern used by clock_recovery, and
// each of the four commands (Trigger, Fast Reset, Test Pulse Request, Orbit
// Reset) has a dedicated bit. Sent first to last the word is
//   1 1 0 FastReset Trigger TestPulse OrbitReset 1
// (the pattern value and bit order are this design's choice). The receive
// shift register `window` holds the last eight bits, newest in bit 0, and is
// given to clock_recovery, which raises bx_en on the cycle in which `window`
// holds a whole word.
//
// Decoding is combinational: a command output is high for the single cycle
// in which bx_en is high. Words are only decoded while clock_recovery is
// locked and the word carries the timing pattern. Trigger, Fast Reset and
// Test Pulse are mutually exclusive by specification; a word with more than
// one of them set is dropped and `conflict` is raised, while Orbit Reset,
// which may come with any of them, still acts.
`timescale 1ns / 1ps
module fast_cmd_interface
  import cbc3_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fcmd_in,
  input  logic       bx_en,
  input  logic       locked,
  output logic [7:0] window,
  output logic       trigger,
  output logic       fast_reset,
  output logic       test_pulse,
  output logic       orbit_reset,
  output logic       conflict
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) window <= '0;
    else        window <= {window[6:0], fcmd_in};

  logic word_ok, exclusive;
  always_comb begin
    word_ok   = bx_en && locked && (window[7:5] == FC_SYNC) && window[0];
    exclusive = (32'(window[FC_FAST_RESET]) + 32'(window[FC_TRIGGER]) +
                 32'(window[FC_TEST_PULSE])) <= 1;
    trigger     = word_ok && exclusive && window[FC_TRIGGER];
    fast_reset  = word_ok && exclusive && window[FC_FAST_RESET];
    test_pulse  = word_ok && exclusive && window[FC_TEST_PULSE];
    orbit_reset = word_ok && window[FC_ORBIT_RST];
    conflict    = word_ok && !exclusive;
  end

endmodule
