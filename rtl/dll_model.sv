// dll_model: behavioural model of the delay-locked loop that makes the
// recovered 40 MHz clock phase-adjustable. Not synthesizable logic: the real
// part is an analogue delay line locked to the clock period.
//
// The model is a transport delay of `phase` steps of STEP_NS nanoseconds
// (1 ns steps as specified), so one 25 ns period spans 25 settings; phase
// values above 24 are treated as 24 (this design's choice). The model
// assumes the input period is longer than the largest delay, 24 ns. It only delays
// the exported clock; the logic inside the chip keeps the undelayed timing.
`timescale 1ns / 1ps
module dll_model #(
  parameter int unsigned STEP_NS = 1
) (
  input  logic       clk_in,
  input  logic [4:0] phase,
  output logic       clk_out
);
  int unsigned delay_ns;
  assign delay_ns = STEP_NS * ((phase > 5'd24) ? 24 : int'(phase));

  initial clk_out = 1'b0;

  // transport delay: every input edge is replayed delay_ns later. Rising
  // and falling edges have their own process, and each waits less than one
  // 25 ns period, so an edge is never lost even when the delay is longer
  // than half a period.
  always @(posedge clk_in) begin
    #(delay_ns);
    clk_out <= 1'b1;
  end

  always @(negedge clk_in) begin
    #(delay_ns);
    clk_out <= 1'b0;
  end

endmodule
