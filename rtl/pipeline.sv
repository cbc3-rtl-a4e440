// pipeline: 254 x 512 circular hit memory that holds every bunch crossing
// until the first-level trigger decision arrives.
//
// On every bx_en the current hit word is written at the write pointer, which
// then advances, wrapping after DEPTH crossings (512 crossings = 12.8 us at
// 40 MHz, the specified maximum latency). A trigger, given together with
// bx_en, reads the cell at write pointer - latency: the crossing written
// `latency` crossings before the one being written now. Latencies 1..511
// are useful; latency 0 returns the oldest cell (the one being overwritten,
// read before the write).
//
// Timing: rdata, raddr and rvalid are registered; rvalid is a one-cycle
// pulse the cycle after the trigger. Fast Reset sets the write pointer to 0
// (this design's choice). The memory is a plain array, with no reset.
`timescale 1ns / 1ps
module pipeline
  import cbc3_pkg::*;
#(
  parameter int unsigned N     = NCH,
  parameter int unsigned DEPTH = PIPE_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bx_en,
  input  logic [N-1:0]  wdata,
  input  logic [AW-1:0] latency,
  input  logic          fast_reset,
  input  logic          trigger,
  output logic [N-1:0]  rdata,
  output logic [AW-1:0] raddr,
  output logic          rvalid
);

  logic [N-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr;
  logic [AW-1:0] rptr;

  assign rptr = wptr - latency;

  always_ff @(posedge clk)
    if (bx_en) mem[wptr] <= wdata;

  always_ff @(posedge clk)
    if (trigger) rdata <= mem[rptr];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wptr   <= '0;
      raddr  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= trigger;
      if (trigger) raddr <= rptr;
      if (fast_reset) wptr <= '0;
      else if (bx_en) wptr <= wptr + 1'b1;
    end

endmodule
