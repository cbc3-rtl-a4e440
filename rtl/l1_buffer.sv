// l1_buffer: the 254 x 32 buffer of triggered events waiting to be sent.
//
// Each event read out of the pipeline is pushed together with its pipeline
// address, the 9-bit trigger count and two error flags; the triggered-data
// assembler pops them one per frame. The trigger count counts every event
// offered since the last Fast Reset (`clear`), starting at 0, so an event
// lost to a full buffer shows up as a gap in the counts.
//
// Error flags (their meaning is this design's choice):
//   err[1]  sticky: an event has been lost because the buffer was full
//           (also given as `overflow`, cleared by Fast Reset)
//   err[0]  the buffer held DEPTH-1 or more events when this one arrived
//
// Interface: `wr` pushes in one cycle; `ev`/`ev_valid` show the oldest event
// (first-word fall-through); `rd` pops it. Pushing and popping in the same
// cycle is allowed. `clear` empties the buffer.
`timescale 1ns / 1ps
module l1_buffer
  import cbc3_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               wr,
  input  hits_t              wdata,
  input  logic [PADDR_W-1:0] waddr,
  input  logic               rd,
  output l1_event_t          ev,
  output logic               ev_valid,
  output logic               overflow
);

  l1_event_t          mem [DEPTH];
  logic [AW-1:0]      wptr, rptr;
  logic [AW:0]        count;
  logic [L1CNT_W-1:0] l1cnt;
  logic               push, pop;

  assign ev_valid = (count != 0);
  assign ev       = mem[rptr];
  assign pop      = rd && ev_valid;
  assign push     = wr && (count < (AW+1)'(DEPTH) || pop);

  always_ff @(posedge clk)
    if (push && !clear) begin
      mem[wptr].data  <= wdata;
      mem[wptr].paddr <= waddr;
      mem[wptr].l1cnt <= l1cnt;
      mem[wptr].err   <= {overflow, count >= (AW+1)'(DEPTH - 1)};
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      l1cnt    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      l1cnt    <= '0;
      overflow <= 1'b0;
    end else begin
      if (wr)   l1cnt <= l1cnt + 1'b1;
      if (wr && !push) overflow <= 1'b1;
      if (push) wptr <= (32'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
      if (pop)  rptr <= (32'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end

endmodule
