// triggered_data_assembler: sends buffered triggered events on the sixth
// 320 Mb/s output line.
//
// A frame is 276 bits, sent MSB first:
//   header 11 | err[1:0] | pipeline address[8:0] | trigger count[8:0] |
//   channel 0 ... channel 253
// The fields and their widths follow the specification; their order is this
// design's choice. A frame starts only at a bunch-crossing boundary, so its
// first header bit falls in bit slot 0, the slot of the stub packet's timing
// bit. Frames start at most once per PERIOD_BITS bits (304 bits = 950 ns),
// which lets the chip sustain a 1 MHz average trigger rate; the line is 0
// between frames.
//
// Timing: on a bx_en cycle with no frame period running and an event
// waiting, the event is loaded and popped (ev_pop high for that cycle); sdo
// carries the first header bit in the next cycle (slot 0).
`timescale 1ns / 1ps
module triggered_data_assembler
  import cbc3_pkg::*;
#(
  parameter int unsigned PERIOD_BITS = FRAME_PERIOD_BITS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      bx_en,
  input  l1_event_t ev,
  input  logic      ev_valid,
  output logic      ev_pop,
  output logic      sdo,
  output logic      busy
);

  logic [FRAME_BITS-1:0] shreg;
  logic [15:0]           left;    // bit slots left in the frame period
  logic [NCH-1:0]        data_rev;

  // channel 0 is sent first, so it goes to the high end of the frame
  always_comb
    for (int i = 0; i < int'(NCH); i++) data_rev[NCH-1-i] = ev.data[i];

  assign busy   = (left > 16'd1);
  assign ev_pop = bx_en && !busy && ev_valid;
  assign sdo    = shreg[FRAME_BITS-1];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      shreg <= '0;
      left  <= '0;
    end else if (ev_pop) begin
      shreg <= {2'b11, ev.err, ev.paddr, ev.l1cnt, data_rev};
      left  <= 16'(PERIOD_BITS);
    end else begin
      shreg <= {shreg[FRAME_BITS-2:0], 1'b0};
      if (left != 0) left <= left - 16'd1;
    end

endmodule
