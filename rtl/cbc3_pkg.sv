// cbc3_pkg: sizes, types and the configuration register map shared by the
// CBC3 digital blocks.
//
// The chip reads out 254 binary channels. Even channels come from one sensor
// layer of a stacked 2S module (the seed layer) and odd channels from the
// other (the correlation layer), so each layer has 127 strips and 253
// half-strip positions. Sizes that the design follows from its specification
// (254 channels, 512-deep pipeline, 32-event buffer, 330 registers, 9-bit
// pipeline address and trigger count, 5-bit bends reduced to 4 bits, 8-bit
// stub addresses, three stubs per bunch crossing) are collected here. The
// register map and the bit layout of the command word are this design's own.
`timescale 1ns / 1ps
package cbc3_pkg;

  localparam int unsigned NCH        = 254;       // channels
  localparam int unsigned NSTRIP     = NCH / 2;   // strips per sensor layer
  localparam int unsigned NPOS       = 2 * NSTRIP - 1; // half-strip positions
  localparam int unsigned PIPE_DEPTH = 512;
  localparam int unsigned PADDR_W    = 9;
  localparam int unsigned BUF_DEPTH  = 32;
  localparam int unsigned L1CNT_W    = 9;
  localparam int unsigned NREG       = 330;
  localparam int unsigned NSTUB      = 3;
  localparam int unsigned SADDR_W    = 8;
  localparam int unsigned BEND_W     = 5;
  localparam int unsigned CODE_W     = 4;
  localparam int unsigned BX_BITS    = 8;         // 320 MHz bits per 25 ns
  localparam int unsigned FRAME_BITS = 2 + 2 + PADDR_W + L1CNT_W + NCH; // 276
  localparam int unsigned FRAME_PERIOD_BITS = 38 * BX_BITS;              // 950 ns

  // Fast command word, bits numbered as they sit in the receive shift
  // register once the whole word is in (bit 7 was sent first).
  localparam logic [2:0] FC_SYNC      = 3'b110;   // bits 7:5
  localparam int unsigned FC_FAST_RESET = 4;
  localparam int unsigned FC_TRIGGER    = 3;
  localparam int unsigned FC_TEST_PULSE = 2;
  localparam int unsigned FC_ORBIT_RST  = 1;      // bit 0 is always 1

  // Configuration register map (page 0 addresses).
  localparam logic [7:0] REG_CTRL     = 8'h00;    // [7] page select
  localparam logic [7:0] REG_HIP      = 8'h01;    // [2:0] HIP count, 0 = off
  localparam logic [7:0] REG_LAT_LO   = 8'h02;    // trigger latency [7:0]
  localparam logic [7:0] REG_LAT_HI   = 8'h03;    // [0] trigger latency [8]
  localparam logic [7:0] REG_WINDOW   = 8'h04;    // [3:0] half-window, half strips
  localparam logic [7:0] REG_OFFSET   = 8'h05;    // [3:0] signed offset, half strips
  localparam logic [7:0] REG_DLL      = 8'h06;    // [4:0] clock phase, 1 ns steps
  localparam logic [7:0] REG_LUT      = 8'h07;    // 16 registers, two codes each
  localparam int unsigned NLUT_REG    = 16;

  typedef logic [NCH-1:0] hits_t;

  // Decoded digital settings.
  typedef struct packed {
    logic [2:0]           hip_count;
    logic [PADDR_W-1:0]   latency;
    logic [3:0]           window;
    logic signed [3:0]    offset;
    logic [4:0]           dll_phase;
    logic [31:0][CODE_W-1:0] lut;
  } cfg_t;

  // One triggered event as held in the buffer.
  typedef struct packed {
    logic [1:0]           err;
    logic [PADDR_W-1:0]   paddr;
    logic [L1CNT_W-1:0]   l1cnt;
    hits_t                data;
  } l1_event_t;

endpackage
