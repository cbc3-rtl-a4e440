// tb_cbc3_trigger_rate: the whole chip at full size under its two trigger
// workloads: the longest trigger latency (511 crossings, 12.78 us) and a
// random trigger stream of 1 MHz on average (probability 1/40 per 25 ns
// crossing).
//
// Every crossing carries random short comparator pulses (4 % occupancy).
// After configuration over I2C and 520 crossings to fill the pipeline, random
// triggers are sent for NBX crossings. Each triggered frame is decoded from
// `l1_out` and must carry the hits of the crossing `latency` + 1 before its
// trigger, the matching pipeline address and the next trigger count, with
// both error flags clear: at 1 MHz the 950 ns frame period and the 32-event
// buffer must keep up without losing an event. All triggers must be read
// out by the end, and the largest buffer occupancy seen is reported.
`timescale 1ns / 1ps
module tb_cbc3_trigger_rate;
  import cbc3_pkg::*;

  localparam int LAT = 511;
  localparam int NBX = 4000;
  localparam logic [6:0] DEV = 7'h22;

  logic clk = 1'b0, rst_n = 1'b0, fcmd_in = 1'b0;
  logic [NCH-1:0] comp = '0;
  logic scl, sda_low, sda_oe, sda_bus;
  logic [4:0] stub_out;
  logic l1_out, clk40_out, locked, test_pulse, orbit_reset, cmd_conflict;
  logic [NREG-1:0][7:0] cfg_raw;
  int checks = 0, failures = 0;

  assign sda_bus = !(sda_low || sda_oe);

  cbc3_top dut (.clk, .rst_n, .fcmd_in, .comp, .scl, .sda_in(sda_bus), .sda_oe,
                .chip_addr(DEV), .stub_out, .l1_out, .clk40_out, .locked,
                .test_pulse, .orbit_reset, .cmd_conflict, .cfg_raw);
  i2c_master_model u_m (.scl, .sda_low, .sda_bus);

  always #1.5625 clk = ~clk;

  initial begin
    #500us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 15) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  int nbx = 0;
  always @(posedge clk) if (dut.bx_en) nbx <= nbx + 1;

  // command stream with random triggers at 1/40 per crossing
  logic rand_trig = 1'b0;
  int   sent_trig = 0;
  initial begin
    repeat (3 + $urandom % 8) @(negedge clk);
    forever begin
      logic t;
      logic [7:0] w;
      t = rand_trig && ($urandom % 40 == 0);
      if (t) sent_trig++;
      w = {3'b110, 1'b0, t, 2'b00, 1'b1};
      for (int b = 7; b >= 0; b--) begin
        fcmd_in = w[b];
        @(negedge clk);
      end
    end
  end

  // random short comparator pulses every crossing
  hits_t pattern [int];
  always @(negedge clk) if (locked) begin
    int ph;
    ph = int'(dut.u_clkrec.bx_phase);
    if (ph == 0 && !pattern.exists(nbx)) begin
      hits_t h;
      for (int i = 0; i < int'(NCH); i++) h[i] = ($urandom % 100) < 4;
      pattern[nbx] = h;
    end
    if (ph == 2) comp = pattern[nbx];
    else if (ph == 6) comp = '0;
  end

  // triggers as decoded by the chip, numbered by crossing
  int trig_bx [int];
  int l1cnt = 0, max_occ = 0;
  always @(posedge clk) begin
    if (dut.trigger) begin
      trig_bx[l1cnt] = nbx;
      l1cnt++;
    end
    if (locked && int'(dut.u_buf.count) > max_occ) max_occ = int'(dut.u_buf.count);
  end

  // frame decoder
  int pos = -1, frames = 0, next_cnt = 0;
  logic [FRAME_BITS-1:0] fr;
  always @(negedge clk) if (locked) begin
    if (pos < 0 && l1_out) pos = 0;
    if (pos >= 0) begin
      fr[FRAME_BITS - 1 - pos] = l1_out;
      pos++;
      if (pos == int'(FRAME_BITS)) begin
        int cnt, m;
        hits_t got;
        pos = -1;
        frames++;
        cnt = int'(fr[262:254]);
        check(fr[275:274] == 2'b11, "header");
        check(fr[273:272] == 2'b00, "no error flags at 1 MHz");
        check(cnt == next_cnt % 512, "consecutive trigger counts, none lost");
        next_cnt++;
        if (trig_bx.exists(cnt)) begin
          m = trig_bx[cnt];
          for (int c = 0; c < int'(NCH); c++) got[c] = fr[253 - c];
          check(fr[271:263] == 9'(m - LAT), "pipeline address");
          check(pattern.exists(m - LAT - 1) && got == pattern[m - LAT - 1],
                "hits of the crossing 511 + 1 before the trigger");
        end else check(1'b0, "frame without trigger");
      end
    end
  end

  initial begin
    logic [7:0] r[$];
    int b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    wait (locked);
    u_m.write_regs(DEV, REG_LAT_LO, '{8'(LAT & 255), 8'(LAT >> 8)});
    u_m.read_regs(DEV, REG_LAT_LO, 2, r);
    check(r[0] == 8'(LAT & 255) && r[1] == 8'(LAT >> 8), "latency programmed");
    wait (nbx > 520);
    b0 = nbx;
    rand_trig = 1'b1;
    wait (nbx > b0 + NBX);
    rand_trig = 1'b0;
    repeat (40 * 38 + 100) @(posedge clk iff dut.bx_en);
    check(sent_trig == l1cnt, "every trigger decoded");
    check(frames == l1cnt, "every trigger read out");
    check(frames > NBX / 60, "trigger rate near 1 MHz");
    $display("crossings %0d, triggers %0d (%.2f MHz), frames %0d, max buffer occupancy %0d",
             NBX, l1cnt, 40.0 * l1cnt / NBX, frames, max_occ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
