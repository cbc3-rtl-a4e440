// tb_cbc3_top: end-to-end test of the whole chip at its full size (254
// channels, 512-deep pipeline, 32-event buffer, 330 registers).
//
// The testbench plays the module controller: it sends a continuous fast
// command stream starting at an arbitrary bit offset, configures the chip
// over I2C at 1 MHz and reads settings back, drives the 254 comparator
// inputs, and decodes both serial outputs independently of the RTL:
//   * stub_out: one 40-bit packet per crossing; stubs must appear four
//     crossings after their hits, with address = half-strip centre + 1 and
//     the bend passed through the programmed look-up table;
//   * l1_out: 276-bit frames; each frame's data must equal the hits
//     injected `latency` + 1 crossings before the trigger was decoded, with
//     the pipeline address and trigger count that follow from the number of
//     crossings and triggers since the last (fast) reset.
// Mechanisms exercised and counted (each must happen at least once): lock,
// I2C write and read-back, single stub, half-strip (even-width) cluster
// stub, stub overflow flag, HIP suppression, triggered readout, frames
// queued back to back, buffer overflow with its error flag, Fast Reset,
// Test Pulse and Orbit Reset commands, a command conflict and the DLL delay.
// The crossing strobe and decoded trigger are observed inside the design
// only to number the crossings.
`timescale 1ns / 1ps
module tb_cbc3_top;
  import cbc3_pkg::*;

  localparam int LAT = 20;
  localparam logic [6:0] DEV = 7'h41;

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
    #2ms;
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

  // ---------------------------------------------------------------- counters
  int n_lock = 0, n_i2c = 0, n_stub = 0, n_half = 0, n_sovf = 0, n_hip = 0;
  int n_frames = 0, n_b2b = 0, n_bovf = 0, n_freset = 0, n_tp = 0, n_orb = 0;
  int n_conf = 0, n_dll = 0;

  // ---------------------------------------------------------- crossing count
  int nbx = 0;              // index of the crossing now in progress
  int wbase = 0;            // crossing whose strobe last reset the pipeline
  always @(posedge clk) if (dut.bx_en) nbx <= nbx + 1;

  // -------------------------------------------------------- command stream
  logic [3:0] cmdq[$];      // {fast reset, trigger, test pulse, orbit reset}
  initial begin
    repeat (5 + $urandom % 8) @(negedge clk);
    forever begin
      logic [3:0] c;
      logic [7:0] w;
      c = (cmdq.size() != 0) ? cmdq.pop_front() : 4'b0000;
      w = {3'b110, c, 1'b1};
      for (int b = 7; b >= 0; b--) begin
        fcmd_in = w[b];
        @(negedge clk);
      end
    end
  end

  task automatic send_cmd(input logic [3:0] c);
    cmdq.push_back(c);
    wait (cmdq.size() == 0);
  endtask

  task automatic wait_bx(input int n);
    repeat (n) @(posedge clk iff dut.bx_en);
  endtask

  // ------------------------------------------------------ comparator drive
  hits_t pattern [int];     // hits injected in each crossing (short pulses)
  hits_t held = '0;         // channels held high through whole crossings
  logic  inject_rand = 1'b0;
  always @(negedge clk) if (locked) begin
    int ph;
    ph = int'(dut.u_clkrec.bx_phase);
    if (ph == 0 && inject_rand && !pattern.exists(nbx)) begin
      hits_t h;
      for (int i = 0; i < int'(NCH); i++) h[i] = ($urandom % 100) < 4;
      pattern[nbx] = h;
    end
    if (ph == 2) comp = held | (pattern.exists(nbx) ? pattern[nbx] : '0);
    else if (ph == 6 || ph == 0) comp = held;
  end

  // --------------------------------------------------- stub packet decoder
  logic [4:0][7:0] pkt;
  logic [4:0][7:0] packets [int];   // by crossing in which it was sent
  always @(negedge clk) if (locked) begin
    int ph;
    ph = int'(dut.u_clkrec.bx_phase);
    for (int l = 0; l < 5; l++) pkt[l][7 - ph] = stub_out[l];
    if (ph == 7) begin
      packets[nbx] = pkt;
      checks++;
      if (nbx > 0 && !pkt[4][7]) begin
        failures++;
        $display("FAIL: timing bit missing in crossing %0d", nbx);
      end
    end
  end

  // ------------------------------------------------- trigger bookkeeping
  typedef struct {
    int    m;               // crossing of the trigger strobe
    int    wb;              // pipeline base at that time
  } trig_t;
  trig_t trig_by_cnt [int];
  int    l1cnt = 0, epoch = 0, fr_bx = -1;
  always @(posedge clk) if (dut.trigger) begin
    trig_t t;
    t.m  = nbx;
    t.wb = wbase;
    trig_by_cnt[epoch * 1000 + l1cnt] = t;
    l1cnt = (l1cnt + 1) % 512;
  end
  always @(posedge clk) if (dut.fast_reset) begin
    n_freset++;
    l1cnt = 0;
    epoch++;
    wbase = nbx + 1;
    fr_bx = nbx;
  end
  always @(posedge clk) begin
    if (test_pulse) n_tp++;
    if (orbit_reset) n_orb++;
    if (cmd_conflict) n_conf++;
  end

  // ---------------------------------------------------- L1 frame decoder
  int pos = -1, fstart = -100000, fstart_bx = 0, cyc = 0;
  logic [FRAME_BITS-1:0] fr;
  always @(negedge clk) if (locked) begin
    cyc++;
    if (pos < 0 && l1_out) begin
      check(dut.u_clkrec.bx_phase == 3'd0, "frame header in bit slot 0");
      check(cyc - fstart >= int'(FRAME_PERIOD_BITS), "frame period");
      if (cyc - fstart == int'(FRAME_PERIOD_BITS)) n_b2b++;
      fstart = cyc;
      fstart_bx = nbx;
      pos = 0;
    end
    if (pos >= 0) begin
      fr[FRAME_BITS - 1 - pos] = l1_out;
      pos++;
      if (pos == int'(FRAME_BITS)) begin
        int cnt, key, src;
        logic [8:0] exp_addr;
        hits_t exp_data, got;
        pos = -1;
        n_frames++;
        cnt = int'(fr[262:254]);
        key = ((fr_bx >= 0 && fstart_bx > fr_bx) ? epoch : epoch - (fr_bx >= 0 ? 1 : 0)) * 1000 + cnt;
        if (fr_bx < 0) key = cnt;
        check(fr[275:274] == 2'b11, "frame header");
        check(trig_by_cnt.exists(key), "frame has a known trigger count");
        if (fr[273]) n_bovf++;
        if (trig_by_cnt.exists(key)) begin
          src = trig_by_cnt[key].m - LAT - 1;
          exp_addr = 9'(trig_by_cnt[key].m - trig_by_cnt[key].wb - LAT);
          exp_data = pattern.exists(src) ? pattern[src] : '0;
          for (int c = 0; c < int'(NCH); c++) got[c] = fr[253 - c];
          check(fr[271:263] == exp_addr, "pipeline address");
          check(got == exp_data, "triggered hit data");
          if (got != exp_data) $display("   frame cnt %0d trigger bx %0d", cnt, trig_by_cnt[key].m);
        end
      end
    end
  end

  // ----------------------------------------------------------- DLL check
  realtime t40;
  always @(posedge dut.clk40) t40 = $realtime;
  always @(posedge clk40_out) if (locked && dut.cfg.dll_phase == 5'd5) begin
    realtime d;
    d = $realtime - t40;
    checks++;
    if (d > 4.99 && d < 5.01) n_dll++;
    else failures++;
  end

  // ------------------------------------------------------------ sequence
  function automatic logic [3:0] lut_code(input int i);
    return 4'((i * 7 + 3) % 16);
  endfunction

  task automatic expect_stub_packet(input int b, input logic [7:0] a0,
                                    input logic [4:0] bend0, input logic ovf,
                                    input logic [7:0] a1, input logic [7:0] a2);
    logic [4:0][7:0] p;
    check(packets.exists(b + 4), "packet present");
    p = packets[b + 4];
    check(p[0] == a0, "stub 1 address, 4 crossings after the hits");
    check(p[3][7:4] == lut_code(int'(bend0)), "stub 1 bend code through LUT");
    check(p[1] == a1 && p[2] == a2, "stubs 2 and 3");
    check(p[4][4] == ovf, "stub overflow flag");
    check(p[4][5] == 1'b1, "OR254 flag with hits");
    check(packets[b + 3][0] == 8'd0 && packets[b + 5][0] == 8'd0, "stub only in its crossing");
    if (a0 != 0) n_stub++;
    if (ovf) n_sovf++;
  endtask

  initial begin
    logic [7:0] d[$], r[$];
    int b;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    wait (locked);
    n_lock++;
    // configuration over I2C: HIP 2, latency, window 4, offset 0, DLL 5 ns,
    // bend table
    d = '{8'h02, 8'(LAT), 8'h00, 8'h04, 8'h00, 8'h05};
    for (int i = 0; i < 16; i++) d.push_back({lut_code(2*i+1), lut_code(2*i)});
    u_m.write_regs(DEV, REG_HIP, d);
    u_m.read_regs(DEV, REG_HIP, 22, r);
    check(u_m.nacks == 0, "I2C acknowledged");
    for (int i = 0; i < 22; i++) check(r[i] == d[i], "I2C read-back");
    check(cfg_raw[REG_LAT_LO] == 8'(LAT), "register file holds latency");
    n_i2c++;
    // page 1: register 300 (page-1 address 45)
    u_m.write_regs(DEV, 8'h00, '{8'h80});
    u_m.write_regs(DEV, 8'd45, '{8'h5c});
    check(cfg_raw[300] == 8'h5c, "page 1 register");
    u_m.write_regs(DEV, 8'h00, '{8'h00});
    wait_bx(4);

    // single stub: seed strip 10 (ch 20), correlation strip 12 (ch 25)
    @(negedge clk iff dut.u_clkrec.bx_phase == 3'd1);
    b = nbx;
    pattern[b] = '0;
    pattern[b][20] = 1'b1;
    pattern[b][25] = 1'b1;
    wait_bx(8);
    expect_stub_packet(b, 8'd21, 5'd4, 1'b0, 8'd0, 8'd0);

    // half-strip: seed strips 20-21 (centre 41), correlation 21-22 (centre 43)
    @(negedge clk iff dut.u_clkrec.bx_phase == 3'd1);
    b = nbx;
    pattern[b] = '0;
    pattern[b][40] = 1'b1;
    pattern[b][42] = 1'b1;
    pattern[b][43] = 1'b1;
    pattern[b][45] = 1'b1;
    wait_bx(8);
    expect_stub_packet(b, 8'd42, 5'd2, 1'b0, 8'd0, 8'd0);
    if (packets[b + 4][0] == 8'd42) n_half++;

    // five stubs with bend 0: three lowest reported, overflow flag
    @(negedge clk iff dut.u_clkrec.bx_phase == 3'd1);
    b = nbx;
    pattern[b] = '0;
    for (int s = 30; s <= 70; s += 10) begin
      pattern[b][2*s] = 1'b1;
      pattern[b][2*s+1] = 1'b1;
    end
    wait_bx(8);
    expect_stub_packet(b, 8'd61, 5'd0, 1'b1, 8'd81, 8'd101);

    // HIP: channel 200 held high for six crossings, HIP count 2
    @(negedge clk iff dut.u_clkrec.bx_phase == 3'd7);
    b = nbx + 1;
    held[200] = 1'b1;
    wait_bx(7);
    held[200] = 1'b0;
    wait_bx(8);
    for (int k = 0; k < 6; k++) begin
      check(packets[b + k + 4][4][5] == (k < 2), "HIP: hits only in the first 2 crossings");
      if (k >= 2 && !packets[b + k + 4][4][5]) n_hip++;
    end

    // triggered readout: random hits every crossing, triggers spaced and in
    // a burst of three
    inject_rand = 1'b1;
    wait_bx(LAT + 5);
    send_cmd(4'b0100);
    wait_bx(50);
    for (int k = 0; k < 3; k++) send_cmd(4'b0100);
    wait_bx(200);

    // test pulse, orbit reset with a trigger, and a conflicting word
    send_cmd(4'b0010);
    send_cmd(4'b0101);
    send_cmd(4'b1100);
    wait_bx(50);

    // buffer overflow: 40 triggers in consecutive crossings
    for (int k = 0; k < 40; k++) send_cmd(4'b0100);
    wait_bx(4);
    check(packets[nbx - 1][4][6] == 1'b1, "stub packet error flag after overflow");
    wait_bx(34 * 38);

    // Fast Reset, then one trigger: count 0, no error flags
    send_cmd(4'b1000);
    wait_bx(LAT + 3);
    send_cmd(4'b0100);
    wait_bx(60);
    check(fr[262:254] == 9'd0 && fr[273:272] == 2'b00, "after Fast Reset: count 0, no errors");
    inject_rand = 1'b0;
    wait_bx(10);

    check(n_lock > 0, "lock");
    check(n_i2c > 0, "I2C");
    check(n_stub >= 3, "stubs");
    check(n_half > 0, "half-strip stub");
    check(n_sovf > 0, "stub overflow");
    check(n_hip > 0, "HIP suppression");
    check(n_frames >= 38, "triggered frames");
    check(n_b2b > 0, "back-to-back frames");
    check(n_bovf > 0, "buffer overflow flag");
    check(n_freset == 1, "fast reset");
    check(n_tp == 1, "test pulse");
    check(n_orb == 1, "orbit reset");
    check(n_conf == 1, "command conflict");
    check(n_dll > 0, "DLL delay");
    $display("lock %0d i2c %0d stubs %0d half %0d stub-ovf %0d hip %0d frames %0d b2b %0d buf-ovf %0d freset %0d tp %0d orbit %0d conflict %0d dll %0d",
             n_lock, n_i2c, n_stub, n_half, n_sovf, n_hip, n_frames, n_b2b, n_bovf,
             n_freset, n_tp, n_orb, n_conf, n_dll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
