// tb_clock_recovery: self-checking test of word alignment and 40 MHz clock
// recovery.
//
// A continuous command stream (random commands, always with the timing
// pattern) is started at each of the eight possible bit offsets. The test
// checks that lock is reached within 8 x LOCK_N + 16 words, that from then
// on bx_en comes exactly once every 8 clocks and in the cycle where the
// receive window holds a whole word as sent, and that clk40 is high in the
// four slots after bx_en. It then corrupts LOCK_N words in a row and checks
// that the lock is lost and regained.
`timescale 1ns / 1ps
module tb_clock_recovery;
  import cbc3_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, fcmd_in = 1'b0;
  logic [7:0] window = '0;
  logic bx_en, clk40, locked;
  logic [2:0] bx_phase;
  int checks = 0, failures = 0;

  clock_recovery dut (.*);

  always #1.5625 clk = ~clk;
  always @(posedge clk) window <= {window[6:0], fcmd_in};

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  logic [7:0] sent_q[$];    // words fully shifted in
  int since_bx = 0, lock_time = -1, cyc = 0;
  logic first_bx = 1'b1;

  task automatic stream(input int nwords, input logic bad = 1'b0);
    for (int n = 0; n < nwords; n++) begin
      logic [7:0] w;
      w = {3'b110, 4'(1 << ($urandom % 4)) & 4'($urandom), 1'b1};
      if (bad) w = 8'h00;
      for (int b = 7; b >= 0; b--) begin
        @(negedge clk);
        fcmd_in = w[b];
      end
      sent_q.push_back(w);
    end
  endtask

  // checker, once locked
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (locked && lock_time < 0) begin
      lock_time = cyc;
      first_bx = 1'b1;
    end
    if (bx_en) begin
      check(since_bx == 8 || first_bx, "bx_en every 8 clocks");
      first_bx = 1'b0;
      check((window[7:5] == 3'b110 && window[0]) || window == 8'h00, "window holds a word at bx_en");
      since_bx = 1;
    end else since_bx++;
    if (locked && lock_time != cyc)
      check(clk40 == (bx_phase <= 3'd3), "clk40 high in slots 0-3");
  end

  initial begin
    for (int off = 0; off < 8; off++) begin
      rst_n = 1'b0;
      lock_time = -1;
      cyc = 0;
      repeat (3) @(negedge clk);
      repeat (off) @(negedge clk);
      rst_n = 1'b1;
      stream(8 * 4 + 16);
      check(locked, "locked");
      check(lock_time > 0 && lock_time < (8 * 4 + 16) * 8, "lock time");
    end
    // lose and regain lock
    stream(6, 1'b1);
    check(!locked, "lock lost");
    lock_time = -1;
    stream(48);
    check(locked, "lock regained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
