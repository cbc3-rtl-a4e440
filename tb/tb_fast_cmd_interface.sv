// tb_fast_cmd_interface: self-checking test of the fast command receiver.
//
// The test sends 8-bit command words MSB first and supplies bx_en itself in
// the slot where a whole word has arrived. Every combination of the four
// command bits is sent: a single exclusive command or none must appear on
// its output for one cycle, two or three exclusive commands must raise only
// `conflict`, and Orbit Reset must act alongside any of them. Words without
// the timing pattern, and any word while `locked` is low, must do nothing.
`timescale 1ns / 1ps
module tb_fast_cmd_interface;
  import cbc3_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, fcmd_in = 1'b0, bx_en = 1'b0, locked = 1'b1;
  logic [7:0] window;
  logic trigger, fast_reset, test_pulse, orbit_reset, conflict;
  int checks = 0, failures = 0;

  fast_cmd_interface dut (.*);

  always #1.5625 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // send one word; outputs are sampled in the cycle where bx_en is high
  task automatic send(input logic [7:0] w, output logic [4:0] seen);
    seen = '0;
    for (int b = 7; b >= 0; b--) begin
      @(negedge clk);
      fcmd_in = w[b];
      bx_en = 1'b0;
    end
    @(negedge clk);
    bx_en = 1'b1;
    #0.5;
    seen = {trigger, fast_reset, test_pulse, orbit_reset, conflict};
    check(window == w, "window holds the word");
    @(negedge clk);
    bx_en = 1'b0;
    #0.5;
    check({trigger, fast_reset, test_pulse, orbit_reset, conflict} == 5'b0, "one-cycle pulses");
  endtask

  initial begin
    logic [4:0] seen;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < 2; l++) begin
      locked = (l == 0);
      for (int c = 0; c < 16; c++) begin
        logic fr, tr, tp, orr;
        logic [7:0] w;
        int nex;
        {fr, tr, tp, orr} = 4'(c);
        w = {3'b110, fr, tr, tp, orr, 1'b1};
        nex = int'(fr) + int'(tr) + int'(tp);
        send(w, seen);
        if (!locked) check(seen == 5'b0, "nothing while unlocked");
        else begin
          check(seen[4] == (tr && nex == 1), "trigger");
          check(seen[3] == (fr && nex == 1), "fast reset");
          check(seen[2] == (tp && nex == 1), "test pulse");
          check(seen[1] == orr, "orbit reset");
          check(seen[0] == (nex > 1), "conflict");
        end
      end
    end
    // words without the timing pattern
    locked = 1'b1;
    send(8'b0101_1001, seen);
    check(seen == 5'b0, "bad pattern ignored");
    send(8'b1101_1000, seen);
    check(seen == 5'b0, "missing final 1 ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
