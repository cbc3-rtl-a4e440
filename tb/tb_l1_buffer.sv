// tb_l1_buffer: self-checking test of the 32-event triggered-data buffer.
//
// Events with random data and pipeline addresses are pushed and popped at
// random, with a model queue giving the expected order. The test checks the
// data, the pipeline address, the trigger count (which also counts events
// lost to a full buffer), the nearly-full flag, the sticky overflow flag
// after 33 pushes without a pop, and that Fast Reset (`clear`) empties the
// buffer and restarts the count.
`timescale 1ns / 1ps
module tb_l1_buffer;
  import cbc3_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, wr = 1'b0, rd = 1'b0;
  hits_t wdata = '0;
  logic [8:0] waddr = '0;
  l1_event_t ev;
  logic ev_valid, overflow;
  int checks = 0, failures = 0, lost = 0;

  l1_buffer dut (.*);

  always #1.5625 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  l1_event_t q[$];
  int        cnt;    // expected trigger count of the next push
  logic      ovf;    // expected sticky overflow

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic step(input logic do_wr, input logic do_rd);
    l1_event_t e;
    @(negedge clk);
    check(ev_valid == (q.size() != 0), "ev_valid");
    if (q.size() != 0) check(ev == q[0], "head event");
    check(overflow == ovf, "overflow flag");
    for (int i = 0; i < int'(NCH); i += 32) wdata[i +: 32] = 32'($urandom);
    waddr = 9'($urandom);
    wr = do_wr;
    rd = do_rd;
    // model, in the order the hardware does it: pop, then push
    if (do_wr) begin
      e.data  = wdata;
      e.paddr = waddr;
      e.l1cnt = 9'(cnt);
      e.err   = {ovf, q.size() >= 31};
      cnt++;
    end
    if (do_rd && q.size() != 0) void'(q.pop_front());
    if (do_wr) begin
      if (q.size() < 32) q.push_back(e);
      else begin
        ovf = 1'b1;
        lost++;
      end
    end
  endtask

  initial begin
    cnt = 0;
    ovf = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (600) step($urandom % 3 == 0, $urandom % 3 == 0);
    repeat (40) step(1'b1, 1'b0);                 // fill past full
    repeat (10) step(1'b1, 1'b1);                 // full with push and pop
    repeat (40) step(1'b0, 1'b1);                 // drain
    // Fast Reset
    @(negedge clk);
    wr = 1'b0;
    rd = 1'b0;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    q.delete();
    cnt = 0;
    ovf = 1'b0;
    repeat (300) step($urandom % 2 == 0, $urandom % 2 == 0);
    @(negedge clk);
    wr = 1'b0;
    rd = 1'b0;
    check(lost > 0, "overflow exercised");
    $display("events lost to a full buffer: %0d", lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
