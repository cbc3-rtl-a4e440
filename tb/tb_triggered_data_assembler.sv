// tb_triggered_data_assembler: self-checking test of the triggered-data
// serialiser.
//
// Random events are offered from a queue, sometimes back to back, sometimes
// with gaps. The serial line is decoded independently: a frame is found by
// its 11 header in a bit slot 0, its 276 bits are compared with the event
// (header, error flags, pipeline address, trigger count, channels 0..253),
// the gap between back-to-back frames must be exactly 304 bits (950 ns),
// never less, and the line must be 0 outside frames.
`timescale 1ns / 1ps
module tb_triggered_data_assembler;
  import cbc3_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, bx_en;
  l1_event_t ev;
  logic ev_valid, ev_pop, sdo, busy;
  int checks = 0, failures = 0;

  triggered_data_assembler dut (.*);

  always #1.5625 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit slot counter: bx_en in slot 7
  int slot = 0;
  assign bx_en = rst_n && (slot == 7);
  always @(posedge clk) if (rst_n) slot <= (slot + 1) % 8;

  l1_event_t offered[$];   // waiting in the "buffer"
  l1_event_t sent[$];      // popped, frame expected on the line
  assign ev_valid = offered.size() != 0;
  assign ev       = ev_valid ? offered[0] : '0;

  always @(posedge clk) if (ev_pop) sent.push_back(offered.pop_front());

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // line decoder
  int t = 0, last_start = -100000, frames = 0, back_to_back = 0, pos = -1;
  logic [FRAME_BITS-1:0] fr;
  always @(negedge clk) if (rst_n) begin
    if (pos < 0) begin
      if (sdo) begin
        check(slot == 0, "frame starts in bit slot 0");
        check(t - last_start >= int'(FRAME_PERIOD_BITS), "frame period at least 304 bits");
        if (t - last_start == int'(FRAME_PERIOD_BITS)) back_to_back++;
        last_start = t;
        pos = 0;
      end
    end
    if (pos >= 0) begin
      fr[FRAME_BITS-1-pos] = sdo;
      pos++;
      if (pos == int'(FRAME_BITS)) begin
        l1_event_t e;
        pos = -1;
        frames++;
        check(sent.size() != 0, "frame belongs to a popped event");
        if (sent.size() != 0) begin
          e = sent.pop_front();
          check(fr[275:274] == 2'b11, "header");
          check(fr[273:272] == e.err, "error flags");
          check(fr[271:263] == e.paddr, "pipeline address");
          check(fr[262:254] == e.l1cnt, "trigger count");
          for (int c = 0; c < int'(NCH); c++)
            check(fr[253 - c] == e.data[c], "channel bit");
        end
      end
    end
    t++;
  end

  function automatic l1_event_t rand_ev();
    l1_event_t e;
    e.err = 2'($urandom);
    e.paddr = 9'($urandom);
    e.l1cnt = 9'($urandom);
    for (int i = 0; i < int'(NCH); i += 32) e.data[i +: 32] = 32'($urandom);
    return e;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) offered.push_back(rand_ev());         // burst: back to back
    repeat (5 * 304 + 200) @(negedge clk);
    for (int k = 0; k < 6; k++) begin                // sparse events
      offered.push_back(rand_ev());
      repeat (304 + 8 * ($urandom % 40)) @(negedge clk);
    end
    repeat (800) @(negedge clk);
    check(frames == 11, "all frames sent");
    check(back_to_back >= 4, "back-to-back frames at 950 ns");
    check(sent.size() == 0 && offered.size() == 0, "nothing left");
    $display("frames %0d, back to back %0d", frames, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
