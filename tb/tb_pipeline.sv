// tb_pipeline: self-checking test of the 254 x 512 pipeline.
//
// A random hit word is written every crossing (bx_en every other clock to
// keep the run short) and the test keeps the full history by crossing
// number. Triggers with random latencies, including 1 and 511, must return
// the word written `latency` crossings earlier, with pipeline address equal
// to that crossing number modulo 512, one clock after the trigger. A Fast
// Reset restarts the crossing numbering from address 0.
`timescale 1ns / 1ps
module tb_pipeline;
  import cbc3_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, bx_en = 1'b0, trigger = 1'b0, fast_reset = 1'b0;
  hits_t wdata = '0, rdata;
  logic [8:0] latency = '0, raddr;
  logic rvalid;
  int checks = 0, failures = 0;

  pipeline dut (.*);

  always #1.5625 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  hits_t hist [int];
  int    n;          // crossing number of the word being written

  function automatic hits_t rand_hits();
    hits_t h;
    for (int i = 0; i < int'(NCH); i += 32) h[i +: 32] = 32'($urandom);
    return h;
  endfunction

  task automatic run(input int nbx, input int trig_every);
    for (int k = 0; k < nbx; k++) begin
      int lat;
      @(negedge clk);
      wdata   = rand_hits();
      hist[n] = wdata;
      bx_en   = 1'b1;
      lat     = (k % 3 == 0) ? 511 : (k % 3 == 1) ? 1 : 1 + ($urandom % 511);
      trigger = (k % trig_every == trig_every - 1) && (n - lat >= 0);
      latency = 9'(lat);
      @(negedge clk);
      bx_en   = 1'b0;
      if (trigger) begin
        trigger = 1'b0;
        checks += 3;
        if (!rvalid) failures++;
        if (rdata !== hist[n - lat]) begin
          failures++;
          $display("crossing %0d latency %0d: wrong data", n, lat);
        end
        if (raddr !== 9'(n - lat)) begin
          failures++;
          $display("crossing %0d latency %0d: address %0d", n, lat, raddr);
        end
      end else begin
        checks++;
        if (rvalid) failures++;
      end
      n++;
    end
  endtask

  initial begin
    n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1200, 7);
    // Fast Reset: numbering restarts at address 0
    @(negedge clk);
    fast_reset = 1'b1;
    @(negedge clk);
    fast_reset = 1'b0;
    hist.delete();
    n = 0;
    run(700, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
