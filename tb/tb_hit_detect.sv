// tb_hit_detect: self-checking test of hit_detect with all 254 channels.
//
// Every channel gets its own random train of comparator pulses, from one
// 320 MHz sample to several bunch crossings long, and the HIP count is
// changed between 0, 1, 2, 3 and 7. The expected hit of every channel in
// every crossing is worked out from the time of the channel's last low
// sample: a crossing with a low sample gives a hit if it also had a high
// one; a crossing that is high throughout gives a hit only if it is within
// the first hip_count crossings of the pulse (or hip_count is 0).
`timescale 1ns / 1ps
module tb_hit_detect;
  import cbc3_pkg::*;

  localparam int N = NCH;
  localparam int NBX = 400;

  logic clk = 1'b0, rst_n = 1'b0, bx_en = 1'b0;
  logic [N-1:0] comp = '0;
  logic [2:0] hip_count = 3'd0;
  logic [N-1:0] hits;
  int checks = 0, failures = 0;
  int suppressed = 0;

  hit_detect dut (.*);

  always #1.5625 clk = ~clk;

  initial begin
    repeat (NBX * 8 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  rem [N];
  int  t_low [N];
  logic hi_seen [N], lo_seen [N];
  logic exp_hit [N];

  initial begin
    for (int i = 0; i < N; i++) begin
      rem[i] = 1 + ($urandom % 20);
      t_low[i] = -1;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBX; b++) begin
      for (int i = 0; i < N; i++) begin
        hi_seen[i] = 1'b0;
        lo_seen[i] = 1'b0;
      end
      for (int ph = 0; ph < 8; ph++) begin
        @(negedge clk);
        // change the HIP count only after the previous crossing was taken
        if (ph == 1 && b % 80 == 0) hip_count = 3'(b / 80 == 4 ? 7 : b / 80);
        if (ph == 0 && b > 0) begin
          for (int i = 0; i < N; i++) begin
            checks++;
            if (hits[i] !== exp_hit[i]) begin
              failures++;
              if (failures < 10) $display("bx %0d ch %0d hit %b expected %b", b - 1, i, hits[i], exp_hit[i]);
            end
          end
        end
        for (int i = 0; i < N; i++) begin
          if (rem[i] == 0) begin
            comp[i] = ~comp[i];
            rem[i] = comp[i] ? 1 + ($urandom % 64) : 1 + ($urandom % 24);
          end
          rem[i]--;
          if (comp[i]) hi_seen[i] = 1'b1;
          else begin
            lo_seen[i] = 1'b1;
            t_low[i] = b * 8 + ph;
          end
        end
        bx_en = (ph == 7);
      end
      // expected hits of crossing b
      for (int i = 0; i < N; i++) begin
        if (lo_seen[i]) exp_hit[i] = hi_seen[i];
        else begin
          int idx;
          idx = b - (t_low[i] + 1) / 8 + 1;
          exp_hit[i] = (hip_count == 0) || (idx <= int'(hip_count));
          if (!exp_hit[i]) suppressed++;
        end
      end
    end
    @(negedge clk);
    bx_en = 1'b0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (hits[i] !== exp_hit[i]) failures++;
    end
    checks++;
    if (suppressed == 0) begin
      failures++;
      $display("HIP suppression never exercised");
    end
    $display("suppressed channel-crossings: %0d", suppressed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
