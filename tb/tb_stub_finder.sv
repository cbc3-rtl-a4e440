// tb_stub_finder: self-checking test of stub finding with all 127 strips
// per layer.
//
// Random hit patterns of low and high occupancy are applied with random
// window and offset settings, plus hand-made cases (one-strip and two-strip
// clusters, a match at the window edge, just outside it, and a large bend).
// The reference lists clusters as (first, last) strip pairs, takes centre =
// first + last, and for every seed cluster scans the list of correlation
// clusters for the lowest centre inside the window whose bend fits 5 bits.
`timescale 1ns / 1ps
module tb_stub_finder;
  import cbc3_pkg::*;

  localparam int NS = NSTRIP;
  localparam int NP = 2 * NS - 1;

  logic clk = 1'b0, rst_n = 1'b0, bx_en = 1'b0;
  logic [2*NS-1:0] hits = '0;
  logic [3:0] window = '0;
  logic signed [3:0] offset = '0;
  logic [NP-1:0] stub_vld;
  logic [NP-1:0][BEND_W-1:0] stub_bend;
  int checks = 0, failures = 0, nstubs = 0, even_cl = 0;

  stub_finder dut (.*);

  always #1.5625 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clusters of one layer as a list of centres
  function automatic void clusters(input logic [2*NS-1:0] h, input int layer, ref int cen[$]);
    int k;
    cen.delete();
    k = 0;
    while (k < NS) begin
      if (h[2*k + layer]) begin
        int first;
        first = k;
        while (k + 1 < NS && h[2*(k+1) + layer]) k++;
        cen.push_back(first + k);
        if ((k - first) % 2 == 1) even_cl++;
      end
      k++;
    end
  endfunction

  task automatic apply_and_check();
    int sc[$], cc[$];
    logic [NP-1:0] ev;
    int eb [NP];
    @(negedge clk);
    bx_en = 1'b1;
    @(negedge clk);
    bx_en = 1'b0;
    clusters(hits, 0, sc);
    clusters(hits, 1, cc);
    ev = '0;
    foreach (sc[i]) begin
      int best;
      best = -1;
      foreach (cc[j]) begin
        int b;
        b = cc[j] - sc[i];
        if (b >= -16 && b <= 15 && (b - int'(offset)) <= int'(window) &&
            (int'(offset) - b) <= int'(window) && best < 0) best = cc[j];
      end
      if (best >= 0) begin
        ev[sc[i]] = 1'b1;
        eb[sc[i]] = best - sc[i];
        nstubs++;
      end
    end
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (stub_vld[p] !== ev[p] || (ev[p] && stub_bend[p] !== BEND_W'(eb[p]))) begin
        failures++;
        if (failures < 10)
          $display("pos %0d: vld %b bend %0d, expected %b %0d (win %0d off %0d)",
                   p, stub_vld[p], $signed(stub_bend[p]), ev[p], eb[p], window, offset);
      end
    end
  endtask

  function automatic logic [2*NS-1:0] rand_hits(input int pct);
    logic [2*NS-1:0] h;
    for (int i = 0; i < 2 * NS; i++) h[i] = ($urandom % 100) < pct;
    return h;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // hand-made: seed strip 10 (centre 20), correlation strips 12-13 (centre 25)
    window = 4'd5;
    offset = 4'sd0;
    hits = '0;
    hits[2*10] = 1'b1;
    hits[2*12+1] = 1'b1;
    hits[2*13+1] = 1'b1;
    apply_and_check();
    checks++;
    if (!(stub_vld[20] && stub_bend[20] == 5'd5)) failures++;   // edge of window
    window = 4'd4;
    apply_and_check();
    checks++;
    if (stub_vld[20]) failures++;                                // just outside
    offset = 4'sd2;
    apply_and_check();
    checks++;
    if (!stub_vld[20]) failures++;                               // offset brings it in
    // large negative bend: seed strip 100, correlation strip 92 (bend -16)
    hits = '0;
    hits[2*100] = 1'b1;
    hits[2*92+1] = 1'b1;
    window = 4'd15;
    offset = -4'sd8;
    apply_and_check();
    checks++;
    if (!(stub_vld[200] && stub_bend[200] == 5'b10000)) failures++;
    for (int t = 0; t < 300; t++) begin
      hits   = rand_hits(t % 3 == 0 ? 5 : t % 3 == 1 ? 20 : 50);
      window = 4'($urandom);
      offset = 4'($urandom);
      apply_and_check();
    end
    checks++;
    if (even_cl == 0) failures++;
    $display("stubs %0d, even-width clusters %0d", nstubs, even_cl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
