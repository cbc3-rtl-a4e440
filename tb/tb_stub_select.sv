// tb_stub_select: self-checking test of the three-stub priority selection.
//
// Random sets of 0 to 8 stubs at random positions are applied; the reference
// sorts the positions, expects the three lowest as addresses position+1 with
// their bends, zeros in unused slots, and the overflow flag exactly when
// there are more than three.
`timescale 1ns / 1ps
module tb_stub_select;
  import cbc3_pkg::*;

  localparam int NP = NPOS;

  logic clk = 1'b0, rst_n = 1'b0, bx_en = 1'b0;
  logic [NP-1:0] stub_vld = '0;
  logic [NP-1:0][BEND_W-1:0] stub_bend = '0;
  logic [NSTUB-1:0][SADDR_W-1:0] addr;
  logic [NSTUB-1:0][BEND_W-1:0] bend;
  logic overflow;
  int checks = 0, failures = 0, overflows = 0;

  stub_select dut (.*);

  always #1.5625 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      int pos[$];
      int n;
      n = $urandom % 9;
      pos.delete();
      stub_vld = '0;
      for (int i = 0; i < NP; i++) stub_bend[i] = 5'($urandom);
      for (int k = 0; k < n; k++) begin
        int p;
        p = (t % 4 == 0) ? ($urandom % 10) : ($urandom % NP);
        stub_vld[p] = 1'b1;
      end
      for (int i = 0; i < NP; i++) if (stub_vld[i]) pos.push_back(i);   // ascending
      @(negedge clk);
      bx_en = 1'b1;
      @(negedge clk);
      bx_en = 1'b0;
      for (int s = 0; s < int'(NSTUB); s++) begin
        checks += 2;
        if (s < pos.size()) begin
          if (addr[s] !== 8'(pos[s] + 1)) failures++;
          if (bend[s] !== stub_bend[pos[s]]) failures++;
        end else begin
          if (addr[s] !== 8'd0) failures++;
          if (bend[s] !== 5'd0) failures++;
        end
      end
      checks++;
      if (overflow !== (pos.size() > 3)) failures++;
      if (pos.size() > 3) overflows++;
    end
    checks++;
    if (overflows == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
