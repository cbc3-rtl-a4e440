// tb_dll_model: self-checking test of the DLL behavioural model.
// A 40 MHz clock is delayed for every phase setting 0..31; each output edge
// must follow its input edge by min(phase, 24) ns.
`timescale 1ns / 1ps
module tb_dll_model;
  logic clk_in = 1'b0, clk_out;
  logic [4:0] phase = '0;
  int checks = 0, failures = 0;

  dll_model dut (.*);

  always #12.5 clk_in = ~clk_in;

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_in;
  always @(posedge clk_in) t_in = $realtime;

  initial begin
    for (int p = 0; p < 32; p++) begin
      realtime d, expd;
      @(negedge clk_in);
      phase = 5'(p);
      repeat (3) @(posedge clk_in);
      @(posedge clk_out);
      d = $realtime - t_in;
      if (d < 0) d += 25.0;
      expd = (p > 24) ? 24.0 : real'(p);
      if (expd >= 25.0) expd -= 25.0;
      checks++;
      if (d < expd - 0.01 || d > expd + 0.01) begin
        failures++;
        $display("phase %0d: delay %0.2f ns", p, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
