// tb_bend_lut: self-checking test of the programmable bend look-up table.
// Random tables and bends; each code must equal the table entry at the bend
// taken as an unsigned 5-bit index.
`timescale 1ns / 1ps
module tb_bend_lut;
  import cbc3_pkg::*;

  logic [31:0][CODE_W-1:0] lut;
  logic [NSTUB-1:0][BEND_W-1:0] bend;
  logic [NSTUB-1:0][CODE_W-1:0] code;
  int checks = 0, failures = 0;

  bend_lut dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] table_copy [32];
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 32; i++) begin
        table_copy[i] = 4'($urandom);
        lut[i] = table_copy[i];
      end
      for (int r = 0; r < 20; r++) begin
        for (int s = 0; s < 3; s++) bend[s] = 5'($urandom);
        #1;
        for (int s = 0; s < 3; s++) begin
          checks++;
          if (code[s] !== table_copy[int'(bend[s])]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
