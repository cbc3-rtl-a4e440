// tb_stub_data_assembler: self-checking test of the five-line stub packet.
//
// Random addresses, bend codes and flags are presented every crossing; the
// eight bits of each line in the following crossing are collected and
// compared with the packet layout (lines 0-2 addresses, line 3 codes 1 and
// 2, line 4 timing bit, error, OR254, overflow, code 3), and the timing bit
// must be the only 1 in bit slot 0 of line 4 that is guaranteed every
// crossing.
`timescale 1ns / 1ps
module tb_stub_data_assembler;
  import cbc3_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, bx_en;
  logic [NSTUB-1:0][SADDR_W-1:0] addr = '0;
  logic [NSTUB-1:0][CODE_W-1:0]  code = '0;
  logic err = 1'b0, or254 = 1'b0, ovf = 1'b0;
  logic [4:0] sdo;
  int checks = 0, failures = 0;

  stub_data_assembler dut (.*);

  always #1.5625 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int slot = 0;
  assign bx_en = rst_n && (slot == 7);
  always @(posedge clk) if (rst_n) slot <= (slot + 1) % 8;

  logic [4:0][7:0] exp_pkt, got;
  int loaded = 0;

  always @(negedge clk) if (rst_n) begin
    for (int l = 0; l < 5; l++) got[l][7 - slot] = sdo[l];
    if (slot == 7) begin
      if (loaded > 0) begin
        checks++;
        if (got !== exp_pkt) begin
          failures++;
          if (failures < 10) $display("crossing %0d: got %h expected %h", loaded, got, exp_pkt);
        end
      end
      // the inputs set in slot 0 are loaded at the next edge
      exp_pkt[0] = addr[0];
      exp_pkt[1] = addr[1];
      exp_pkt[2] = addr[2];
      exp_pkt[3] = {code[0], code[1]};
      exp_pkt[4] = {1'b1, err, or254, ovf, code[2]};
      loaded++;
    end
    if (slot == 0) begin
      for (int k = 0; k < 3; k++) begin
        addr[k] = 8'($urandom);
        code[k] = 4'($urandom);
      end
      {err, or254, ovf} = 3'($urandom);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (loaded == 300);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
