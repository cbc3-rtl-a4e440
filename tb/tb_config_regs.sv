// tb_config_regs: self-checking test of the 330-register file.
//
// Random writes through both pages are mirrored in a 330-entry model indexed
// by register number (page 0 address a -> a, page 1 address a -> 255 + a,
// address 0 -> 0 on both pages). The test checks read data, that page-1
// addresses above 74 read 0 and write nothing, that `regs` equals the model,
// and that every decoded setting in `cfg` matches its register bits.
`timescale 1ns / 1ps
module tb_config_regs;
  import cbc3_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0;
  logic [7:0] addr = '0, wdata = '0, rdata;
  cfg_t cfg;
  logic [NREG-1:0][7:0] regs;
  int checks = 0, failures = 0;

  config_regs dut (.*);

  always #1.5625 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] model [NREG];
  logic       page;

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic int index_of(input logic pg, input logic [7:0] a);
    if (a == 0 || !pg) return int'(a);
    return (int'(a) <= 74) ? 255 + int'(a) : -1;
  endfunction

  task automatic write(input logic [7:0] a, input logic [7:0] d);
    int idx;
    @(negedge clk);
    addr = a;
    wdata = d;
    wr_en = 1'b1;
    idx = index_of(page, a);
    if (idx >= 0) model[idx] = d;
    if (idx == 0) page = d[7];
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic read_check(input logic [7:0] a);
    int idx;
    @(negedge clk);
    addr = a;
    #0.5;
    idx = index_of(page, a);
    check(rdata == (idx >= 0 ? model[idx] : 8'h00), "read data");
  endtask

  initial begin
    for (int i = 0; i < int'(NREG); i++) model[i] = '0;
    page = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      logic [7:0] a;
      if (t % 50 == 0) write(8'h00, {1'($urandom), 7'($urandom)});   // switch page
      a = 8'($urandom);
      if (t % 2 == 0) write(a, 8'($urandom));
      read_check(8'($urandom));
      read_check(a);
    end
    for (int i = 0; i < int'(NREG); i++) check(regs[i] == model[i], "regs output");
    check(cfg.hip_count == model[1][2:0], "hip_count");
    check(cfg.latency == {model[3][0], model[2]}, "latency");
    check(cfg.window == model[4][3:0], "window");
    check(cfg.offset == model[5][3:0], "offset");
    check(cfg.dll_phase == model[6][4:0], "dll phase");
    for (int i = 0; i < 32; i++)
      check(cfg.lut[i] == (i % 2 ? model[7 + i / 2][7:4] : model[7 + i / 2][3:0]), "lut");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
