// tb_i2c_slave: self-checking test of the I2C target against a behavioural
// I2C controller at 1 MHz.
//
// A 256-byte register array in the testbench stands for the register file.
// The test writes bursts of random bytes at random start addresses (with
// address wrap-around), reads them back in bursts, checks every write strobe
// address and value against what was sent, and checks that a transfer to
// another device address is not acknowledged and writes nothing.
`timescale 1ns / 1ps
module tb_i2c_slave;
  logic clk = 1'b0, rst_n = 1'b0;
  logic scl, sda_low, sda_oe, sda_bus;
  logic [6:0] chip_addr = 7'h5a;
  logic [7:0] reg_addr, wdata, rdata;
  logic wr_en, rd_en;
  int checks = 0, failures = 0;

  assign sda_bus = !(sda_low || sda_oe);

  i2c_slave dut (.clk, .rst_n, .scl, .sda_in(sda_bus), .sda_oe, .chip_addr,
                 .reg_addr, .wr_en, .wdata, .rd_en, .rdata);
  i2c_master_model u_m (.scl, .sda_low, .sda_bus);

  always #1.5625 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] regs [256];
  logic [7:0] model [256];
  logic [7:0] wq[$];          // expected (address, data) pairs of writes
  logic [7:0] aq[$];
  int writes = 0;

  assign rdata = regs[reg_addr];
  always @(posedge clk) if (rst_n && wr_en) begin
    regs[reg_addr] <= wdata;
    writes++;
    checks++;
    if (aq.size() == 0 || reg_addr != aq[0] || wdata != wq[0]) begin
      failures++;
      $display("unexpected write %h <= %h", reg_addr, wdata);
    end
    if (aq.size() != 0) begin
      void'(aq.pop_front());
      void'(wq.pop_front());
    end
  end

  initial begin
    logic [7:0] d[$], r[$];
    for (int i = 0; i < 256; i++) begin
      regs[i] = '0;
      model[i] = '0;
    end
    #20ns;
    rst_n = 1'b1;
    #2us;
    for (int t = 0; t < 8; t++) begin
      logic [7:0] a;
      int n;
      a = (t == 3) ? 8'hfe : 8'($urandom);
      n = 1 + $urandom % 6;
      d.delete();
      for (int i = 0; i < n; i++) begin
        d.push_back(8'($urandom));
        aq.push_back(a + 8'(i));
        wq.push_back(d[i]);
        model[a + 8'(i)] = d[i];
      end
      u_m.write_regs(7'h5a, a, d);
      u_m.read_regs(7'h5a, a, n, r);
      for (int i = 0; i < n; i++) begin
        checks++;
        if (r[i] !== model[a + 8'(i)]) begin
          failures++;
          $display("read %h: %h expected %h", a + 8'(i), r[i], model[a + 8'(i)]);
        end
      end
    end
    checks++;
    if (u_m.nacks != 0) failures++;
    // wrong device address: no ACK, no write
    d.delete();
    d.push_back(8'h77);
    u_m.write_regs(7'h11, 8'h10, d);
    checks += 2;
    if (u_m.nacks == 0) failures++;
    if (aq.size() != 0) failures++;
    $display("writes %0d", writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
