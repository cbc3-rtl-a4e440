// i2c_master_model: behavioural I2C controller used by the testbenches.
//
// Drives SCL and pulls SDA low through `sda_low` (open drain: the bus is the
// wired AND of all pull-downs, formed outside). Bit period 1 us (1 MHz).
// Tasks: write_regs sends START, device address + W, register address,
// the data bytes, STOP; read_regs sends START, device address + W,
// register address, repeated START, device address + R, reads n bytes
// (ACK on all but the last), STOP. `nacks` counts missing target ACKs.
`timescale 1ns / 1ps
module i2c_master_model #(
  parameter realtime HALF = 500ns
) (
  output logic scl,
  output logic sda_low,
  input  logic sda_bus
);

  int nacks = 0;

  initial begin
    scl = 1'b1;
    sda_low = 1'b0;
  end

  task automatic start_cond();
    sda_low = 1'b0;
    #(HALF / 2);
    scl = 1'b1;
    #(HALF / 2);
    sda_low = 1'b1;          // SDA falls while SCL high
    #(HALF / 2);
    scl = 1'b0;
    #(HALF / 2);
  endtask

  task automatic stop_cond();
    sda_low = 1'b1;
    #(HALF / 2);
    scl = 1'b1;
    #(HALF / 2);
    sda_low = 1'b0;          // SDA rises while SCL high
    #HALF;
  endtask

  task automatic bit_out(input logic b);
    sda_low = !b;
    #(HALF / 2);
    scl = 1'b1;
    #HALF;
    scl = 1'b0;
    #(HALF / 2);
  endtask

  task automatic bit_in(output logic b);
    sda_low = 1'b0;
    #(HALF / 2);
    scl = 1'b1;
    #(HALF / 2);
    b = sda_bus;
    #(HALF / 2);
    scl = 1'b0;
    #(HALF / 2);
  endtask

  task automatic byte_out(input logic [7:0] d);
    logic ack;
    for (int i = 7; i >= 0; i--) bit_out(d[i]);
    bit_in(ack);
    if (ack) nacks++;
  endtask

  task automatic byte_in(output logic [7:0] d, input logic ack);
    for (int i = 7; i >= 0; i--) bit_in(d[i]);
    bit_out(!ack);
  endtask

  task automatic write_regs(input logic [6:0] dev, input logic [7:0] reg_addr,
                            input logic [7:0] data[$]);
    start_cond();
    byte_out({dev, 1'b0});
    byte_out(reg_addr);
    foreach (data[i]) byte_out(data[i]);
    stop_cond();
  endtask

  task automatic read_regs(input logic [6:0] dev, input logic [7:0] reg_addr,
                           input int n, output logic [7:0] data[$]);
    logic [7:0] d;
    data.delete();
    start_cond();
    byte_out({dev, 1'b0});
    byte_out(reg_addr);
    start_cond();            // repeated START
    byte_out({dev, 1'b1});
    for (int i = 0; i < n; i++) begin
      byte_in(d, i != n - 1);
      data.push_back(d);
    end
    stop_cond();
  endtask

endmodule
