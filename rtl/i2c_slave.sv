// i2c_slave: I2C target through which the configuration registers are
// written and read (open-drain, 1 MHz bus).
//
// Protocol (standard register-pointer form): START, device address with the
// R/W bit, ACK; for a write, a register address byte that loads the pointer,
// then data bytes, each written to the pointer, acknowledged, and followed
// by an increment of the pointer; for a read, data bytes from the pointer,
// incremented after each byte the controller acknowledges, until it sends
// NACK. STOP or a repeated START ends a transfer. The target never stretches
// the clock.
//
// SCL and SDA go through two-flop synchronisers clocked at 320 MHz, so the
// bus is oversampled many times per bit. Data is taken on SCL rising edges;
// SDA is only driven (pulled low through `sda_oe`) after SCL falling edges.
// `wr_en` is a one-cycle strobe with `reg_addr`/`wdata`; `rd_en` is a
// one-cycle strobe when `rdata` is sampled for a read byte.
`timescale 1ns / 1ps
module i2c_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl,
  input  logic       sda_in,
  output logic       sda_oe,
  input  logic [6:0] chip_addr,
  output logic [7:0] reg_addr,
  output logic       wr_en,
  output logic [7:0] wdata,
  output logic       rd_en,
  input  logic [7:0] rdata
);

  typedef enum logic [3:0] {
    S_IDLE, S_ADDR, S_ACK_ADDR, S_REG, S_ACK_REG, S_WDATA, S_ACK_W,
    S_RDATA, S_RACK
  } state_t;

  state_t     state;
  logic [2:0] scl_sync, sda_sync;
  logic       scl_rise, scl_fall, start_c, stop_c;
  logic [3:0] bitcnt;
  logic [7:0] shreg;
  logic       rw, macked;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      scl_sync <= '1;
      sda_sync <= '1;
    end else begin
      scl_sync <= {scl_sync[1:0], scl};
      sda_sync <= {sda_sync[1:0], sda_in};
    end

  assign scl_rise = scl_sync[1] && !scl_sync[2];
  assign scl_fall = !scl_sync[1] && scl_sync[2];
  assign start_c  = scl_sync[1] && scl_sync[2] && !sda_sync[1] && sda_sync[2];
  assign stop_c   = scl_sync[1] && scl_sync[2] && sda_sync[1] && !sda_sync[2];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= S_IDLE;
      bitcnt   <= '0;
      shreg    <= '0;
      rw       <= 1'b0;
      macked   <= 1'b0;
      sda_oe   <= 1'b0;
      reg_addr <= '0;
      wr_en    <= 1'b0;
      wdata    <= '0;
      rd_en    <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      rd_en <= 1'b0;
      if (start_c) begin
        state  <= S_ADDR;
        bitcnt <= '0;
        sda_oe <= 1'b0;
      end else if (stop_c) begin
        state  <= S_IDLE;
        sda_oe <= 1'b0;
      end else if (scl_rise) begin
        unique case (state)
          S_ADDR, S_REG, S_WDATA: begin
            shreg  <= {shreg[6:0], sda_sync[1]};
            bitcnt <= bitcnt + 4'd1;
          end
          S_RACK: begin
            macked <= !sda_sync[1];
            if (!sda_sync[1]) reg_addr <= reg_addr + 8'd1;
          end
          default: ;
        endcase
      end else if (scl_fall) begin
        unique case (state)
          S_ADDR: if (bitcnt == 4'd8) begin
            if (shreg[7:1] == chip_addr) begin
              rw     <= shreg[0];
              sda_oe <= 1'b1;
              state  <= S_ACK_ADDR;
            end else begin
              state  <= S_IDLE;
            end
          end
          S_REG: if (bitcnt == 4'd8) begin
            reg_addr <= shreg;
            sda_oe   <= 1'b1;
            state    <= S_ACK_REG;
          end
          S_WDATA: if (bitcnt == 4'd8) begin
            wdata  <= shreg;
            wr_en  <= 1'b1;
            sda_oe <= 1'b1;
            state  <= S_ACK_W;
          end
          S_ACK_ADDR: begin
            bitcnt <= '0;
            if (rw) begin
              shreg  <= rdata;
              rd_en  <= 1'b1;
              sda_oe <= !rdata[7];
              state  <= S_RDATA;
            end else begin
              sda_oe <= 1'b0;
              state  <= S_REG;
            end
          end
          S_ACK_REG: begin
            sda_oe <= 1'b0;
            bitcnt <= '0;
            state  <= S_WDATA;
          end
          S_ACK_W: begin
            sda_oe   <= 1'b0;
            bitcnt   <= '0;
            reg_addr <= reg_addr + 8'd1;
            state    <= S_WDATA;
          end
          S_RDATA: begin
            if (bitcnt == 4'd7) begin
              sda_oe <= 1'b0;
              state  <= S_RACK;
            end else begin
              sda_oe <= !shreg[6];
              shreg  <= {shreg[6:0], 1'b0};
              bitcnt <= bitcnt + 4'd1;
            end
          end
          S_RACK: begin
            if (macked) begin
              shreg  <= rdata;
              rd_en  <= 1'b1;
              sda_oe <= !rdata[7];
              bitcnt <= '0;
              state  <= S_RDATA;
            end else begin
              state  <= S_IDLE;
            end
          end
          default: ;
        endcase
      end
    end

endmodule
