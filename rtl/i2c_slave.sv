// i2c_slave: slave of the I2C-like slow-control bus.
//
// SDA and SCL are open-drain lines pulled up off chip. The slave samples
// both with the system clock (which must run at least 8 times faster than
// SCL) through two-flop synchronisers, and pulls SDA low by raising
// sda_oe_o. Its 7-bit device address is {DEV_ID, chip_addr_i}: three bits
// come from hard-wired pads, so up to eight chips share one bus.
//
// Transfers (16-bit register pointer, 8-bit registers, auto-increment):
//   write: S  addr+W A  ptr[15:8] A  ptr[7:0] A  data A  data A ... P
//   read : S  addr+W A  ptr[15:8] A  ptr[7:0] A  Sr addr+R A  data A ... data N P
// reg_wr_o pulses for one clock with reg_addr_o / reg_wdata_o after the 8th
// bit of each data byte; reg_rdata_i is read combinationally at reg_addr_o.
// The open-drain two-wire bus and the hard-wired addresses follow the chip;
// the DEV_ID value, the pointer width and the transfer format are this
// design's choices.
module i2c_slave #(
  parameter logic [3:0] DEV_ID = 4'b0101
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scl_i,
  input  logic        sda_i,
  output logic        sda_oe_o,
  input  logic [2:0]  chip_addr_i,
  output logic [15:0] reg_addr_o,
  output logic        reg_wr_o,
  output logic [7:0]  reg_wdata_o,
  input  logic [7:0]  reg_rdata_i
);
  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_ACK, S_WRITE, S_READ, S_RACK} state_t;
  state_t      state;
  logic [2:0]  scl_s, sda_s;
  logic        scl_rise, scl_fall, start, stop, sda;
  logic [7:0]  shreg, txbyte;
  logic [3:0]  bitcnt;
  logic [1:0]  bytecnt;
  logic        rw, mack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= '1;
      sda_s <= '1;
    end else begin
      scl_s <= {scl_s[1:0], scl_i};
      sda_s <= {sda_s[1:0], sda_i};
    end
  end

  assign sda      = sda_s[1];
  assign scl_rise =  scl_s[1] & ~scl_s[2];
  assign scl_fall = ~scl_s[1] &  scl_s[2];
  assign start    =  scl_s[1] &  scl_s[2] &  sda_s[2] & ~sda_s[1];
  assign stop     =  scl_s[1] &  scl_s[2] & ~sda_s[2] &  sda_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      sda_oe_o    <= 1'b0;
      shreg       <= '0;
      txbyte      <= '0;
      bitcnt      <= '0;
      bytecnt     <= '0;
      rw          <= 1'b0;
      mack        <= 1'b0;
      reg_addr_o  <= '0;
      reg_wr_o    <= 1'b0;
      reg_wdata_o <= '0;
    end else begin
      reg_wr_o <= 1'b0;
      if (start) begin
        state    <= S_ADDR;
        bitcnt   <= '0;
        sda_oe_o <= 1'b0;
      end else if (stop) begin
        state    <= S_IDLE;
        sda_oe_o <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_ADDR: begin
            if (scl_rise) begin
              shreg  <= {shreg[6:0], sda};
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_fall && bitcnt == 4'd8) begin
              if (shreg[7:1] == {DEV_ID, chip_addr_i}) begin
                sda_oe_o <= 1'b1;
                rw       <= shreg[0];
                if (!shreg[0]) bytecnt <= '0;
                state    <= S_ACK;
              end else begin
                state <= S_IDLE;
              end
            end
          end
          S_ACK: begin
            if (scl_fall) begin
              bitcnt <= '0;
              if (rw) begin
                txbyte   <= reg_rdata_i;
                sda_oe_o <= ~reg_rdata_i[7];
                state    <= S_READ;
              end else begin
                sda_oe_o <= 1'b0;
                state    <= S_WRITE;
              end
            end
          end
          S_WRITE: begin
            if (scl_rise) begin
              shreg  <= {shreg[6:0], sda};
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_fall && bitcnt == 4'd8) begin
              unique case (bytecnt)
                2'd0: reg_addr_o[15:8] <= shreg;
                2'd1: reg_addr_o[7:0]  <= shreg;
                default: begin
                  reg_wr_o    <= 1'b1;
                  reg_wdata_o <= shreg;
                end
              endcase
              if (bytecnt != 2'd3) bytecnt <= bytecnt + 1'b1;
              sda_oe_o <= 1'b1;
              state    <= S_ACK;
            end
          end
          S_READ: begin
            if (scl_rise) begin
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_fall) begin
              if (bitcnt == 4'd8) begin
                sda_oe_o <= 1'b0;
                state    <= S_RACK;
              end else begin
                sda_oe_o <= ~txbyte[3'd7 - bitcnt[2:0]];
              end
            end
          end
          S_RACK: begin
            if (scl_rise) begin
              mack <= ~sda;
              if (!sda) reg_addr_o <= reg_addr_o + 1'b1;
            end else if (scl_fall) begin
              if (mack) begin
                bitcnt   <= '0;
                txbyte   <= reg_rdata_i;
                sda_oe_o <= ~reg_rdata_i[7];
                state    <= S_READ;
              end else begin
                state <= S_IDLE;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
      // Pointer auto-increment after each written data byte.
      if (reg_wr_o) reg_addr_o <= reg_addr_o + 1'b1;
    end
  end
endmodule
