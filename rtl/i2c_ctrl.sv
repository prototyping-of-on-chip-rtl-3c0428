// I2C control module: sequences one transfer with the EEPROM.
//
// Write (cmd.rw = 0):  START, device select + W, ACK?, byte address, ACK?,
//   then cmd.nbytes data bytes taken from the data buffer, each followed by
//   an ACK check, then STOP.  One byte is a byte write; several bytes are a
//   multibyte or page write, the EEPROM incrementing its own address.
// Read (cmd.rw = 1):   START, device select + W, ACK?, byte address, ACK?,
//   repeated START, device select + R, ACK?, then cmd.nbytes data bytes
//   pushed into the data buffer; the master acknowledges each byte but the
//   last, which it answers with NACK, then STOP.
// A missing ACK at any ACK check ends the transfer at once with a STOP,
// which frees the bus, and reports nack together with done.
//
// Before START the module watches SDA and waits until it has been high for
// a full SCL quarter (bus free).  START is made by pulling SDA low while
// SCL is still high and then enabling the clock generator; STOP by pulling
// SDA low in the middle of SCL low and releasing it in the middle of the
// following SCL high, after which the clock generator is stopped with SCL
// high.  After STOP the bus is left free for one more quarter before the
// next START can follow.  Bit timing comes from the clock generator's
// tick_low/tick_high strobes; the bytes are shifted by the address block.
//
// The order of the write branch, the ACK checks after every byte, the
// release of the bus on a missing ACK and the bus-free check follow the
// original description.  The repeated START that places the byte address before the
// read device select, the master's ACK/NACK on read data and the bus-free
// timing are this design's choice, made so that the read branch works with
// a standard 24C02 EEPROM.
module i2c_ctrl
  import i2c_pkg::*;
#(
  parameter int unsigned QUARTER = 125
) (
  input  logic        clk,
  input  logic        rst,
  // register
  input  logic        go,
  input  i2c_cmd_t    cmd,
  output logic        done,
  output logic        nack,
  // bus and clock generator
  input  logic        sda_in,
  input  logic        tick_low,
  input  logic        tick_high,
  output logic        clk_en,
  output logic        sda_low,
  // address block (shifter)
  output logic        sh_load,
  output logic [7:0]  sh_tx_byte,
  output logic        sh_rx_mode,
  output logic        sh_ack_out,
  input  logic        sh_done,
  input  logic        sh_ack_in,
  // data buffer
  input  logic        buf_empty,
  input  logic [7:0]  buf_dout,
  output logic        buf_pop,
  output logic        buf_push,   // store sh_rx_byte in the data buffer
  // observation
  output ctrl_state_t state
);

  localparam int unsigned TW = (QUARTER > 1) ? $clog2(QUARTER + 1) : 1;

  logic [TW-1:0] tmr;
  logic [3:0]    remaining;
  logic          rd_phase;    // device select after the repeated START

  // Combinational requests to the shifter and the data buffer.
  always_comb begin
    sh_load    = 1'b0;
    sh_tx_byte = 8'h00;
    sh_rx_mode = 1'b0;
    sh_ack_out = 1'b0;
    buf_pop    = 1'b0;
    buf_push   = 1'b0;
    unique case (state)
      S_WAIT_FREE: begin
        if (sda_in && tmr == TW'(QUARTER - 1)) begin
          sh_load    = 1'b1;
          sh_tx_byte = {cmd.dev_addr, RW_WRITE};
        end
      end
      S_DEV: begin
        if (sh_done && !sh_ack_in) begin
          sh_load = 1'b1;
          if (!rd_phase) begin
            sh_tx_byte = cmd.byte_addr;
          end else if (remaining != 4'd0) begin
            sh_rx_mode = 1'b1;
            sh_ack_out = (remaining != 4'd1);
          end else begin
            sh_load = 1'b0;
          end
        end
      end
      S_BADDR: begin
        if (sh_done && !sh_ack_in && cmd.rw == RW_WRITE &&
            remaining != 4'd0 && !buf_empty) begin
          sh_load    = 1'b1;
          sh_tx_byte = buf_dout;
          buf_pop    = 1'b1;
        end
      end
      S_RSTART: begin
        if (tick_high) begin
          sh_load    = 1'b1;
          sh_tx_byte = {cmd.dev_addr, RW_READ};
        end
      end
      S_WDATA: begin
        if (sh_done && !sh_ack_in && remaining > 4'd1 && !buf_empty) begin
          sh_load    = 1'b1;
          sh_tx_byte = buf_dout;
          buf_pop    = 1'b1;
        end
      end
      S_RDATA: begin
        if (sh_done) begin
          buf_push = 1'b1;
          if (remaining > 4'd1) begin
            sh_load    = 1'b1;
            sh_rx_mode = 1'b1;
            sh_ack_out = (remaining != 4'd2);
          end
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      tmr       <= '0;
      remaining <= '0;
      rd_phase  <= 1'b0;
      clk_en    <= 1'b0;
      sda_low   <= 1'b0;
      done      <= 1'b0;
      nack      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          clk_en  <= 1'b0;
          sda_low <= 1'b0;
          tmr     <= '0;
          if (go) begin
            state     <= S_WAIT_FREE;
            nack      <= 1'b0;
            rd_phase  <= 1'b0;
            remaining <= cmd.nbytes;
          end
        end

        S_WAIT_FREE: begin
          if (!sda_in) begin
            tmr <= '0;
          end else if (tmr == TW'(QUARTER - 1)) begin
            sda_low <= 1'b1;        // START: SDA falls while SCL is high
            clk_en  <= 1'b1;
            state   <= S_DEV;
          end else begin
            tmr <= tmr + TW'(1);
          end
        end

        S_DEV: begin
          if (tick_low) sda_low <= 1'b0;   // the shifter now drives SDA
          if (sh_done) begin
            if (sh_ack_in)                    begin nack <= 1'b1; state <= S_STOP; end
            else if (!rd_phase)               state <= S_BADDR;
            else if (remaining != 4'd0)       state <= S_RDATA;
            else                              state <= S_STOP;
          end
        end

        S_BADDR: begin
          if (sh_done) begin
            if (sh_ack_in)                    begin nack <= 1'b1; state <= S_STOP; end
            else if (cmd.rw == RW_READ)       state <= S_RSTART;
            else if (remaining != 4'd0 && !buf_empty) state <= S_WDATA;
            else                              state <= S_STOP;
          end
        end

        S_RSTART: begin
          if (tick_low)  sda_low <= 1'b0;   // release SDA while SCL is low
          if (tick_high) begin
            sda_low  <= 1'b1;               // repeated START
            rd_phase <= 1'b1;
            state    <= S_DEV;
          end
        end

        S_WDATA: begin
          if (sh_done) begin
            remaining <= remaining - 4'd1;
            if (sh_ack_in)                    begin nack <= 1'b1; state <= S_STOP; end
            else if (remaining > 4'd1 && !buf_empty) state <= S_WDATA;
            else                              state <= S_STOP;
          end
        end

        S_RDATA: begin
          if (sh_done) begin
            remaining <= remaining - 4'd1;
            if (remaining <= 4'd1) state <= S_STOP;
          end
        end

        S_STOP: begin
          if (tick_low) sda_low <= 1'b1;
          if (tick_high) begin
            sda_low <= 1'b0;                // STOP: SDA rises while SCL is high
            clk_en  <= 1'b0;
            tmr     <= '0;
            state   <= S_BUSFREE;
          end
        end

        S_BUSFREE: begin
          if (tmr == TW'(QUARTER - 1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            tmr <= tmr + TW'(1);
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
