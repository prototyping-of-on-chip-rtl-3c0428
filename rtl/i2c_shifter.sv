// Address block: serialises one byte plus its acknowledge bit on SDA.
//
// A transfer slot is nine SCL clocks: eight data bits, most significant
// first, then the acknowledge clock.  In transmit mode (rx_mode = 0) the
// block drives each bit of tx_byte and releases SDA for the ninth clock so
// that the slave can pull it low; the level sampled there is returned as
// ack_in (0 = ACK, 1 = no ACK).  In receive mode it releases SDA for eight
// clocks, shifts the sampled bits into rx_byte and, on the ninth clock,
// drives the master's acknowledge (ack_out = 1 pulls SDA low, 0 leaves it
// high as a NACK).
//
// Timing: load arms the block; its SDA output changes only on tick_low
// (middle of SCL low) and SDA is sampled on tick_high (middle of SCL
// high).  done pulses for one clock at the tick_high of the ninth clock,
// leaving two SCL quarters for the control module to load the next byte.
// A load never changes SDA by itself, so loading while SCL is high cannot
// create a false START or STOP.  When the block is idle it releases SDA at
// the next tick_low.
//
// The original description says the address block sends the address byte serially and
// that one bit is sent per SCL clock, MSB first, with the receiver pulling
// SDA low on the ninth clock.  Using the same block for the byte address
// and the data bytes, in both directions, is this design's choice.
module i2c_shifter (
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic [7:0] tx_byte,
  input  logic       rx_mode,
  input  logic       ack_out,
  input  logic       tick_low,
  input  logic       tick_high,
  input  logic       sda_in,
  output logic       sda_low,
  output logic [7:0] rx_byte,
  output logic       ack_in,
  output logic       done
);

  logic       active;
  logic       rx;
  logic       ack_val;
  logic [3:0] bitcnt;     // 0..7 data bits, 8 = acknowledge clock
  logic [7:0] sreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      active  <= 1'b0;
      rx      <= 1'b0;
      ack_val <= 1'b0;
      bitcnt  <= '0;
      sreg    <= '0;
      sda_low <= 1'b0;
      ack_in  <= 1'b1;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        active  <= 1'b1;
        rx      <= rx_mode;
        ack_val <= ack_out;
        bitcnt  <= '0;
        sreg    <= rx_mode ? 8'h00 : tx_byte;
      end else if (tick_low) begin
        if (!active)             sda_low <= 1'b0;
        else if (bitcnt == 4'd8) sda_low <= rx ? ack_val : 1'b0;
        else                     sda_low <= rx ? 1'b0 : ~sreg[7];
      end else if (tick_high && active) begin
        if (bitcnt == 4'd8) begin
          ack_in <= sda_in;
          active <= 1'b0;
          done   <= 1'b1;
        end else begin
          sreg   <= {sreg[6:0], rx ? sda_in : 1'b0};
          bitcnt <= bitcnt + 4'd1;
        end
      end
    end
  end

  assign rx_byte = sreg;

endmodule
