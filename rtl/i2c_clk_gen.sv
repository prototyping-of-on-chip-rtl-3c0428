// Clock generator: derives SCL from the system clock.
//
// Each SCL period is four quarters of QUARTER system clocks.  A 2-bit phase
// walks 2 -> 3 -> 0 -> 1 -> 2 ...; SCL is high in phases 1 and 2 and low in
// phases 3 and 0.  tick_low pulses for one clock when phase 0 begins (the
// middle of SCL low, where SDA may change) and tick_high when phase 2
// begins (the middle of SCL high, where SDA is sampled).
//
// While en is low the generator rests in phase 2 with SCL high, which is
// the idle bus level.  When the control module has pulled SDA low for a
// START it raises en; SCL then stays high for one more quarter (START hold
// time) before its first falling edge.  Dropping en during phase 2 leaves
// SCL high, which the STOP condition relies on.
//
// Only the existence of a clock generator that the control module enables
// is taken from the original description; the quarter-period scheme and the divider
// value are this design's choice (QUARTER = 125 gives 100 kHz SCL from a
// 50 MHz clock).
module i2c_clk_gen #(
  parameter int unsigned QUARTER = 125
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic scl,
  output logic tick_low,
  output logic tick_high
);

  localparam int unsigned CW = (QUARTER > 1) ? $clog2(QUARTER) : 1;

  logic [CW-1:0] cnt;
  logic [1:0]    phase;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      cnt       <= '0;
      phase     <= 2'd2;
      tick_low  <= 1'b0;
      tick_high <= 1'b0;
    end else begin
      tick_low  <= 1'b0;
      tick_high <= 1'b0;
      if (cnt == CW'(QUARTER - 1)) begin
        cnt   <= '0;
        phase <= phase + 2'd1;
        if (phase == 2'd3) tick_low  <= 1'b1;
        if (phase == 2'd1) tick_high <= 1'b1;
      end else begin
        cnt <= cnt + CW'(1);
      end
    end
  end

  assign scl = (phase == 2'd1) || (phase == 2'd2);

endmodule
