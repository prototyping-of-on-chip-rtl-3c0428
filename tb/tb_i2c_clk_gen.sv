// Testbench of the SCL clock generator.  With en low SCL must rest high
// with no strobes.  After en rises the waveform is compared, clock by
// clock, with the closed form: j clocks after en is first seen the phase is
// (2 + (j + 1) / QUARTER) mod 4 (en is registered on the clock it is
// first seen, j = 0), SCL is high in phases 1 and 2, tick_low marks
// the first clock of phase 0 and tick_high the first clock of phase 2.
// Finally en is dropped in phase 2 and SCL must stay high.
`timescale 1ns/1ps
module tb_i2c_clk_gen;
  localparam int unsigned Q = 5;

  logic clk = 0, rst, en;
  logic scl, tick_low, tick_high;
  always #5 clk = ~clk;

  i2c_clk_gen #(.QUARTER(Q)) dut (.clk, .rst, .en, .scl, .tick_low, .tick_high);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ph, n_low, n_high;
    rst = 1; en = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 20; i++) begin
      @(posedge clk); #1;
      check(scl && !tick_low && !tick_high, "idle: SCL high, no strobes");
    end
    en <= 1;
    @(posedge clk); #1;                // edge e0: en registered from here on
    check(scl, "SCL high right after enable");
    n_low = 0; n_high = 0;
    for (int j = 1; j < 12*Q; j++) begin
      @(posedge clk); #1;
      ph = (2 + (j + 1) / Q) % 4;
      check(scl == (ph == 1 || ph == 2), $sformatf("scl at j=%0d", j));
      check(tick_low  == ((j + 1) % Q == 0 && ph == 0), $sformatf("tick_low at j=%0d", j));
      check(tick_high == ((j + 1) % Q == 0 && ph == 2), $sformatf("tick_high at j=%0d", j));
      n_low += tick_low; n_high += tick_high;
    end
    check(n_low == 3 && n_high == 3, "strobe counts over 3 SCL periods");
    // the last sample is the first clock of phase 2: drop en there.
    en <= 0;
    for (int i = 0; i < 4*Q; i++) begin
      @(posedge clk); #1;
      check(scl && !tick_low && !tick_high, "SCL stays high after disable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
