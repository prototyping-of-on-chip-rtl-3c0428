// Testbench of the address block (byte shifter).  A small bench clock
// issues tick_low and tick_high alternately, four clocks apart, as the
// clock generator would.  A bench slave samples the master's SDA at every
// tick_high and, when its turn comes, drives SDA between tick_low and
// tick_high.  Checked: MSB-first transmission, SDA released on the ninth
// clock, ACK/NACK reporting, reception of a byte, the master's ACK/NACK on
// the ninth clock, the single done pulse, and that load alone never moves
// SDA.
`timescale 1ns/1ps
module tb_i2c_shifter;
  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic       load, rx_mode, ack_out, tick_low, tick_high, sda_in;
  logic [7:0] tx_byte, rx_byte;
  logic       sda_low, ack_in, done;
  logic       slave_low;

  assign sda_in = !(sda_low || slave_low);

  i2c_shifter dut (.clk, .rst, .load, .tx_byte, .rx_mode, .ack_out,
                   .tick_low, .tick_high, .sda_in, .sda_low, .rx_byte,
                   .ack_in, .done);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One SCL clock of the bench: tick_low, slave drive, tick_high.
  // Returns the SDA level seen at tick_high.
  task automatic bit_clock(input bit slave_drive_low, output bit seen, output bit done_seen);
    done_seen = 0;
    @(posedge clk); tick_low <= 1;
    @(posedge clk); tick_low <= 0;
    @(posedge clk); slave_low <= slave_drive_low;
    @(posedge clk);
    @(posedge clk); tick_high <= 1;
    @(posedge clk); tick_high <= 0; #1; seen = sda_in; done_seen = done;
    @(posedge clk); #1; done_seen |= done;
    @(posedge clk);
  endtask

  task automatic send(input logic [7:0] b, input bit slave_ack);
    bit s, d;
    logic [7:0] got;
    int dones = 0;
    @(posedge clk); load <= 1; tx_byte <= b; rx_mode <= 0;
    @(posedge clk); load <= 0; #1;
    for (int i = 0; i < 8; i++) begin
      bit_clock(0, s, d);
      got = {got[6:0], s};
      dones += d;
    end
    bit_clock(slave_ack, s, d);
    dones += d;
    check(got == b, $sformatf("sent %h got %h", b, got));
    check(dones == 1, "one done pulse per byte");
    check(ack_in == !slave_ack, "ack_in reports the ninth bit");
    check(!sda_low, "SDA released on the ack clock");
    slave_low <= 0;
  endtask

  task automatic receive(input logic [7:0] b, input bit mack);
    bit s, d;
    int dones = 0;
    @(posedge clk); load <= 1; rx_mode <= 1; ack_out <= mack; tx_byte <= 8'h00;
    @(posedge clk); load <= 0;
    for (int i = 0; i < 8; i++) begin
      bit_clock(!b[7-i], s, d);
      check(!sda_low, "SDA released while receiving");
      dones += d;
    end
    slave_low <= 0;
    bit_clock(0, s, d);
    dones += d;
    check(rx_byte == b, $sformatf("received %h expected %h", rx_byte, b));
    check(s == !mack, "master ACK/NACK on the ninth clock");
    check(sda_low == mack, "sda_low holds the master's acknowledge");
    check(dones == 1, "one done pulse per received byte");
  endtask

  initial begin
    bit s, d;
    rst = 1; load = 0; tick_low = 0; tick_high = 0; rx_mode = 0; ack_out = 0;
    tx_byte = 0; slave_low = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(!sda_low && !done, "reset state");
    send(8'b1010_0010, 1);     // device select 1010001 + W, acknowledged
    send(8'h01, 1);
    send(8'b1111_1001, 0);     // not acknowledged
    for (int k = 0; k < 4; k++) send(8'($urandom), 1'($urandom));
    receive(8'h5C, 1);
    // load while the master is holding an ACK low must not move SDA
    @(posedge clk); load <= 1; rx_mode <= 0; tx_byte <= 8'h00;
    @(posedge clk); load <= 0; #1;
    check(sda_low, "load leaves SDA as it was");
    for (int i = 0; i < 9; i++) bit_clock(i == 8, s, d);
    receive(8'($urandom), 0);
    for (int k = 0; k < 3; k++) receive(8'($urandom), 1);
    // idle block releases SDA at the next tick_low
    bit_clock(0, s, d);
    check(!sda_low && s, "idle block releases SDA");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
