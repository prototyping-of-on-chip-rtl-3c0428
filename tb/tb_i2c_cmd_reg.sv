// Testbench of the command/status register: reset command (device address
// 1010001, write, byte address 0x01, one byte), command write, the one
// clock go pulse on start, busy until the control module reports done,
// commands and starts ignored while busy, done/nack_err status, and the
// clamp of the byte count to the buffer size.
`timescale 1ns/1ps
module tb_i2c_cmd_reg;
  import i2c_pkg::*;

  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic     cmd_we, start, ctrl_done, ctrl_nack, go, busy, done, nack_err;
  i2c_cmd_t cmd_in, cmd;

  i2c_cmd_reg #(.MAX_BYTES(8)) dut (.clk, .rst, .cmd_we, .cmd_in, .start,
    .ctrl_done, .ctrl_nack, .cmd, .go, .busy, .done, .nack_err);

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

  int go_count;
  always @(posedge clk) if (go) go_count++;

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    i2c_cmd_t c;
    go_count = 0;
    rst = 1; cmd_we = 0; start = 0; ctrl_done = 0; ctrl_nack = 0; cmd_in = '0;
    repeat (3) @(posedge clk);
    rst <= 0; tick();
    check(cmd.dev_addr == 7'b1010001 && cmd.rw == 1'b0 && cmd.byte_addr == 8'h01 &&
          cmd.nbytes == 4'd1, "reset command");
    check(!busy && !done && !nack_err && !go, "reset status");

    for (int k = 0; k < 20; k++) begin
      bit nk;
      int g0;
      nk = 1'($urandom);
      c.dev_addr = 7'($urandom); c.rw = 1'($urandom); c.byte_addr = 8'($urandom);
      c.nbytes = 4'($urandom);
      cmd_we <= 1; cmd_in <= c; tick(); cmd_we <= 0;
      check(cmd.dev_addr == c.dev_addr && cmd.rw == c.rw && cmd.byte_addr == c.byte_addr,
            "command stored");
      check(cmd.nbytes == ((c.nbytes > 8) ? 4'd8 : c.nbytes), "byte count clamped");
      g0 = go_count;
      start <= 1; tick(); start <= 0;
      check(go && busy && !done, "go pulse and busy");
      tick();
      check(!go, "go lasts one clock");
      // ignored while busy
      cmd_we <= 1; cmd_in <= ~c; start <= 1; tick(); cmd_we <= 0; start <= 0;
      check(cmd.byte_addr == c.byte_addr && cmd.dev_addr == c.dev_addr, "command held while busy");
      repeat (3) tick();
      check(go_count == g0 + 1 && busy, "start ignored while busy");
      ctrl_done <= 1; ctrl_nack <= nk; tick(); ctrl_done <= 0; ctrl_nack <= 0;
      check(!busy && done && nack_err == nk, "done and nack status");
      tick();
      check(done && nack_err == nk, "status held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
