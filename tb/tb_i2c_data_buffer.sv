// Testbench of the data buffer.  Random pushes and pops, including pushes
// when full, pops when empty and both in one clock, are applied for 3000
// clocks and dout, empty, full and count are compared every clock with a
// queue that models the expected first-in first-out behaviour.
`timescale 1ns/1ps
module tb_i2c_data_buffer;
  localparam int unsigned DEPTH = 8;

  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic       push, pop, empty, full;
  logic [7:0] din, dout;
  logic [3:0] count;

  i2c_data_buffer #(.WIDTH(8), .DEPTH(DEPTH)) dut (
    .clk, .rst, .push, .din, .pop, .dout, .empty, .full, .count);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] model [$];
  int n_full_push = 0, n_empty_pop = 0, n_both = 0;

  initial begin
    rst = 1; push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(empty && !full && count == 0, "empty after reset");
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // phases biased toward filling, then toward draining
      int bias;
      logic p, q;
      logic [7:0] d;
      bit can_pop, can_push;
      bias = ((cyc / 200) % 2 == 0) ? 70 : 30;
      p = ($urandom % 100) < bias;
      q = ($urandom % 100) < (100 - bias);
      d = 8'($urandom);
      push <= p; pop <= q; din <= d;
      @(posedge clk); #1;
      // model update with the values the buffer sampled
      begin
        can_pop  = q && model.size() > 0;
        can_push = p && (model.size() < DEPTH || can_pop);
        if (p && model.size() == DEPTH && !can_pop) n_full_push++;
        if (q && model.size() == 0) n_empty_pop++;
        if (can_pop && can_push) n_both++;
        if (can_pop) void'(model.pop_front());
        if (can_push) model.push_back(d);
      end
      check(count == 4'(model.size()), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) check(dout == model[0], "head word on dout");
    end
    check(n_full_push > 0 && n_empty_pop > 0 && n_both > 0, "corner cases reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
