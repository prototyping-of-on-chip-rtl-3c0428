// Testbench of the I2C control module.  The module is connected to the
// clock generator and the address block (QUARTER = 4 for speed), to a
// bench data buffer and to the ST24C02 model.  For each transfer the
// sequence of states is recorded and compared with the expected flow:
//   write:  IDLE WAIT_FREE DEV BADDR WDATA STOP BUSFREE IDLE
//   read:   IDLE WAIT_FREE DEV BADDR RSTART DEV RDATA STOP BUSFREE IDLE
//   NACK:   IDLE WAIT_FREE DEV STOP BUSFREE IDLE
//   address only / data NACK / buffer running empty: variants of these
// Also checked: bytes popped and pushed, the data read, nack with done,
// the number of STARTs and STOPs seen on the bus, and the EEPROM contents.
`timescale 1ns/1ps
module tb_i2c_ctrl;
  import i2c_pkg::*;

  localparam int unsigned Q = 4;

  logic clk = 0, rst;
  always #5 clk = ~clk;

  logic        go, done, nack, clk_en, ctrl_low, tick_low, tick_high, scl, sda;
  i2c_cmd_t    cmd;
  logic        sh_load, sh_rx_mode, sh_ack_out, sh_done, sh_ack_in, sh_low;
  logic [7:0]  sh_tx_byte, sh_rx_byte;
  logic        buf_empty, buf_pop, buf_push, eep_low;
  logic [7:0]  buf_dout;
  ctrl_state_t state;

  assign sda = !(ctrl_low || sh_low || eep_low);

  i2c_ctrl #(.QUARTER(Q)) dut (
    .clk, .rst, .go, .cmd, .done, .nack, .sda_in (sda), .tick_low, .tick_high,
    .clk_en, .sda_low (ctrl_low), .sh_load, .sh_tx_byte, .sh_rx_mode, .sh_ack_out,
    .sh_done, .sh_ack_in, .buf_empty, .buf_dout, .buf_pop,
    .buf_push, .state);

  i2c_clk_gen #(.QUARTER(Q)) u_clk (.clk, .rst, .en (clk_en), .scl, .tick_low, .tick_high);

  i2c_shifter u_sh (.clk, .rst, .load (sh_load), .tx_byte (sh_tx_byte),
    .rx_mode (sh_rx_mode), .ack_out (sh_ack_out), .tick_low, .tick_high,
    .sda_in (sda), .sda_low (sh_low), .rx_byte (sh_rx_byte), .ack_in (sh_ack_in),
    .done (sh_done));

  st24c02_model #(.TWR_NS(3000)) u_eep (.e (3'b001), .mode (1'b0), .scl, .sda,
                                       .sda_low (eep_low));

  // bench data buffer (updated with nonblocking assignments, like a
  // register, so the control module sees it change after the clock edge)
  logic [7:0] txm [16];
  int         tx_rd, tx_wr;
  logic [7:0] rxq [$];
  assign buf_empty = (tx_rd == tx_wr);
  assign buf_dout  = txm[tx_rd[3:0]];
  int n_pop, n_push;
  always @(posedge clk) begin
    if (buf_pop && !buf_empty) begin tx_rd <= tx_rd + 1; n_pop <= n_pop + 1; end
    if (buf_push) begin rxq.push_back(sh_rx_byte); n_push <= n_push + 1; end
  end
  task automatic tx_put(input logic [7:0] b);
    txm[tx_wr[3:0]] = b; tx_wr++;
  endtask

  // bus monitor: START and STOP conditions
  int n_start = 0, n_stop = 0;
  always @(negedge sda) if (scl) n_start++;
  always @(posedge sda) if (scl) n_stop++;

  // state trace
  ctrl_state_t trace [$];
  ctrl_state_t last_state;
  always @(posedge clk) if (!rst && state != last_state) begin
    trace.push_back(state); last_state = state;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic [6:0] dev, input logic rw, input logic [7:0] ba,
                      input int n, input ctrl_state_t exp [], input bit exp_nack);
    int c = 0;
    int s0, p0;
    bit same;
    s0 = n_start; p0 = n_stop;
    trace.delete(); trace.push_back(S_IDLE);
    n_pop <= 0; n_push <= 0;
    cmd <= '{dev_addr: dev, rw: rw, byte_addr: ba, nbytes: 4'(n)};
    @(posedge clk); go <= 1;
    @(posedge clk); go <= 0;
    while (!done && c < 20000) begin @(posedge clk); c++; end
    check(done, "done");
    check(nack == exp_nack, "nack flag");
    @(posedge clk); #1;
    same = (trace.size() == exp.size());
    if (same) foreach (exp[i]) if (trace[i] != exp[i]) same = 0;
    check(same, $sformatf("state sequence (%0d states)", trace.size()));
    check(n_start - s0 == ((rw && !exp_nack) ? 2 : 1), "START count");
    check(n_stop - p0 == 1, "one STOP");
    check(sda && scl && !clk_en, "bus idle after transfer");
    if (!same) foreach (trace[i]) $display("  %s", trace[i].name());
  endtask

  initial begin
    logic [7:0] wr [8];
    ctrl_state_t e_wr [], e_rd [], e_nk [];
    e_wr = '{S_IDLE, S_WAIT_FREE, S_DEV, S_BADDR, S_WDATA, S_STOP, S_BUSFREE, S_IDLE};
    e_rd = '{S_IDLE, S_WAIT_FREE, S_DEV, S_BADDR, S_RSTART, S_DEV, S_RDATA, S_STOP, S_BUSFREE, S_IDLE};
    e_nk = '{S_IDLE, S_WAIT_FREE, S_DEV, S_STOP, S_BUSFREE, S_IDLE};
    rst = 1; go = 0; cmd = '0; last_state = S_IDLE; tx_rd = 0; tx_wr = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);

    for (int i = 0; i < 6; i++) begin wr[i] = 8'($urandom); tx_put(wr[i]); end
    xfer(7'b1010001, RW_WRITE, 8'h20, 6, e_wr, 0);
    check(n_pop == 6 && buf_empty, "six bytes taken from the buffer");
    check(sda && scl, "bus free after write");
    #4000;
    for (int i = 0; i < 6; i++) check(u_eep.mem[8'h20 + i] == wr[i], "EEPROM written");

    xfer(7'b1010001, RW_READ, 8'h20, 6, e_rd, 0);
    check(n_push == 6 && rxq.size() == 6, "six bytes read");
    for (int i = 0; i < 6; i++) check(rxq.pop_front() == wr[i], "read data");

    tx_put(8'h12);
    xfer(7'b1011001, RW_WRITE, 8'h00, 1, e_nk, 1);
    check(n_pop == 0, "no data sent after device NACK");
    check(sda && scl, "bus free after NACK");
    tx_rd = tx_wr;

    // nine bytes in page mode: the ninth is refused
    for (int i = 0; i < 9; i++) tx_put(8'(i));
    xfer(7'b1010001, RW_WRITE, 8'h48, 9, e_wr, 1);
    check(n_pop == 9, "nine bytes sent before the data NACK");
    #4000;
    for (int i = 0; i < 8; i++) check(u_eep.mem[8'h48 + i] == 8'(i), "page written up to the limit");

    // address only: no data phase
    begin
      ctrl_state_t e_ad [];
      e_ad = '{S_IDLE, S_WAIT_FREE, S_DEV, S_BADDR, S_STOP, S_BUSFREE, S_IDLE};
      xfer(7'b1010001, RW_WRITE, 8'h60, 0, e_ad, 0);
      check(n_pop == 0, "no data popped for an address-only write");
      // buffer runs empty before the count is reached
      tx_put(8'hC3); tx_put(8'h3C);
      xfer(7'b1010001, RW_WRITE, 8'h70, 5, e_wr, 0);
      check(n_pop == 2, "write ends when the buffer runs empty");
      #4000;
      check(u_eep.mem[8'h70] == 8'hC3 && u_eep.mem[8'h71] == 8'h3C && u_eep.mem[8'h72] == 8'hFF,
            "only the buffered bytes written");
    end

    // a single byte write of the reference data
    tx_put(8'hF9);
    xfer(7'b1010001, RW_WRITE, 8'h01, 1, e_wr, 0);
    #4000;
    check(u_eep.mem[1] == 8'hF9, "reference byte written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
