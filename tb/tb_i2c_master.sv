// End-to-end testbench of the I2C master with an ST24C02 model on the bus.
//
// Runs at the top's default parameters (50 MHz clock, 100 kHz SCL, 8-byte
// buffer).  Transfers: the reference byte write (device 1010001, byte
// address 0x01, data 11111001 = 0xF9) checked bit by bit on the bus, a
// page write of 8 bytes, a write during the EEPROM's program cycle (NACK),
// a multibyte write of 4 bytes, a sequential read of 8 bytes with repeated
// START, a one-byte read, a wrong device address (NACK), a write that
// exceeds the multibyte limit (NACK on data) and a start while another
// device holds SDA low (bus-busy wait).  A bus monitor decodes SCL/SDA on
// its own; expected data come from a reference copy of the memory.
`timescale 1ns/1ps
module tb_i2c_master;
  import i2c_pkg::*;

  localparam int unsigned Q      = 125;    // must match the top's default
  localparam int unsigned TWR_NS = 200_000;

  logic clk = 0;
  logic rst;
  always #10 clk = ~clk;

  logic       cmd_we, cmd_rw, start, busy, done, nack_err;
  logic [6:0] cmd_dev_addr;
  logic [7:0] cmd_byte_addr;
  logic [3:0] cmd_nbytes;
  logic       data_push, data_pop, buf_empty, buf_full;
  logic [7:0] data_in, data_out;
  logic [3:0] buf_count;
  logic       scl, sda, sda_oe, eep_low, hold_low;
  logic       mode;

  assign sda = !(sda_oe || eep_low || hold_low);

  i2c_master dut (
    .clk, .rst, .cmd_we, .cmd_dev_addr, .cmd_rw, .cmd_byte_addr, .cmd_nbytes,
    .start, .busy, .done, .nack_err,
    .data_push, .data_in, .data_pop, .data_out, .buf_empty, .buf_full, .buf_count,
    .scl, .sda_in (sda), .sda_oe
  );

  st24c02_model #(.TWR_NS(TWR_NS)) u_eep (
    .e (3'b001), .mode, .scl, .sda, .sda_low (eep_low)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- bus monitor ----------------
  logic [8:0] mon_q [$];
  int         mon_bits;
  logic [8:0] mon_sh;
  int         mon_starts = 0, mon_stops = 0;
  time        last_start_t;
  always @(negedge sda) if (scl) begin mon_starts++; mon_bits = 0; last_start_t = $time; end
  always @(posedge sda) if (scl) begin mon_stops++;  mon_bits = 0; end
  always @(posedge scl) begin
    mon_sh = {mon_sh[7:0], sda};
    mon_bits++;
    if (mon_bits == 9) begin mon_q.push_back(mon_sh); mon_bits = 0; end
  end

  // SCL period measurement
  time scl_rise_prev = 0, scl_period = 0;
  always @(posedge scl) begin
    if (scl_rise_prev != 0 && ($time - scl_rise_prev) <= 20*4*Q) scl_period = $time - scl_rise_prev;
    scl_rise_prev = $time;
  end

  // ---------------- reference memory ----------------
  logic [7:0] ref_mem [256];

  // ---------------- coverage ----------------
  int cov_byte_write = 0, cov_page_write = 0, cov_multibyte = 0, cov_read = 0;
  int cov_rstart = 0, cov_nack_dev = 0, cov_nack_data = 0, cov_busy_wait = 0;
  int cov_prog_nack = 0, cov_master_nack = 0;

  // ---------------- host tasks ----------------
  task automatic push_bytes(input logic [7:0] b [], input int n);
    for (int i = 0; i < n; i++) begin
      @(posedge clk); data_push <= 1; data_in <= b[i];
    end
    @(posedge clk); data_push <= 0;
    #1;
  endtask

  task automatic run(input logic [6:0] dev, input logic rw, input logic [7:0] ba,
                     input int n, output bit nack, output longint cycles);
    longint c0;
    @(posedge clk);
    cmd_we <= 1; cmd_dev_addr <= dev; cmd_rw <= rw; cmd_byte_addr <= ba; cmd_nbytes <= 4'(n);
    @(posedge clk); cmd_we <= 0; start <= 1;
    @(posedge clk); start <= 0;
    @(posedge clk); #1;
    check(busy && !done, "command accepted");
    c0 = 1;
    while (!done) begin @(posedge clk); c0++; if (c0 > 400_000) break; end
    check(done, "transfer finished");
    nack = nack_err; cycles = c0;
    $display("run dev=%b rw=%b ba=%h n=%0d -> nack=%b cycles=%0d t=%0t", dev, rw, ba, n, nack, c0, $time);
    check(sda && scl, "bus released after transfer");
  endtask

  task automatic pop_bytes(input int n, output logic [7:0] b [8]);
    for (int i = 0; i < n; i++) begin
      b[i] = data_out;
      @(posedge clk); data_pop <= 1;
      @(posedge clk); data_pop <= 0;
      #1;
    end
  endtask

  task automatic wait_ns(input longint ns);
    #(ns);
    @(posedge clk);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit nack; longint cyc;
    logic [7:0] wb [], rb [8];
    int s0, p0, q0;

    for (int i = 0; i < 256; i++) ref_mem[i] = 8'hFF;
    rst = 1; cmd_we = 0; start = 0; data_push = 0; data_pop = 0; data_in = 0;
    cmd_dev_addr = 0; cmd_rw = 0; cmd_byte_addr = 0; cmd_nbytes = 0;
    hold_low = 0; mode = 0;
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    check(scl && sda, "idle bus is high");

    // 1. Reference byte write using the register's reset command.
    wb = new[1]; wb[0] = 8'b1111_1001;
    push_bytes(wb, 1);
    q0 = mon_q.size(); s0 = mon_starts; p0 = mon_stops;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; if (cyc > 100_000) break; end
    check(done && !nack_err, "reference byte write acknowledged");
    check(mon_q.size() - q0 == 3, "three bytes on the bus");
    if (mon_q.size() - q0 == 3) begin
      check(mon_q[q0]   == {8'b1010_0010, 1'b0}, "device select 1010001+W, ACK");
      check(mon_q[q0+1] == {8'h01, 1'b0},        "byte address 0x01, ACK");
      check(mon_q[q0+2] == {8'b1111_1001, 1'b0}, "data 11111001, ACK");
    end
    check(mon_starts - s0 == 1 && mon_stops - p0 == 1, "one START and one STOP");
    // go->done: bus-free check (Q), 27 bit clocks (4Q each), STOP clock (4Q),
    // bus-free time (Q), plus a few clocks of handshaking.
    check(cyc >= 114*Q && cyc <= 114*Q + 10, $sformatf("byte write took %0d cycles", cyc));
    $display("reference byte write: %0d clocks from start to done", cyc);
    check(scl_period == 4*Q*20, $sformatf("SCL period %0t", scl_period));
    ref_mem[8'h01] = 8'hF9;
    cov_byte_write++;

    // 2. Page write of 8 bytes while the EEPROM is still programming -> NACK.
    wb = new[8];
    for (int i = 0; i < 8; i++) wb[i] = 8'($urandom);
    push_bytes(wb, 8);
    check(buf_full, "buffer full after 8 bytes");
    run(7'b1010001, RW_WRITE, 8'h10, 8, nack, cyc);
    check(nack, "device select not acknowledged during program cycle");
    if (nack) begin cov_prog_nack++; cov_nack_dev++; end
    check(buf_count == 8, "data kept after device NACK");

    // 3. Same page write after the program cycle.
    wait_ns(TWR_NS);
    run(7'b1010001, RW_WRITE, 8'h10, 8, nack, cyc);
    check(!nack, "page write acknowledged");
    check(buf_empty, "buffer drained by page write");
    for (int i = 0; i < 8; i++) ref_mem[8'h10 + i] = wb[i];
    cov_page_write++;
    wait_ns(TWR_NS);

    // 4. Multibyte write of 4 bytes (MODE high).
    mode = 1;
    wb = new[4];
    for (int i = 0; i < 4; i++) wb[i] = 8'($urandom);
    push_bytes(wb, 4);
    run(7'b1010001, RW_WRITE, 8'h3E, 4, nack, cyc);
    check(!nack, "multibyte write acknowledged");
    for (int i = 0; i < 4; i++) ref_mem[8'h3E + i] = wb[i];
    cov_multibyte++;
    wait_ns(TWR_NS);

    // 5. Five bytes in multibyte mode: the fifth is not acknowledged.
    wb = new[5];
    for (int i = 0; i < 5; i++) wb[i] = 8'($urandom);
    push_bytes(wb, 5);
    run(7'b1010001, RW_WRITE, 8'h80, 5, nack, cyc);
    check(nack, "fifth multibyte byte not acknowledged");
    if (nack) cov_nack_data++;
    check(buf_empty, "all five bytes sent");
    // STOP after the NACK commits the four accepted bytes.
    for (int i = 0; i < 4; i++) ref_mem[8'h80 + i] = wb[i];
    wait_ns(TWR_NS);
    mode = 0;

    // 6. Sequential read of 8 bytes from 0x10.
    s0 = mon_starts; q0 = mon_q.size();
    run(7'b1010001, RW_READ, 8'h10, 8, nack, cyc);
    check(!nack, "read acknowledged");
    check(mon_starts - s0 == 2, "read uses a repeated START");
    if (mon_starts - s0 == 2) cov_rstart++;
    check(mon_q.size() - q0 == 11, "read: 3 + 8 bytes on the bus");
    if (mon_q.size() - q0 == 11) begin
      check(mon_q[q0+2] == {8'b1010_0011, 1'b0}, "device select 1010001+R");
      check(mon_q[q0+10][0] == 1'b1, "master NACKs the last byte");
      check(mon_q[q0+9][0] == 1'b0, "master ACKs the other bytes");
      if (mon_q[q0+10][0]) cov_master_nack++;
    end
    check(buf_count == 8, "eight bytes read");
    pop_bytes(8, rb);
    for (int i = 0; i < 8; i++)
      check(rb[i] == ref_mem[8'h10 + i], $sformatf("read byte %0d", i));
    cov_read++;

    // 7. One-byte read of the reference location and of the multibyte data.
    run(7'b1010001, RW_READ, 8'h01, 1, nack, cyc);
    pop_bytes(1, rb);
    check(!nack && rb[0] == 8'hF9, "read back reference byte");
    run(7'b1010001, RW_READ, 8'h3E, 4, nack, cyc);
    pop_bytes(4, rb);
    for (int i = 0; i < 4; i++) check(rb[i] == ref_mem[8'h3E + i], "read multibyte data");
    run(7'b1010001, RW_READ, 8'h80, 4, nack, cyc);
    pop_bytes(4, rb);
    for (int i = 0; i < 4; i++) check(rb[i] == ref_mem[8'h80 + i], "read limited multibyte data");
    cov_read++;

    // 8. Wrong chip-enable bits: no ACK.
    wb = new[1]; wb[0] = 8'h55;
    push_bytes(wb, 1);
    run(7'b1010010, RW_WRITE, 8'h00, 1, nack, cyc);
    check(nack, "wrong device address not acknowledged");
    if (nack) cov_nack_dev++;
    // drain the byte left in the buffer
    pop_bytes(1, rb);
    check(buf_empty, "buffer empty");

    // 9. Another device holds SDA low: START waits until it is released.
    wb = new[1]; wb[0] = 8'hA5;
    push_bytes(wb, 1);
    hold_low = 1;
    @(posedge clk);
    cmd_we <= 1; cmd_dev_addr <= 7'b1010001; cmd_rw <= RW_WRITE; cmd_byte_addr <= 8'hC0; cmd_nbytes <= 4'd1;
    @(posedge clk); cmd_we <= 0; start <= 1;
    @(posedge clk); start <= 0;
    @(posedge clk); #1;
    s0 = mon_starts;
    repeat (20*Q) @(posedge clk);
    check(busy && mon_starts == s0 && scl, "no START while SDA is held low");
    hold_low = 0;
    begin
      time t_rel;
      t_rel = $time;
      cyc = 0;
      while (!done) begin @(posedge clk); cyc++; if (cyc > 100_000) break; end
      check(done && !nack_err, "write after bus release acknowledged");
      check(last_start_t >= t_rel + Q*20, "START waited a bus-free quarter");
      if (done && mon_starts - s0 == 1) cov_busy_wait++;
    end
    ref_mem[8'hC0] = 8'hA5;
    wait_ns(TWR_NS);

    // 10. EEPROM contents against the reference.
    for (int i = 0; i < 256; i++)
      check(u_eep.mem[i] == ref_mem[i], $sformatf("EEPROM byte %0d", i));

    // mechanisms exercised
    check(cov_byte_write  > 0, "byte write happened");
    check(cov_page_write  > 0, "page write happened");
    check(cov_multibyte   > 0, "multibyte write happened");
    check(cov_read        > 0, "read happened");
    check(cov_rstart      > 0, "repeated START happened");
    check(cov_nack_dev    > 1, "device NACK happened");
    check(cov_nack_data   > 0, "data NACK happened");
    check(cov_prog_nack   > 0, "program-cycle NACK happened");
    check(cov_master_nack > 0, "master NACK happened");
    check(cov_busy_wait   > 0, "bus-busy wait happened");
    $display("coverage: byte_write=%0d page_write=%0d multibyte=%0d read=%0d rstart=%0d nack_dev=%0d nack_data=%0d prog_nack=%0d master_nack=%0d busy_wait=%0d",
             cov_byte_write, cov_page_write, cov_multibyte, cov_read, cov_rstart,
             cov_nack_dev, cov_nack_data, cov_prog_nack, cov_master_nack, cov_busy_wait);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
