// I2C master for a serial EEPROM (ST24C02 class): top level.
//
// The host writes a command into the register (device address, R/W, byte
// address, byte count), places the bytes to be written in the data buffer
// and pulses start.  The control module then runs the whole I2C transfer on
// SCL/SDA, using the clock generator for SCL and the address block to shift
// bytes.  Read data land in the same data buffer, from which the host pops
// them.  busy, done and nack_err report progress and outcome.
//
// Bus pins: scl is driven by the master (the only master on this bus, as in
// a single FPGA + EEPROM system).  SDA is open drain: sda_oe = 1 pulls the
// line low, sda_oe = 0 releases it to the pull-up; sda_in is the line's
// level.  On the FPGA these map to an IOBUF with its data input tied low.
//
// Host DATA port: the data buffer is shared by both directions.  While the
// master is idle or doing a write, data_push/data_in fill it; during a read
// the control module fills it.  data_pop/data_out read its head while the
// master is idle or doing a read; during a write the control module drains
// it.  The host should leave the buffer alone while busy.
//
// Timing: one SCL period is 4*QUARTER clocks (100 kHz from 50 MHz at the
// default).  A byte write (START, 3 bytes with ACK, STOP) takes about
// 29 SCL periods plus two quarters of bus-free time.
//
// The split into data buffer, register, control module, clock generator and
// address block follows the master block of the original description; the host interface,
// the open-drain pin split and all widths not fixed by I2C are this
// design's choices.
module i2c_master
  import i2c_pkg::*;
#(
  parameter int unsigned QUARTER = 125,
  parameter int unsigned DEPTH   = 8
) (
  input  logic       clk,
  input  logic       rst,
  // register
  input  logic       cmd_we,
  input  logic [6:0] cmd_dev_addr,
  input  logic       cmd_rw,
  input  logic [7:0] cmd_byte_addr,
  input  logic [3:0] cmd_nbytes,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic       nack_err,
  // DATA port through the data buffer
  input  logic       data_push,
  input  logic [7:0] data_in,
  input  logic       data_pop,
  output logic [7:0] data_out,
  output logic       buf_empty,
  output logic       buf_full,
  output logic [$clog2(DEPTH+1)-1:0] buf_count,
  // I2C bus
  output logic       scl,
  input  logic       sda_in,
  output logic       sda_oe
);

  i2c_cmd_t    cmd_in, cmd;
  logic        go, ctrl_done, ctrl_nack;
  logic        clk_en, tick_low, tick_high;
  logic        ctrl_sda_low, sh_sda_low;
  logic        sh_load, sh_rx_mode, sh_ack_out, sh_done, sh_ack_in;
  logic [7:0]  sh_tx_byte, sh_rx_byte;
  logic        c_pop, c_push;
  logic        b_push, b_pop;
  logic [7:0]  b_din;
  ctrl_state_t state;      // control module state, for observation

  assign cmd_in = '{dev_addr: cmd_dev_addr, rw: cmd_rw,
                    byte_addr: cmd_byte_addr, nbytes: cmd_nbytes};

  // Who owns each side of the data buffer.
  logic reading, writing;
  assign reading = busy && (cmd.rw == RW_READ);
  assign writing = busy && (cmd.rw == RW_WRITE);
  assign b_push  = reading ? c_push : data_push;
  assign b_din   = reading ? sh_rx_byte : data_in;
  assign b_pop   = writing ? c_pop  : data_pop;

  i2c_cmd_reg #(.MAX_BYTES(DEPTH)) u_reg (
    .clk, .rst,
    .cmd_we, .cmd_in, .start,
    .ctrl_done, .ctrl_nack,
    .cmd, .go, .busy, .done, .nack_err
  );

  i2c_data_buffer #(.WIDTH(8), .DEPTH(DEPTH)) u_buf (
    .clk, .rst,
    .push (b_push), .din (b_din),
    .pop  (b_pop),  .dout (data_out),
    .empty (buf_empty), .full (buf_full), .count (buf_count)
  );

  i2c_clk_gen #(.QUARTER(QUARTER)) u_clk (
    .clk, .rst, .en (clk_en),
    .scl, .tick_low, .tick_high
  );

  i2c_shifter u_addr (
    .clk, .rst,
    .load (sh_load), .tx_byte (sh_tx_byte), .rx_mode (sh_rx_mode),
    .ack_out (sh_ack_out),
    .tick_low, .tick_high, .sda_in,
    .sda_low (sh_sda_low), .rx_byte (sh_rx_byte),
    .ack_in (sh_ack_in), .done (sh_done)
  );

  i2c_ctrl #(.QUARTER(QUARTER)) u_ctrl (
    .clk, .rst,
    .go, .cmd, .done (ctrl_done), .nack (ctrl_nack),
    .sda_in, .tick_low, .tick_high,
    .clk_en, .sda_low (ctrl_sda_low),
    .sh_load, .sh_tx_byte, .sh_rx_mode, .sh_ack_out,
    .sh_done, .sh_ack_in,
    .buf_empty, .buf_dout (data_out), .buf_pop (c_pop),
    .buf_push (c_push),
    .state
  );

  assign sda_oe = ctrl_sda_low | sh_sda_low;

  // Bus rule: the master changes SDA while SCL is high only to make a START
  // (SDA falls, control module entering the device select) or a STOP (SDA
  // rises, control module entering the bus-free wait).
  logic sda_oe_q;
  always_ff @(posedge clk) sda_oe_q <= rst ? 1'b0 : sda_oe;

  a_sda_stable_while_scl_high: assert property (
    @(posedge clk) disable iff (rst)
      (scl && sda_oe != sda_oe_q) |->
        ((state == S_DEV && sda_oe) || (state == S_BUSFREE && !sda_oe)))
    else $error("SDA changed while SCL high outside START/STOP");

endmodule
