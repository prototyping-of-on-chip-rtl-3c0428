// Register: command and status of the I2C master.
//
// The host writes a command (device address, R/W bit, byte address and
// number of data bytes) with cmd_we and launches it with start.  Both are
// accepted only while no transfer is running, so the command stays stable
// for the control module.  go is a one-clock pulse to the control module.
// busy is high from go until the control module reports ctrl_done; done
// and nack_err then hold the outcome of the last transfer until the next
// start.  A byte count above MAX_BYTES is clamped to MAX_BYTES, the size of
// the data buffer.
//
// The original description shows a register between the data buffer and the control
// module but not its contents.  The fields follow the device address
// format (1010 E2 E1 E0 R/W) and the byte address of the EEPROM; the reset
// value is the single-byte write to device address 1010001, byte address
// 0x01.  The host interface and the status bits are this design's choice.
module i2c_cmd_reg
  import i2c_pkg::*;
#(
  parameter int unsigned MAX_BYTES = 8
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     cmd_we,
  input  i2c_cmd_t cmd_in,
  input  logic     start,
  input  logic     ctrl_done,
  input  logic     ctrl_nack,
  output i2c_cmd_t cmd,
  output logic     go,
  output logic     busy,
  output logic     done,
  output logic     nack_err
);

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd.dev_addr  <= DEFAULT_DEV_ADDR;
      cmd.rw        <= RW_WRITE;
      cmd.byte_addr <= DEFAULT_BYTE_ADDR;
      cmd.nbytes    <= 4'd1;
      go            <= 1'b0;
      busy          <= 1'b0;
      done          <= 1'b0;
      nack_err      <= 1'b0;
    end else begin
      go <= 1'b0;
      if (!busy && cmd_we) begin
        cmd <= cmd_in;
        if (32'(cmd_in.nbytes) > MAX_BYTES) cmd.nbytes <= 4'(MAX_BYTES);
      end
      if (!busy && !cmd_we && start) begin
        go       <= 1'b1;
        busy     <= 1'b1;
        done     <= 1'b0;
        nack_err <= 1'b0;
      end else if (busy && ctrl_done) begin
        busy     <= 1'b0;
        done     <= 1'b1;
        nack_err <= ctrl_nack;
      end
    end
  end

endmodule
