// Shared types and constants of the I2C master.
//
// An ST24C02 EEPROM answers to a 7-bit device address whose upper four
// bits are its fixed identification code 1010 and whose lower three bits
// are its chip-enable pins E2..E0 (the master itself can address any
// device); the eighth bit of the first byte is
// R/W (0 = write, 1 = read).  The reset command (address 1010001, write,
// byte address 0x01, one data byte) is the single-byte write used as the
// reference transfer for this design.
package i2c_pkg;

  localparam logic [6:0] DEFAULT_DEV_ADDR = 7'b1010001;
  localparam logic [7:0] DEFAULT_BYTE_ADDR = 8'h01;

  localparam logic RW_WRITE = 1'b0;
  localparam logic RW_READ  = 1'b1;

  // One transfer as the host requests it.  nbytes counts data bytes
  // (0 = byte address only, which just sets the EEPROM's address counter).
  typedef struct packed {
    logic [6:0] dev_addr;
    logic       rw;
    logic [7:0] byte_addr;
    logic [3:0] nbytes;
  } i2c_cmd_t;

  // Control module states, following the write and read branches of the
  // transfer flow: START, device select, ACK check, byte address, ACK
  // check, data with ACK, completion, STOP.
  typedef enum logic [3:0] {
    S_IDLE,
    S_WAIT_FREE,   // sense SDA until the bus is free
    S_DEV,         // device select byte and its ACK
    S_BADDR,       // byte address and its ACK
    S_RSTART,      // repeated START before the read device select
    S_WDATA,       // data byte to the slave and its ACK
    S_RDATA,       // data byte from the slave and the master's ACK/NACK
    S_STOP,        // STOP condition
    S_BUSFREE      // bus-free time after STOP
  } ctrl_state_t;

endpackage
