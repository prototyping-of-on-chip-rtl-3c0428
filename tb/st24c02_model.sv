// Behavioural model of an ST24C02 2 Kbit (256 x 8) I2C serial EEPROM, for
// simulation only (not synthesizable).
//
// Pins as on the package: chip enables E2..E0 (e), MODE (1 = multibyte
// write, at most 4 bytes; 0 = page write, at most 8 bytes in one 8-byte
// page, the low three address bits wrapping), SCL and SDA.  SDA is split
// into the bus level (sda) and the model's open-drain pull (sda_low).
//
// The model detects START/STOP from SDA edges while SCL is high, samples on
// the rising edge of SCL and changes its output on the falling edge.  It
// acknowledges a device select of 1010 E2 E1 E0 R/W, then a byte address,
// then data bytes (writes) or sends data from its address counter (reads,
// as long as the master acknowledges).  Written bytes are committed at
// STOP; an internal program cycle of TWR_NS then follows, during which the
// model acknowledges nothing.  A write byte beyond the mode's limit is not
// acknowledged.
`timescale 1ns/1ps
module st24c02_model #(
  parameter int unsigned TWR_NS = 100_000
) (
  input  logic [2:0] e,
  input  logic       mode,
  input  logic       scl,
  input  logic       sda,
  output logic       sda_low
);

  localparam logic [3:0] EEPROM_ID = 4'b1010;

  typedef enum {M_IDLE, M_DEV, M_ADDR, M_WDATA, M_RDATA} mstate_t;

  logic [7:0] mem [256];
  mstate_t    st;
  int         bitcnt;
  bit         skip_fall;
  logic [7:0] shreg, txb, ptr;
  bit         master_ack;
  logic [7:0] pend_addr [8];
  logic [7:0] pend_data [8];
  int         npend;
  time        busy_until;

  // Statistics the testbenches read.
  int n_starts, n_stops, n_commits, n_bytes_written, n_busy_nacks, n_limit_nacks;

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 8'hFF;
    st = M_IDLE; bitcnt = 0; skip_fall = 0; sda_low = 0; npend = 0;
    ptr = 0; busy_until = 0;
    n_starts = 0; n_stops = 0; n_commits = 0; n_bytes_written = 0;
    n_busy_nacks = 0; n_limit_nacks = 0;
  end

  function automatic bit busy();
    return $time < busy_until;
  endfunction

  always @(negedge sda) begin
    if (scl === 1'b1 && busy()) n_busy_nacks++;
    if (scl === 1'b1 && !busy()) begin
      n_starts++;
      st = M_DEV; bitcnt = 0; skip_fall = 1; npend = 0;
    end
  end

  always @(posedge sda) begin
    if (scl === 1'b1) begin
      n_stops++;
      if (npend > 0 && !busy()) begin
        for (int i = 0; i < npend; i++) mem[pend_addr[i]] = pend_data[i];
        n_commits++;
        n_bytes_written += npend;
        busy_until = $time + TWR_NS;
      end
      npend = 0;
      st = M_IDLE;
      sda_low = 0;
    end
  end

  always @(posedge scl) begin
    if (st != M_IDLE) begin
      if (bitcnt < 8) shreg = {shreg[6:0], sda};
      else if (st == M_RDATA) master_ack = !sda;
    end
  end

  always @(negedge scl) begin
    if (st == M_IDLE) begin
      sda_low = 0;
    end else if (skip_fall) begin
      skip_fall = 0;
    end else if (bitcnt < 7) begin
      bitcnt++;
      sda_low = (st == M_RDATA) ? !txb[7-bitcnt] : 0;
    end else if (bitcnt == 7) begin
      bitcnt = 8;
      sda_low = 0;
      case (st)
        M_DEV: begin
          if (shreg[7:4] == EEPROM_ID && shreg[3:1] == e && !busy()) sda_low = 1;
          else st = M_IDLE;
        end
        M_ADDR: begin
          ptr = shreg; sda_low = 1;
        end
        M_WDATA: begin
          if (npend < (mode ? 4 : 8)) begin
            pend_addr[npend] = ptr; pend_data[npend] = shreg; npend++;
            ptr = mode ? ptr + 8'd1 : {ptr[7:3], ptr[2:0] + 3'd1};
            sda_low = 1;
          end else begin
            n_limit_nacks++;
          end
        end
        default: ;
      endcase
    end else begin
      // end of the acknowledge clock
      bitcnt = 0;
      sda_low = 0;
      case (st)
        M_DEV:   if (shreg[0]) begin st = M_RDATA; txb = mem[ptr]; sda_low = !txb[7]; end
                 else st = M_ADDR;
        M_ADDR:  st = M_WDATA;
        M_RDATA: if (master_ack) begin
                   ptr = ptr + 8'd1; txb = mem[ptr]; sda_low = !txb[7];
                 end else st = M_IDLE;
        default: ;
      endcase
    end
  end

endmodule
