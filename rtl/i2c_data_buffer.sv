// Data buffer between the host's DATA port and the control module.
//
// A synchronous first-in first-out buffer of DEPTH words.  The head word is
// always visible on dout (show-ahead); pop removes it and push appends din.
// Pushing when full or popping when empty is ignored; push and pop in the
// same clock on a non-empty buffer keep the count.  For a write the host
// fills it and the control module empties it byte by byte; for a read the
// control module fills it and the host empties it.
//
// The original description only names a data buffer.  The FIFO organisation is this
// design's choice; the default depth of 8 bytes is the largest number of
// bytes the EEPROM accepts in one page write.
module i2c_data_buffer #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  logic [WIDTH-1:0]           din,
  input  logic                       pop,
  output logic [WIDTH-1:0]           dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + CW'(1);
        2'b01:   count <= count - CW'(1);
        default: ;
      endcase
    end
  end

  a_count_in_range: assert property (@(posedge clk) disable iff (rst) count <= CW'(DEPTH))
    else $error("data buffer count out of range");

  assign dout  = mem[rd_ptr];
  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));

endmodule
