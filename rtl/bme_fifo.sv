// Source word FIFO of the bit movement engine.
// Holds source words read from memory ahead of the write side so that reads
// and writes can interleave on the single master bus. A circular buffer of
// DEPTH words with read and write pointers and an occupancy count. dout shows
// the oldest word whenever empty is low; pop removes it at the clock edge and
// push stores din at the same edge (push and pop may coincide). Pushing when
// full or popping when empty is a protocol error and is asserted against.
// The depth of four words follows the document ("4 double words are read");
// the structure is this design's choice. Synchronous active-low reset.
module bme_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,     // synchronous flush
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign dout  = mem[rd_ptr];
  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= next_ptr(wr_ptr);
      end
      if (pop) rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end


  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
