// flit_fifo: one virtual-channel buffer, a first-in first-out queue of flits.
//
// DEPTH entries in a circular array with read and write pointers and an
// occupancy count. A write and a read may happen in the same cycle. The head
// entry is visible on `front` whenever `empty` is low; `pop` removes it at the
// clock edge. Writing while full or popping while empty is a protocol error
// of the sender (credit flow control rules it out) and is asserted against.
module flit_fifo
  import rbc_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t din,
  input  logic  pop,
  output flit_t front,
  output logic  empty,
  output logic  full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t             mem [DEPTH];
  logic [AW-1:0]     rd_ptr, wr_ptr;
  logic [AW:0]       count;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign front = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
