// input_port: one router input port with a buffer per virtual channel.
//
// An arriving flit is steered by its VC field (the "VC identifier") into the
// buffer of that VC; every buffer is a flit_fifo of BUF_DEPTH flits. The
// router sees the front flit of every VC and pops each VC independently, at
// most one VC per cycle in practice since the switch allocator grants one
// flit per input port. Three VCs per port follow the source's figure; the
// buffer depth is this design's choice.
module input_port
  import rbc_pkg::*;
#(
  parameter int unsigned NVC   = NUM_VC,
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  link_t               in,
  input  logic  [NVC-1:0]     pop,
  output flit_t [NVC-1:0]     front,
  output logic  [NVC-1:0]     empty,
  output logic  [NVC-1:0]     full
);
  for (genvar v = 0; v < NVC; v++) begin : g_vc
    logic push;
    assign push = in.valid && (in.flit.vc == VC_W'(v));
    flit_fifo #(.DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .push  (push),
      .din   (in.flit),
      .pop   (pop[v]),
      .front (front[v]),
      .empty (empty[v]),
      .full  (full[v])
    );
  end
endmodule
