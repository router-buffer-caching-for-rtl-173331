// crossbar: the router's 5x5 switch.
//
// Each output port takes the flit of the input port named by its select line
// when its valid line is high, and drives an idle (all-zero) flit otherwise.
// Purely combinational; the router registers the outputs, which is the
// switch-traversal half of its second stage.
module crossbar
  import rbc_pkg::*;
#(
  parameter int unsigned NP = NUM_PORTS
) (
  input  flit_t [NP-1:0]             in_flit,
  input  logic  [NP-1:0]             sel_valid,
  input  logic  [NP-1:0][PORT_W-1:0] sel,
  output link_t [NP-1:0]             out
);
  always_comb begin
    for (int o = 0; o < NP; o++) begin
      out[o].valid = sel_valid[o];
      out[o].flit  = sel_valid[o] ? in_flit[sel[o]] : '0;
    end
  end
endmodule
