// vc_allocator: assigns free downstream virtual channels to head flits.
//
// Every input VC whose head flit has been routed but holds no output VC
// requests its output port. For each output port a round-robin arbiter picks
// one requester per cycle and gives it the lowest-numbered VC of that port
// that is not held by another packet. A VC stays held from the head flit's
// departure until the tail flit's (tracked by the router, `busy`). One grant
// per output port per cycle is this design's simplification of a full
// separable allocator. The allocation result is combinational; the router
// registers it.
module vc_allocator
  import rbc_pkg::*;
#(
  parameter int unsigned NP  = NUM_PORTS,
  parameter int unsigned NVC = NUM_VC
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic  [NP*NVC-1:0]                   req,
  input  logic  [NP*NVC-1:0][PORT_W-1:0]       req_port,
  input  logic  [NP-1:0][NVC-1:0]              busy,
  output logic  [NP*NVC-1:0]                   grant,
  output logic  [NP*NVC-1:0][VC_W-1:0]         grant_vc
);
  localparam int unsigned NI = NP * NVC;

  logic [NP-1:0][NI-1:0]   ogrant;
  logic [NP-1:0][VC_W-1:0] free_vc;

  for (genvar o = 0; o < NP; o++) begin : g_out
    logic [NI-1:0] oreq;
    logic          have_free;

    always_comb begin
      have_free = 1'b0;
      free_vc[o] = '0;
      for (int v = NVC - 1; v >= 0; v--)
        if (!busy[o][v]) begin
          have_free  = 1'b1;
          free_vc[o] = VC_W'(v);
        end
      for (int i = 0; i < NI; i++)
        oreq[i] = req[i] && (req_port[i] == PORT_W'(o)) && have_free;
    end

    rr_arbiter #(.N(NI)) u_arb (
      .clk, .rst_n, .req(oreq), .advance(1'b1), .grant(ogrant[o])
    );
  end

  always_comb begin
    grant    = '0;
    grant_vc = '0;
    for (int o = 0; o < NP; o++)
      for (int i = 0; i < NI; i++)
        if (ogrant[o][i]) begin
          grant[i]    = 1'b1;
          grant_vc[i] = free_vc[o];
        end
  end
endmodule
