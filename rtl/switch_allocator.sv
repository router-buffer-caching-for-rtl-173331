// switch_allocator: separable input-first switch allocation.
//
// Phase one: at each input port a round-robin arbiter picks one of the VCs
// that request the switch. Phase two: at each output port a round-robin
// arbiter picks one of the input ports whose phase-one winner wants that
// output. The result grants at most one flit per input and per output port
// per cycle and sets the crossbar's select lines. Head flits may request
// speculatively, before their VC is allocated; the router discards a grant
// whose VC allocation failed. Arbiter pointers advance only on a full grant.
// The source names the allocator; the separable round-robin structure is this
// design's choice.
module switch_allocator
  import rbc_pkg::*;
#(
  parameter int unsigned NP  = NUM_PORTS,
  parameter int unsigned NVC = NUM_VC
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [NP-1:0][NVC-1:0]            req,
  input  logic [NP-1:0][NVC-1:0][PORT_W-1:0] req_port,
  output logic [NP-1:0][NVC-1:0]            grant,      // per input VC
  output logic [NP-1:0]                     out_valid,  // per output port
  output logic [NP-1:0][PORT_W-1:0]         out_sel     // input port feeding it
);
  logic [NP-1:0][NVC-1:0]    in_win;
  logic [NP-1:0]             in_any;
  logic [NP-1:0][PORT_W-1:0] in_port;
  logic [NP-1:0][NP-1:0]     out_req, out_win;   // [output][input]
  logic [NP-1:0]             in_granted;

  for (genvar p = 0; p < NP; p++) begin : g_in
    rr_arbiter #(.N(NVC)) u_arb (
      .clk, .rst_n, .req(req[p]), .advance(in_granted[p]), .grant(in_win[p])
    );
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      in_any[p]  = |in_win[p];
      in_port[p] = '0;
      for (int v = 0; v < NVC; v++)
        if (in_win[p][v]) in_port[p] = req_port[p][v];
    end
    for (int o = 0; o < NP; o++)
      for (int p = 0; p < NP; p++)
        out_req[o][p] = in_any[p] && (in_port[p] == PORT_W'(o));
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    rr_arbiter #(.N(NP)) u_arb (
      .clk, .rst_n, .req(out_req[o]), .advance(1'b1), .grant(out_win[o])
    );
  end

  always_comb begin
    in_granted = '0;
    out_valid  = '0;
    out_sel    = '0;
    for (int o = 0; o < NP; o++)
      for (int p = 0; p < NP; p++)
        if (out_win[o][p]) begin
          in_granted[p] = 1'b1;
          out_valid[o]  = 1'b1;
          out_sel[o]    = PORT_W'(p);
        end
    for (int p = 0; p < NP; p++)
      grant[p] = in_granted[p] ? in_win[p] : '0;
  end
endmodule
