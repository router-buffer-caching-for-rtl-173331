// rbc_mesh: a tiled multi-core network of MESH_X x MESH_Y tiles whose routers
// keep copies of heavily shared cache blocks (router buffer caches, RBCs).
//
// Tile (x, y) has index y*MESH_X + x; east is +x and south is +y. Neighbouring
// routers are joined by a flit link each way and a credit return on each
// link; the ports on the mesh boundary are tied off (X-Y routing never uses
// them). Per tile the module brings out what the missing parts of a tile
// connect to: the local router port of the network interface (processing
// element and LLC controller traffic share it) and the LLC controller's side
// of the classifier and of the RBC. Event pulses of every tile are brought
// out for counting.
// The 8x8 default and X-Y routing follow the source; the port grouping is
// this design's.
module rbc_mesh
  import rbc_pkg::*;
#(
  parameter int unsigned MESH_X      = 8,
  parameter int unsigned MESH_Y      = 8,
  parameter int unsigned RBC_ENTRIES = 8,
  parameter int unsigned HT_ENTRIES  = 4,
  parameter int unsigned ST          = 5,
  localparam int unsigned NT         = MESH_X * MESH_Y
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // network interface of every tile
  input  link_t        [NT-1:0]      nic_in,
  output credit_t      [NT-1:0]      nic_in_credit,
  output link_t        [NT-1:0]      nic_out,
  input  credit_t      [NT-1:0]      nic_out_credit,
  // LLC controller of every tile
  input  logic         [NT-1:0]      llc_shr_valid,
  input  blk_t         [NT-1:0]      llc_shr_blk,
  input  logic         [NT-1:0][6:0] llc_shr_count,
  input  logic         [NT-1:0]      llc_e2s_valid,
  input  blk_t         [NT-1:0]      llc_e2s_blk,
  output logic         [NT-1:0]      llc_e2s_promote,
  input  logic         [NT-1:0]      llc_fill_valid,
  input  blk_t         [NT-1:0]      llc_fill_blk,
  input  blk_data_t    [NT-1:0]      llc_fill_data,
  output logic         [NT-1:0]      llc_fill_ready,
  input  logic         [NT-1:0]      llc_inv_valid,
  input  blk_t         [NT-1:0]      llc_inv_blk,
  output logic         [NT-1:0]      llc_inv_ready,
  output logic         [NT-1:0]      llc_rep_valid,
  output blk_t         [NT-1:0]      llc_rep_blk,
  output logic         [NT-1:0][HIT_CTR_W-1:0] llc_rep_hits,
  output tile_events_t [NT-1:0]      events
);
  link_t   [NT-1:0][NUM_PORTS-1:0] t_in, t_out;
  credit_t [NT-1:0][NUM_PORTS-1:0] t_in_cr, t_out_cr;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned T = y * MESH_X + x;

      // local port
      assign t_in[T][P_LOCAL]    = nic_in[T];
      assign nic_in_credit[T]    = t_out_cr[T][P_LOCAL];
      assign nic_out[T]          = t_out[T][P_LOCAL];
      assign t_in_cr[T][P_LOCAL] = nic_out_credit[T];

      // east neighbour (x+1) sends on its west port
      if (x + 1 < MESH_X) begin : g_e
        assign t_in[T][P_EAST]    = t_out[T+1][P_WEST];
        assign t_in_cr[T][P_EAST] = t_out_cr[T+1][P_WEST];
      end else begin : g_e_edge
        assign t_in[T][P_EAST]    = '0;
        assign t_in_cr[T][P_EAST] = '0;
      end
      if (x > 0) begin : g_w
        assign t_in[T][P_WEST]    = t_out[T-1][P_EAST];
        assign t_in_cr[T][P_WEST] = t_out_cr[T-1][P_EAST];
      end else begin : g_w_edge
        assign t_in[T][P_WEST]    = '0;
        assign t_in_cr[T][P_WEST] = '0;
      end
      if (y > 0) begin : g_n
        assign t_in[T][P_NORTH]    = t_out[T-MESH_X][P_SOUTH];
        assign t_in_cr[T][P_NORTH] = t_out_cr[T-MESH_X][P_SOUTH];
      end else begin : g_n_edge
        assign t_in[T][P_NORTH]    = '0;
        assign t_in_cr[T][P_NORTH] = '0;
      end
      if (y + 1 < MESH_Y) begin : g_s
        assign t_in[T][P_SOUTH]    = t_out[T+MESH_X][P_NORTH];
        assign t_in_cr[T][P_SOUTH] = t_out_cr[T+MESH_X][P_NORTH];
      end else begin : g_s_edge
        assign t_in[T][P_SOUTH]    = '0;
        assign t_in_cr[T][P_SOUTH] = '0;
      end

      rbc_tile #(
        .MY_X(x), .MY_Y(y), .RBC_ENTRIES(RBC_ENTRIES),
        .HT_ENTRIES(HT_ENTRIES), .ST(ST)
      ) u_tile (
        .clk, .rst_n,
        .in_link    (t_in[T]),
        .out_credit (t_out_cr[T]),
        .out_link   (t_out[T]),
        .in_credit  (t_in_cr[T]),
        .llc_shr_valid   (llc_shr_valid[T]),
        .llc_shr_blk     (llc_shr_blk[T]),
        .llc_shr_count   (llc_shr_count[T]),
        .llc_e2s_valid   (llc_e2s_valid[T]),
        .llc_e2s_blk     (llc_e2s_blk[T]),
        .llc_e2s_promote (llc_e2s_promote[T]),
        .llc_fill_valid  (llc_fill_valid[T]),
        .llc_fill_blk    (llc_fill_blk[T]),
        .llc_fill_data   (llc_fill_data[T]),
        .llc_fill_ready  (llc_fill_ready[T]),
        .llc_inv_valid   (llc_inv_valid[T]),
        .llc_inv_blk     (llc_inv_blk[T]),
        .llc_inv_ready   (llc_inv_ready[T]),
        .llc_rep_valid   (llc_rep_valid[T]),
        .llc_rep_blk     (llc_rep_blk[T]),
        .llc_rep_hits    (llc_rep_hits[T]),
        .events          (events[T])
      );
    end
  end
endmodule
