// rbc_tile: the network and classifier part of one tile of the mesh.
//
// It holds the tile's router with its router buffer cache (RBC) and the
// prediction classifier that lives in the tile's LLC controller. The
// processing element, its L1 caches, the network interface and the LLC slice
// with its directory are outside: the local router port and the classifier's
// directory inputs are this module's ports. The RBC's eviction reports go to
// the classifier for pollution control and are also brought out, as are the
// fill and invalidate ports through which the LLC controller promotes blocks
// into, and removes blocks from, the RBC.
// The classifier's verdict (llc_e2s_promote) is combinational in
// llc_e2s_valid/llc_e2s_blk; everything else is as in rbc_router and
// rbc_classifier.
module rbc_tile
  import rbc_pkg::*;
#(
  parameter int unsigned MY_X        = 0,
  parameter int unsigned MY_Y        = 0,
  parameter int unsigned RBC_ENTRIES = 8,
  parameter int unsigned HT_ENTRIES  = 4,
  parameter int unsigned ST          = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  link_t   [NUM_PORTS-1:0] in_link,
  output credit_t [NUM_PORTS-1:0] out_credit,
  output link_t   [NUM_PORTS-1:0] out_link,
  input  credit_t [NUM_PORTS-1:0] in_credit,
  // LLC controller side
  input  logic                    llc_shr_valid,
  input  blk_t                    llc_shr_blk,
  input  logic [6:0]              llc_shr_count,
  input  logic                    llc_e2s_valid,
  input  blk_t                    llc_e2s_blk,
  output logic                    llc_e2s_promote,
  input  logic                    llc_fill_valid,
  input  blk_t                    llc_fill_blk,
  input  blk_data_t               llc_fill_data,
  output logic                    llc_fill_ready,
  input  logic                    llc_inv_valid,
  input  blk_t                    llc_inv_blk,
  output logic                    llc_inv_ready,
  output logic                    llc_rep_valid,
  output blk_t                    llc_rep_blk,
  output logic [HIT_CTR_W-1:0]    llc_rep_hits,
  output tile_events_t            events
);
  logic ht_unused;

  rbc_router #(.MY_X(MY_X), .MY_Y(MY_Y), .RBC_ENTRIES(RBC_ENTRIES)) u_router (
    .clk, .rst_n,
    .in_link, .out_credit, .out_link, .in_credit,
    .inv_valid  (llc_inv_valid),  .inv_blk (llc_inv_blk), .inv_ready (llc_inv_ready),
    .fill_valid (llc_fill_valid), .fill_blk (llc_fill_blk),
    .fill_data  (llc_fill_data),  .fill_ready (llc_fill_ready),
    .ev_valid   (llc_rep_valid),  .ev_blk (llc_rep_blk), .ev_hits (llc_rep_hits),
    .ev_read_hit     (events.rbc_read_hit),
    .ev_write_inv    (events.rbc_write_inv),
    .ev_llc_inv      (events.rbc_llc_inv),
    .ev_fill         (events.rbc_fill),
    .ev_evict        (events.rbc_evict),
    .ev_reply_stall  (events.rbc_reply_stall),
    .ev_spec_fail    (events.spec_fail),
    .ev_credit_stall (events.credit_stall)
  );

  logic [$clog2(HT_ENTRIES+1)-1:0] ht_count;

  rbc_classifier #(.ST(ST), .HT_ENTRIES(HT_ENTRIES)) u_classifier (
    .clk, .rst_n,
    .shr_valid (llc_shr_valid), .shr_blk (llc_shr_blk), .shr_count (llc_shr_count),
    .e2s_valid (llc_e2s_valid), .e2s_blk (llc_e2s_blk), .e2s_promote (llc_e2s_promote),
    .rep_valid (llc_rep_valid), .rep_blk (llc_rep_blk), .rep_hits (llc_rep_hits),
    .ev_insert    (events.ht_insert),
    .ev_ht_hit    (events.ht_hit),
    .ev_pollution (events.pollution),
    .ht_count
  );
  assign ht_unused = ^ht_count;
endmodule
