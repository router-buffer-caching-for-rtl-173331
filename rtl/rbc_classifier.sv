// rbc_classifier: the prediction classifier of the LLC controller, which
// decides which blocks are copied into the router buffer cache (RBC).
//
// Training: whenever the directory reports a block's sharer count (shr_*),
// a count above the sharer threshold ST makes the block a high-sharer block
// and its page-and-zone key is inserted into the history table.
// Promotion: when a read reaches a block in state E (it is about to gain a
// second sharer and move to S) the LLC controller asks e2s_*; the block is
// promoted (e2s_promote, combinational) when its page-and-zone key is in the
// table, and that entry becomes most recently used.
// Pollution control: every block the RBC replaces is reported with its
// two-bit hit count (rep_*). A count below 3 marks a badly chosen block and
// raises a low-reuse counter; a count of 3 lowers it. When the counter
// reaches POLL_THRESH the classifier removes the POLL_REMOVE most recently
// used table entries (one per cycle) or, with POLL_CLEAR set, clears the
// whole table, and the counter restarts.
// With ZONED clear the key is the page alone (no page partitioning).
//
// From the source: ST = 5, a four-entry LRU history table, page-and-zone keys
// with four zones per page, "hits below 3" as the sign of pollution and the
// two actions (remove a couple of MRU entries, or clean the table). Own
// choices: the low-reuse counter, its threshold of 4 and the removal of two
// entries.
module rbc_classifier
  import rbc_pkg::*;
#(
  parameter int unsigned ST          = 5,
  parameter int unsigned HT_ENTRIES  = 4,
  parameter int unsigned POLL_THRESH = 4,
  parameter int unsigned POLL_REMOVE = 2,
  parameter bit          POLL_CLEAR  = 1'b0,
  parameter bit          ZONED       = 1'b1,
  parameter int unsigned SHR_W       = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // directory sharer-count updates
  input  logic                 shr_valid,
  input  blk_t                 shr_blk,
  input  logic [SHR_W-1:0]     shr_count,
  // E -> S read: promote this block?
  input  logic                 e2s_valid,
  input  blk_t                 e2s_blk,
  output logic                 e2s_promote,
  // RBC eviction reports
  input  logic                 rep_valid,
  input  blk_t                 rep_blk,
  input  logic [HIT_CTR_W-1:0] rep_hits,
  // event pulses
  output logic                 ev_insert,
  output logic                 ev_ht_hit,
  output logic                 ev_pollution,
  output logic [$clog2(HT_ENTRIES+1)-1:0] ht_count
);
  localparam int unsigned KEY_W = PAGE_W + ZONE_W;
  localparam int unsigned PW    = $clog2(POLL_THRESH + 1);
  localparam int unsigned RW    = $clog2(POLL_REMOVE + 1);

  function automatic logic [KEY_W-1:0] key_of(blk_t b);
    return {blk_page(b), ZONED ? blk_zone(b) : ZONE_W'(0)};
  endfunction

  logic          high_sharer, ht_hit;
  logic [PW-1:0] low_reuse;
  logic [RW-1:0] rm_left;
  logic          poll_fire, rm_now, clr_now;

  assign high_sharer = shr_valid && (shr_count > SHR_W'(ST));

  history_table #(.ENTRIES(HT_ENTRIES), .KEY_W(KEY_W)) u_ht (
    .clk, .rst_n,
    .lk_key    (key_of(e2s_blk)),
    .lk_touch  (e2s_valid),
    .lk_hit    (ht_hit),
    .ins_valid (high_sharer),
    .ins_key   (key_of(shr_blk)),
    .rm_mru    (rm_now),
    .clear     (clr_now),
    .count     (ht_count)
  );

  assign e2s_promote = e2s_valid && ht_hit;

  // The report is unused apart from its hit count: the table holds zones, not
  // blocks, so the victim's address selects nothing.
  logic rep_low;
  assign rep_low   = rep_valid && (rep_hits < HIT_CTR_W'(3));
  assign poll_fire = rep_low && (low_reuse == PW'(POLL_THRESH - 1));
  assign clr_now   = poll_fire && POLL_CLEAR;
  assign rm_now    = (rm_left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      low_reuse <= '0;
      rm_left   <= '0;
    end else begin
      if (rm_now) rm_left <= rm_left - 1'b1;
      if (poll_fire) begin
        low_reuse <= '0;
        if (!POLL_CLEAR) rm_left <= RW'(POLL_REMOVE);
      end else if (rep_low) begin
        low_reuse <= low_reuse + 1'b1;
      end else if (rep_valid && low_reuse != '0) begin
        low_reuse <= low_reuse - 1'b1;
      end
    end
  end

  assign ev_insert    = high_sharer && !rm_now && !clr_now;
  assign ev_ht_hit    = e2s_promote;
  assign ev_pollution = poll_fire;

  logic unused_rep;
  assign unused_rep = ^rep_blk;
endmodule
