// history_table: the classifier's table of recently seen high-sharer zones.
//
// ENTRIES keys, each a page number plus a zone number inside the page (a
// page of 4 KB is cut into four 1 KB zones), kept with LRU recency.
//   lookup  combinational match of lk_key; with lk_touch high a hit becomes
//           the most recently used entry;
//   insert  an absent key takes an invalid entry, else the least recently
//           used one; a present key just becomes most recently used;
//   rm_mru  invalidates the most recently used valid entry (pollution control);
//   clear   invalidates every entry.
// One operation acts per cycle, in the order clear, rm_mru, insert, touch.
// Invalidated entries are demoted to the LRU end, so the valid entries always
// hold recency ranks 0..count-1 and rank 0 is the MRU valid entry.
// Four entries, LRU, page-and-zone keys and the two pollution actions follow
// the source; the one-operation-per-cycle order is this design's.
module history_table
  import rbc_pkg::*;
#(
  parameter int unsigned ENTRIES = 4,
  parameter int unsigned KEY_W   = PAGE_W + ZONE_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [KEY_W-1:0]            lk_key,
  input  logic                        lk_touch,
  output logic                        lk_hit,
  input  logic                        ins_valid,
  input  logic [KEY_W-1:0]            ins_key,
  input  logic                        rm_mru,
  input  logic                        clear,
  output logic [$clog2(ENTRIES+1)-1:0] count
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0]            valid;
  logic [ENTRIES-1:0][KEY_W-1:0] key;
  logic [ENTRIES-1:0][IW-1:0]    rank;

  logic          lk_found, ins_found, mru_found, free_found;
  logic [IW-1:0] lk_idx, ins_idx, mru_idx, free_idx, lru_idx;

  always_comb begin
    lk_found = 1'b0;  lk_idx  = '0;
    ins_found = 1'b0; ins_idx = '0;
    mru_found = 1'b0; mru_idx = '0;
    free_found = 1'b0; free_idx = '0;
    lru_idx  = '0;
    count    = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid[i]) count = count + 1'b1;
      if (valid[i] && key[i] == lk_key)  begin lk_found  = 1'b1; lk_idx  = IW'(i); end
      if (valid[i] && key[i] == ins_key) begin ins_found = 1'b1; ins_idx = IW'(i); end
      if (valid[i] && rank[i] == '0)     begin mru_found = 1'b1; mru_idx = IW'(i); end
      if (!valid[i] && !free_found)      begin free_found = 1'b1; free_idx = IW'(i); end
      if (rank[i] == IW'(ENTRIES - 1))   lru_idx = IW'(i);
    end
  end

  assign lk_hit = lk_found;

  logic          do_rm, do_ins, do_touch;
  logic [IW-1:0] ins_at;
  assign do_rm    = !clear && rm_mru && mru_found;
  assign do_ins   = !clear && !rm_mru && ins_valid;
  assign do_touch = !clear && !rm_mru && !ins_valid && lk_touch && lk_found;
  assign ins_at   = ins_found ? ins_idx : (free_found ? free_idx : lru_idx);

  lru_ranks #(.N(ENTRIES)) u_lru (
    .clk, .rst_n,
    .touch      (do_ins || do_touch),
    .touch_idx  (do_ins ? ins_at : lk_idx),
    .demote     (do_rm),
    .demote_idx (mru_idx),
    .rank
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      key   <= '0;
    end else if (clear) begin
      valid <= '0;
    end else if (do_rm) begin
      valid[mru_idx] <= 1'b0;
    end else if (do_ins) begin
      valid[ins_at] <= 1'b1;
      key[ins_at]   <= ins_key;
    end
  end
endmodule
