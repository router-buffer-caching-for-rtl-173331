// rbc: the router buffer cache, a small fully associative store of shared
// (S-state) cache blocks inside the home node's router.
//
// Each of the ENTRIES entries holds one 64-byte block as BLK_FLITS flit
// payloads (a head flit template and eight body flits), so that a hit can be
// answered flit by flit without re-packetising the block, the block address
// as tag, a valid bit and a two-bit saturating hit counter. 8 entries of
// 9 eight-byte flits (576 B), full associativity, LRU replacement, the hit
// counter and its report on eviction all follow the source.
//
// Operations, at most one per cycle, in priority order:
//   lookup  (router stage 1, a request that reached its home tile)
//           read hit   -> a reply to the requester is queued, the hit counter
//                         saturates upward, the entry becomes MRU;
//           write or upgrade hit -> the entry is invalidated at once, so the
//                         request leaves for the LLC only after it is gone.
//           A read hit is refused (lk_accept low) while the reply queue is
//           full; the router retries next cycle.
//   inv     the LLC controller invalidates a block (LLC eviction).
//   fill    the LLC controller promotes a block. A block already present is
//           rewritten in place; otherwise an invalid entry is used, else the
//           least recently used one, whose address and hit count are then
//           reported on ev_* one cycle later.
// An entry with a queued or streaming reply is "busy": it may be invalidated
// (the valid bit drops) but it is not overwritten until its replies are out.
//
// Replies leave on rp_* as 9-flit packets on VC RBC_VC of the local input
// port: the stored head with its destination set to the requester, then the
// eight body flits, the last marked TAIL; one flit per cycle while rp_ready.
//
// Own choices: the single operation per cycle, the depth of the reply queue,
// the busy rule, the sideband fill/inv/report ports (the source carries these
// over the router's injection and ejection channels), and no report when an
// entry is invalidated rather than replaced.
module rbc
  import rbc_pkg::*;
#(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned REPLY_Q = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  // lookup from route computation
  input  logic               lk_valid,
  input  msg_e               lk_msg,
  input  blk_t               lk_blk,
  input  logic [COORD_W-1:0] lk_src_x,
  input  logic [COORD_W-1:0] lk_src_y,
  output logic               lk_hit,
  output logic               lk_accept,
  // invalidation from the LLC controller
  input  logic               inv_valid,
  input  blk_t               inv_blk,
  output logic               inv_ready,
  // promotion (fill) from the LLC controller
  input  logic               fill_valid,
  input  blk_t               fill_blk,
  input  blk_data_t          fill_data,
  output logic               fill_ready,
  // eviction report to the LLC controller
  output logic               ev_valid,
  output blk_t               ev_blk,
  output logic [HIT_CTR_W-1:0] ev_hits,
  // reply flits into the local input port
  output logic               rp_valid,
  output flit_t              rp_flit,
  input  logic               rp_ready,
  // event pulses
  output logic               ev_read_hit,
  output logic               ev_write_inv,
  output logic               ev_llc_inv,
  output logic               ev_fill,
  output logic               ev_reply_stall
);
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned QW = (REPLY_Q > 1) ? $clog2(REPLY_Q) : 1;
  localparam int unsigned BW = $clog2(BLK_FLITS);

  typedef struct packed {
    logic [IW-1:0]      idx;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
  } reply_t;

  // ------------------------------------------------------------ storage
  logic [ENTRIES-1:0]                valid;
  blk_t [ENTRIES-1:0]                tag;
  logic [ENTRIES-1:0][HIT_CTR_W-1:0] hits;
  logic [FLIT_W-1:0]                 mem [ENTRIES][BLK_FLITS];
  logic [ENTRIES-1:0][IW-1:0]        rank;

  // ------------------------------------------------------------ reply queue
  reply_t        rq [REPLY_Q];
  logic [QW-1:0] rq_rd, rq_wr;
  logic [QW:0]   rq_cnt;
  logic [BW-1:0] beat;
  logic          rq_full, rq_push, rq_pop;
  reply_t        rq_new;

  assign rq_full = (rq_cnt == (QW+1)'(REPLY_Q));

  logic [ENTRIES-1:0] busy;
  always_comb begin
    busy = '0;
    for (int unsigned k = 0; k < REPLY_Q; k++)
      if ((QW+1)'(k) < rq_cnt)
        busy[rq[(int'(rq_rd) + k) % REPLY_Q].idx] = 1'b1;
  end

  // ------------------------------------------------------------ matching
  function automatic void match(input blk_t b, input logic [ENTRIES-1:0] v,
                                input blk_t [ENTRIES-1:0] t,
                                output logic found, output logic [IW-1:0] at);
    found = 1'b0;
    at    = '0;
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (v[i] && t[i] == b) begin
        found = 1'b1;
        at    = IW'(i);
      end
  endfunction

  logic          lk_found, inv_found, fill_found;
  logic [IW-1:0] lk_idx, inv_idx, fill_idx;
  always_comb begin
    match(lk_blk,   valid, tag, lk_found,   lk_idx);
    match(inv_blk,  valid, tag, inv_found,  inv_idx);
    match(fill_blk, valid, tag, fill_found, fill_idx);
  end

  // Victim for a fill: an idle invalid entry, else the idle valid entry of
  // largest recency rank.
  logic          vic_ok;
  logic [IW-1:0] vic_idx;
  always_comb begin
    logic          inv_ok;
    logic [IW-1:0] inv_at;
    logic [IW-1:0] best_rank;
    inv_ok    = 1'b0;
    inv_at    = '0;
    vic_ok    = 1'b0;
    vic_idx   = '0;
    best_rank = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!busy[i] && !valid[i] && !inv_ok) begin
        inv_ok = 1'b1;
        inv_at = IW'(i);
      end
      if (!busy[i] && valid[i] && (!vic_ok || rank[i] > best_rank)) begin
        vic_ok    = 1'b1;
        vic_idx   = IW'(i);
        best_rank = rank[i];
      end
    end
    if (inv_ok) begin
      vic_ok  = 1'b1;
      vic_idx = inv_at;
    end
  end

  // ------------------------------------------------------------ decisions
  logic lk_is_read, do_read_hit, do_write_inv, do_llc_inv, do_fill;
  logic fill_in_place, fill_present_busy;

  assign lk_is_read = (lk_msg == M_READ);
  assign lk_hit     = lk_valid && lk_found;
  assign lk_accept  = !(lk_is_read && lk_found && rq_full);

  assign do_read_hit  = lk_valid && lk_found && lk_is_read && !rq_full;
  assign do_write_inv = lk_valid && lk_found && !lk_is_read;

  assign inv_ready  = !lk_valid;
  assign do_llc_inv = inv_valid && inv_ready && inv_found;

  assign fill_in_place     = fill_found && !busy[fill_idx];
  assign fill_present_busy = fill_found &&  busy[fill_idx];
  assign fill_ready = !lk_valid && !inv_valid &&
                      (fill_in_place || fill_present_busy || vic_ok);
  assign do_fill    = fill_valid && fill_ready && !fill_present_busy;

  logic [IW-1:0] fill_at;
  assign fill_at = fill_in_place ? fill_idx : vic_idx;

  assign ev_read_hit    = do_read_hit;
  assign ev_write_inv   = do_write_inv;
  assign ev_llc_inv     = do_llc_inv;
  assign ev_fill        = do_fill;
  assign ev_reply_stall = lk_valid && lk_found && lk_is_read && rq_full;

  // ------------------------------------------------------------ recency
  logic          lru_touch, lru_demote;
  logic [IW-1:0] lru_touch_idx, lru_demote_idx;
  assign lru_touch      = do_read_hit || do_fill;
  assign lru_touch_idx  = do_read_hit ? lk_idx : fill_at;
  assign lru_demote     = do_write_inv || do_llc_inv;
  assign lru_demote_idx = do_write_inv ? lk_idx : inv_idx;

  lru_ranks #(.N(ENTRIES)) u_lru (
    .clk, .rst_n,
    .touch(lru_touch), .touch_idx(lru_touch_idx),
    .demote(lru_demote), .demote_idx(lru_demote_idx),
    .rank
  );

  // ------------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= '0;
      tag      <= '0;
      hits     <= '0;
      ev_valid <= 1'b0;
      ev_blk   <= '0;
      ev_hits  <= '0;
    end else begin
      ev_valid <= 1'b0;
      if (do_read_hit && hits[lk_idx] != '1)
        hits[lk_idx] <= hits[lk_idx] + 1'b1;
      if (do_write_inv) valid[lk_idx]  <= 1'b0;
      if (do_llc_inv)   valid[inv_idx] <= 1'b0;
      if (do_fill) begin
        if (!fill_in_place && valid[fill_at]) begin
          ev_valid <= 1'b1;
          ev_blk   <= tag[fill_at];
          ev_hits  <= hits[fill_at];
        end
        valid[fill_at] <= 1'b1;
        tag[fill_at]   <= fill_blk;
        hits[fill_at]  <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (do_fill) begin
      head_t h;
      h          = '0;
      h.src_x    = my_x;
      h.src_y    = my_y;
      h.msg      = M_DATA;
      h.blk      = fill_blk;
      mem[fill_at][0] <= h;
      for (int unsigned k = 0; k < BODY_FLITS; k++)
        mem[fill_at][k+1] <= fill_data[k];
    end
  end

  // ------------------------------------------------------------ replies
  assign rq_new  = '{idx: lk_idx, dst_x: lk_src_x, dst_y: lk_src_y};
  assign rq_push = do_read_hit;
  assign rp_valid = (rq_cnt != '0);
  assign rq_pop  = rp_valid && rp_ready && (beat == BW'(BLK_FLITS - 1));

  always_comb begin
    reply_t cur;
    head_t  h;
    cur     = rq[rq_rd];
    h       = mem[cur.idx][0];
    h.dst_x = cur.dst_x;
    h.dst_y = cur.dst_y;
    rp_flit = '0;
    rp_flit.vc = VC_W'(RBC_VC);
    if (beat == '0) begin
      rp_flit.ftype = F_HEAD;
      rp_flit.data  = h;
    end else begin
      rp_flit.ftype = (beat == BW'(BLK_FLITS - 1)) ? F_TAIL : F_BODY;
      rp_flit.data  = mem[cur.idx][beat];
    end
  end

  function automatic logic [QW-1:0] qnext(logic [QW-1:0] p);
    return (p == QW'(REPLY_Q - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_rd  <= '0;
      rq_wr  <= '0;
      rq_cnt <= '0;
      beat   <= '0;
      for (int unsigned k = 0; k < REPLY_Q; k++) rq[k] <= '0;
    end else begin
      if (rq_push) begin
        rq[rq_wr] <= rq_new;
        rq_wr     <= qnext(rq_wr);
      end
      if (rp_valid && rp_ready)
        beat <= rq_pop ? '0 : beat + 1'b1;
      if (rq_pop) rq_rd <= qnext(rq_rd);
      rq_cnt <= rq_cnt + (QW+1)'(rq_push) - (QW+1)'(rq_pop);
    end
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
                             $onehot0({do_read_hit | do_write_inv, do_llc_inv, do_fill}));
endmodule
