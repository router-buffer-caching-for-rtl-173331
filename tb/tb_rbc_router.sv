// tb_rbc_router: one router at tile (2,2) of a mesh, all five ports driven
// by packet sources that obey credit flow control and observed by sinks that
// return credits (sometimes late, to create credit stalls).
// Directed part:
//  * a single-flit packet takes 3 cycles from the cycle it is on the input
//    link to the cycle it is on the output link (2 router stages plus the
//    buffer write), for every output direction;
//  * a read request reaching its home tile with an RBC miss goes to the local
//    port unmarked; after the block is promoted, the next read is marked
//    serviced on its way to the LLC and the RBC reply (9 flits with the
//    block's data) leaves towards the requester;
//  * a write to a cached block invalidates it, so the next read misses.
// Random part: multi-flit packets from every port to random destinations on
// random VCs; every packet must arrive intact, unreordered within its VC,
// on the X-Y output port. Speculation failures and credit stalls must occur.
module tb_rbc_router;
  import rbc_pkg::*;
  localparam int NP = NUM_PORTS;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  link_t   [NP-1:0] in_link, out_link;
  credit_t [NP-1:0] out_credit, in_credit;
  logic inv_valid, inv_ready, fill_valid, fill_ready, ev_valid;
  blk_t inv_blk, fill_blk, ev_blk;
  blk_data_t fill_data;
  logic [HIT_CTR_W-1:0] ev_hits;
  logic e_rh, e_wi, e_li, e_f, e_ev, e_rs, e_sf, e_cs;
  int n_rh = 0, n_wi = 0, n_sf = 0, n_cs = 0;

  rbc_router #(.MY_X(2), .MY_Y(2)) dut (
    .clk, .rst_n, .in_link, .out_credit, .out_link, .in_credit,
    .inv_valid, .inv_blk, .inv_ready, .fill_valid, .fill_blk, .fill_data, .fill_ready,
    .ev_valid, .ev_blk, .ev_hits,
    .ev_read_hit(e_rh), .ev_write_inv(e_wi), .ev_llc_inv(e_li), .ev_fill(e_f),
    .ev_evict(e_ev), .ev_reply_stall(e_rs), .ev_spec_fail(e_sf), .ev_credit_stall(e_cs));

  always @(posedge clk) begin
    n_rh += int'(e_rh); n_wi += int'(e_wi); n_sf += int'(e_sf); n_cs += int'(e_cs);
  end

  function automatic logic [FLIT_W-1:0] word(blk_t b, int k);
    return {b[31:0] ^ 32'h5EED_0000, 32'(k)};
  endfunction

  function automatic port_e route(int dx, int dy);
    if (dx > 2) return P_EAST;
    if (dx < 2) return P_WEST;
    if (dy > 2) return P_SOUTH;
    if (dy < 2) return P_NORTH;
    return P_LOCAL;
  endfunction

  function automatic logic [FLIT_W-1:0] mk_head(int dx, int dy, int sx, int sy, msg_e m,
                                                 blk_t b, logic s = 0);
    head_t h;
    h = '0; h.dst_x = 3'(dx); h.dst_y = 3'(dy); h.src_x = 3'(sx); h.src_y = 3'(sy);
    h.msg = m; h.blk = b; h.serviced = s;
    return h;
  endfunction

  // ---------------------------------------------------------- sources
  typedef struct { flit_t flits [$]; int port; } pkt_t;
  pkt_t src_q [NP][$];
  int   src_beat [NP];
  int   src_cred [NP][NUM_VC];
  int   sent_cyc [NP];

  // expected packets per output port, checked in order per (port, VC-stream)
  typedef struct { logic [FLIT_W-1:0] words [$]; } expk_t;
  expk_t exp_q [NP][$];
  logic [FLIT_W-1:0] rx_words [NP][NUM_VC][$];
  int recv_cyc [NP];
  int delivered = 0;

  function automatic void expect_pkt(int o, logic [FLIT_W-1:0] w [$]);
    expk_t e;
    e.words = w;
    exp_q[o].push_back(e);
  endfunction

  // packet from port p on VC v with head word h and n body words
  function automatic void send(int p, int v, logic [FLIT_W-1:0] h, int nbody, int o,
                               logic [FLIT_W-1:0] exp_head, logic expect_it = 1);
    pkt_t k;
    flit_t f;
    logic [FLIT_W-1:0] w [$];
    head_t hh;
    hh = head_t'(h);
    f.vc = VC_W'(v);
    f.ftype = (nbody == 0) ? F_HEADTAIL : F_HEAD; f.data = h;
    k.flits.push_back(f); w.push_back(exp_head);
    for (int i = 0; i < nbody; i++) begin
      f.ftype = (i == nbody - 1) ? F_TAIL : F_BODY;
      f.data = word(hh.blk, i);
      k.flits.push_back(f); w.push_back(f.data);
    end
    k.port = o;
    src_q[p].push_back(k);
    if (expect_it) expect_pkt(o, w);
  endfunction

  // credits returned to the router, possibly delayed
  int sink_pending [NP][$];
  bit slow_sinks = 0;

  always @(negedge clk) if (rst_n) begin
    // monitor outputs
    for (int o = 0; o < NP; o++) begin
      if (out_link[o].valid) begin
        flit_t f;
        f = out_link[o].flit;
        recv_cyc[o] = cyc;
        sink_pending[o].push_back(int'(f.vc));
        rx_words[o][f.vc].push_back(f.data);
        if (is_tail(f.ftype)) begin
          int found;
          found = -1;
          foreach (exp_q[o][i]) if (found < 0 && exp_q[o][i].words.size() == rx_words[o][f.vc].size()
                                     && exp_q[o][i].words[0] == rx_words[o][f.vc][0]) found = i;
          checks++;
          if (found < 0) begin
            failures++; $display("FAIL unexpected packet on port %0d head %h", o, rx_words[o][f.vc][0]);
          end else begin
            foreach (rx_words[o][f.vc][j]) if (rx_words[o][f.vc][j] != exp_q[o][found].words[j]) begin
              failures++; $display("FAIL packet word %0d on port %0d", j, o);
            end
            exp_q[o].delete(found);
            delivered++;
          end
          rx_words[o][f.vc].delete();
        end
      end
      in_credit[o] = '0;
      if (sink_pending[o].size() > 0 && (!slow_sinks || $urandom % 3 == 0)) begin
        in_credit[o].valid = 1'b1;
        in_credit[o].vc = VC_W'(sink_pending[o].pop_front());
      end
    end
    // credits from the router to the sources
    for (int p = 0; p < NP; p++) if (out_credit[p].valid) src_cred[p][out_credit[p].vc]++;
    // drive sources
    for (int p = 0; p < NP; p++) begin
      in_link[p] = '0;
      if (src_q[p].size() > 0) begin
        flit_t f;
        f = src_q[p][0].flits[src_beat[p]];
        if (src_cred[p][f.vc] > 0 && $urandom % 4 != 0) begin
          in_link[p].valid = 1'b1;
          in_link[p].flit = f;
          src_cred[p][f.vc]--;
          sent_cyc[p] = cyc;
          if (src_beat[p] == src_q[p][0].flits.size() - 1) begin
            src_beat[p] = 0; void'(src_q[p].pop_front());
          end else src_beat[p]++;
        end
      end
    end
  end

  task automatic wait_idle();
    int g;
    g = 0;
    while (g < 3000) begin
      int busy;
      busy = 0;
      for (int o = 0; o < NP; o++) busy += exp_q[o].size() + src_q[o].size();
      if (busy == 0) break;
      @(negedge clk); g++;
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t B;
    in_link = '0; in_credit = '0;
    inv_valid = 0; inv_blk = '0; fill_valid = 0; fill_blk = '0; fill_data = '0;
    for (int p = 0; p < NP; p++) begin
      src_beat[p] = 0;
      for (int v = 0; v < NUM_VC; v++) src_cred[p][v] = (p == 0 && v == RBC_VC) ? 0 : BUF_DEPTH;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- latency per direction
    begin
      int dsts [5][2] = '{'{2, 2}, '{5, 1}, '{0, 3}, '{2, 0}, '{2, 6}};
      int from [5] = '{1, 2, 1, 4, 3};
      for (int o = 0; o < NP; o++) begin
        logic [FLIT_W-1:0] h;
        h = mk_head(dsts[o][0], dsts[o][1], 7, 7, M_DATA, blk_t'(100 + o));
        @(negedge clk);
        send(from[o], 0, h, 0, o, h);
        recv_cyc[o] = -1;
        wait_idle();
        checks++;
        if (recv_cyc[o] - sent_cyc[from[o]] != 3) begin
          failures++; $display("FAIL latency to port %0d: %0d", o, recv_cyc[o] - sent_cyc[from[o]]);
        end
      end
    end

    // ---- RBC: miss, promote, hit, write invalidation
    B = blk_t'(42'h12_3456_7891);
    begin
      logic [FLIT_W-1:0] rq;
      rq = mk_head(2, 2, 5, 2, M_READ, B);
      send(P_EAST, 1, rq, 0, P_LOCAL, rq);
      wait_idle();
      // promote the block
      @(negedge clk);
      fill_valid = 1; fill_blk = B;
      for (int k = 0; k < BODY_FLITS; k++) fill_data[k] = word(B, k);
      #1; checks++; if (!fill_ready) failures++;
      @(negedge clk); fill_valid = 0;
      // read from (0,2): served by the RBC, reply leaves west
      rq = mk_head(2, 2, 0, 2, M_READ, B);
      send(P_WEST, 0, rq, 0, P_LOCAL, mk_head(2, 2, 0, 2, M_READ, B, 1));
      begin
        logic [FLIT_W-1:0] w [$];
        w.push_back(mk_head(0, 2, 2, 2, M_DATA, B));
        for (int k = 0; k < BODY_FLITS; k++) w.push_back(word(B, k));
        expect_pkt(P_WEST, w);
      end
      wait_idle();
      // read from the home tile's own core: reply comes back on the local port
      rq = mk_head(2, 2, 2, 2, M_READ, B);
      send(P_LOCAL, 1, rq, 0, P_LOCAL, mk_head(2, 2, 2, 2, M_READ, B, 1));
      begin
        logic [FLIT_W-1:0] w [$];
        w.push_back(mk_head(2, 2, 2, 2, M_DATA, B));
        for (int k = 0; k < BODY_FLITS; k++) w.push_back(word(B, k));
        expect_pkt(P_LOCAL, w);
      end
      wait_idle();
      // write from (2,5): invalidates, passes unmarked
      rq = mk_head(2, 2, 2, 5, M_WRITE, B);
      send(P_SOUTH, 2, rq, 0, P_LOCAL, rq);
      wait_idle();
      rq = mk_head(2, 2, 4, 2, M_READ, B);
      send(P_EAST, 0, rq, 0, P_LOCAL, rq);
      wait_idle();
      checks++;
      if (n_rh != 2 || n_wi != 1) begin failures++; $display("FAIL rbc events rh=%0d wi=%0d", n_rh, n_wi); end
    end

    // ---- random traffic
    slow_sinks = 1;
    for (int n = 0; n < 400; n++) begin
      int p, v, dx, dy, nb;
      logic [FLIT_W-1:0] h;
      p = $urandom % NP;
      v = (p == 0) ? $urandom % 2 : $urandom % NUM_VC;
      dx = $urandom % 8; dy = $urandom % 8;
      nb = $urandom % 5;
      h = mk_head(dx, dy, p, v, M_DATA, blk_t'(1000 + n));
      send(p, v, h, nb, int'(route(dx, dy)), h);
    end
    wait_idle();
    begin
      int left;
      left = 0;
      for (int o = 0; o < NP; o++) left += exp_q[o].size();
      checks++;
      if (left != 0) begin failures++; $display("FAIL %0d packets not delivered", left); end
    end
    checks++;
    if (n_sf == 0 || n_cs == 0) begin failures++; $display("FAIL spec_fail=%0d credit_stall=%0d", n_sf, n_cs); end
    $display("delivered=%0d spec_fail=%0d credit_stall=%0d", delivered, n_sf, n_cs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
