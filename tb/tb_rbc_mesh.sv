// tb_rbc_mesh: end-to-end run of a 4x4 mesh of RBC tiles.
//
// Around the mesh the testbench models what a tile has besides its router
// and classifier:
//  * a core per tile with one outstanding L1 miss at a time. Most of its
//    misses go to a few hot pages whose home is one of two hotspot tiles
//    (reads, with occasional writes and upgrades); the rest go to private
//    blocks spread over all tiles. Requests use VC0 of the local port.
//  * an LLC slice and directory per tile (MESI-like: I, E, S, M per block
//    with a sharer set), served the moment a request is ejected. Replies use
//    VC1 of the local port. A read to a block in E consults the classifier
//    and, if it says so, promotes the block into the tile's RBC. Every read
//    reports the block's sharer count to the classifier. A write or upgrade
//    makes the block M. Now and then the slice evicts a block and tells the
//    RBC to drop it. A read that arrives marked "serviced" only adds the
//    sharer and must find the block in S.
//  * home tile of a block: its page number modulo the number of tiles, so a
//    page lives in one slice.
// Every block's data is a function of its address and a version number that
// each write increments; a core checks every reply's data and that its
// version is not older than the one current when the miss was issued, which
// would expose a stale RBC copy. Each mechanism of the design (RBC hits,
// write invalidations, LLC invalidations, promotions, replacements, full
// reply queues, history-table inserts and hits, pollution control,
// speculation failures, credit stalls) is counted and must occur.
module tb_rbc_mesh;
  import rbc_pkg::*;
  localparam int MX = 4, MY = 4, NT = MX * MY;
  localparam int N_REQ = 300;         // misses per core
  localparam int HOT_A = 5, HOT_B = 10;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  link_t        [NT-1:0] nic_in, nic_out;
  credit_t      [NT-1:0] nic_in_credit, nic_out_credit;
  logic         [NT-1:0] shr_valid, e2s_valid, e2s_promote, fill_valid, fill_ready;
  logic         [NT-1:0] inv_valid, inv_ready, rep_valid;
  blk_t         [NT-1:0] shr_blk, e2s_blk, fill_blk, inv_blk, rep_blk;
  logic         [NT-1:0][6:0] shr_count;
  blk_data_t    [NT-1:0] fill_data;
  logic         [NT-1:0][HIT_CTR_W-1:0] rep_hits;
  tile_events_t [NT-1:0] events;

  rbc_mesh #(.MESH_X(MX), .MESH_Y(MY)) dut (
    .clk, .rst_n,
    .nic_in, .nic_in_credit, .nic_out, .nic_out_credit,
    .llc_shr_valid(shr_valid), .llc_shr_blk(shr_blk), .llc_shr_count(shr_count),
    .llc_e2s_valid(e2s_valid), .llc_e2s_blk(e2s_blk), .llc_e2s_promote(e2s_promote),
    .llc_fill_valid(fill_valid), .llc_fill_blk(fill_blk), .llc_fill_data(fill_data),
    .llc_fill_ready(fill_ready),
    .llc_inv_valid(inv_valid), .llc_inv_blk(inv_blk), .llc_inv_ready(inv_ready),
    .llc_rep_valid(rep_valid), .llc_rep_blk(rep_blk), .llc_rep_hits(rep_hits),
    .events
  );

  // ---------------------------------------------------------------- counters
  int n_read_hit, n_write_inv, n_llc_inv, n_fill, n_evict, n_reply_stall;
  int n_ht_insert, n_ht_hit, n_pollution, n_spec_fail, n_credit_stall;
  int n_served_rbc, n_served_llc, n_race;
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NT; t++) begin
      n_read_hit     += int'(events[t].rbc_read_hit);
      n_write_inv    += int'(events[t].rbc_write_inv);
      n_llc_inv      += int'(events[t].rbc_llc_inv);
      n_fill         += int'(events[t].rbc_fill);
      n_evict        += int'(events[t].rbc_evict);
      n_reply_stall  += int'(events[t].rbc_reply_stall);
      n_ht_insert    += int'(events[t].ht_insert);
      n_ht_hit       += int'(events[t].ht_hit);
      n_pollution    += int'(events[t].pollution);
      n_spec_fail    += int'(events[t].spec_fail);
      n_credit_stall += int'(events[t].credit_stall);
    end
  end

  // ---------------------------------------------------------------- helpers
  function automatic int home_of(blk_t b);
    return int'(b[BLK_W-1:6]) % NT;
  endfunction

  function automatic logic [FLIT_W-1:0] word(blk_t b, int k, int ver);
    return {b[31:0] ^ 32'hB10C_0000, 16'(ver), 16'(k)};
  endfunction

  function automatic logic [FLIT_W-1:0] mk_head(int dst, int src, msg_e m, blk_t b);
    head_t h;
    h = '0;
    h.dst_x = 3'(dst % MX); h.dst_y = 3'(dst / MX);
    h.src_x = 3'(src % MX); h.src_y = 3'(src / MX);
    h.msg = m; h.blk = b;
    return h;
  endfunction

  // ---------------------------------------------------------------- NIC
  typedef struct { flit_t flits [$]; } pkt_t;
  pkt_t inj_q [NT][$];
  int   inj_beat [NT];
  int   inj_cred [NT][2];
  logic [FLIT_W-1:0] rx [NT][NUM_VC][$];

  function automatic void inject(int t, int vc, logic [FLIT_W-1:0] h, int nbody,
                                 blk_t b, int ver);
    pkt_t p;
    flit_t f;
    f.vc = VC_W'(vc);
    f.ftype = (nbody == 0) ? F_HEADTAIL : F_HEAD;
    f.data = h;
    p.flits.push_back(f);
    for (int k = 0; k < nbody; k++) begin
      f.ftype = (k == nbody - 1) ? F_TAIL : F_BODY;
      f.data = word(b, k, ver);
      p.flits.push_back(f);
    end
    inj_q[t].push_back(p);
  endfunction

  // ---------------------------------------------------------------- LLC
  typedef enum { ST_I, ST_E, ST_S, ST_M } dstate_e;
  typedef struct { dstate_e st; logic [NT-1:0] sharers; int ver; } dir_t;
  dir_t dir [blk_t];

  typedef struct { blk_t b; int ver; } fillreq_t;
  fillreq_t fill_q [NT][$];
  blk_t     inv_q  [NT][$];

  function automatic int popcount(logic [NT-1:0] v);
    int c;
    c = 0;
    for (int i = 0; i < NT; i++) c += int'(v[i]);
    return c;
  endfunction

  // ---------------------------------------------------------------- cores
  int   issued [NT], done [NT];
  bit   outstanding [NT];
  blk_t out_blk [NT];
  int   out_ver [NT];
  int   think [NT];
  bit   force_rd [NT];
  blk_t force_blk;

  // Directed burst: cores lo..hi read block b at once; wait for all replies.
  task automatic burst(blk_t b, int lo, int hi);
    int g;
    force_blk = b;
    for (int t = lo; t <= hi; t++) force_rd[t] = 1;
    g = 0;
    while (g < 5000) begin
      int busy;
      busy = 0;
      for (int t = 0; t < NT; t++) busy += int'(force_rd[t]) + int'(outstanding[t]);
      if (busy == 0) break;
      @(posedge clk); g++;
    end
  endtask

  function automatic blk_t pick_block(int core, output msg_e m);
    int r;
    blk_t b;
    r = $urandom % 100;
    if (r < 75) begin
      // hot pages: pages HOT_A, HOT_A+NT, HOT_B, HOT_B+NT; blocks 0..23 of
      // each, half of the misses to the four hottest blocks 0..3
      int pg, blkno;
      case ($urandom % 4)
        0: pg = HOT_A; 1: pg = HOT_A + NT; 2: pg = HOT_B; default: pg = HOT_B + NT;
      endcase
      blkno = ($urandom % 2) ? $urandom % 4 : $urandom % 24;
      b = blk_t'((pg << 6) | blkno);
      r = $urandom % 100;
      m = (r < 4) ? M_WRITE : (r < 6) ? M_UPGRADE : M_READ;
    end else begin
      // private block of this core in a page homed anywhere
      b = blk_t'(((1000 + core * 8 + ($urandom % 8)) << 6) | ($urandom % 64));
      m = ($urandom % 4 == 0) ? M_WRITE : M_READ;
    end
    return b;
  endfunction

  // ---------------------------------------------------------------- engine
  // Ejected packets, LLC actions, core issue and NIC injection, once per cycle
  // at the falling edge; the classifier's answer is sampled 1 time unit later.
  typedef struct { int t; int src; msg_e m; blk_t b; logic svc; } llcreq_t;

  always @(negedge clk) if (rst_n) begin
    llcreq_t reqs [$];
    reqs.delete();
    for (int t = 0; t < NT; t++) begin
      shr_valid[t] = 0; e2s_valid[t] = 0; fill_valid[t] = 0; inv_valid[t] = 0;
      nic_out_credit[t] = '0;
      // ejection: the NIC always accepts and returns the credit at once
      if (nic_out[t].valid) begin
        flit_t f;
        f = nic_out[t].flit;
        nic_out_credit[t].valid = 1'b1;
        nic_out_credit[t].vc = f.vc;
        rx[t][f.vc].push_back(f.data);
        if (is_tail(f.ftype)) begin
          head_t h;
          h = head_t'(rx[t][f.vc][0]);
          if (is_request(h.msg)) begin
            reqs.push_back('{t, int'(h.src_y) * MX + int'(h.src_x), h.msg, h.blk, h.serviced});
          end else begin
            // a reply to this tile's core
            checks++;
            if (!outstanding[t] || h.blk != out_blk[t]) begin
              failures++; $display("FAIL tile %0d: unexpected reply for %h", t, h.blk);
            end else if (h.msg == M_DATA) begin
              int ver;
              ver = int'(rx[t][f.vc][1][31:16]);
              if (rx[t][f.vc].size() != BLK_FLITS || ver < out_ver[t]) begin
                failures++; $display("FAIL tile %0d: stale or short data for %h", t, h.blk);
              end
              for (int k = 1; k < rx[t][f.vc].size(); k++)
                if (rx[t][f.vc][k] != word(h.blk, k - 1, ver)) begin
                  failures++; $display("FAIL tile %0d: data word %0d", t, k);
                end
            end
            if (outstanding[t] && h.blk == out_blk[t]) begin
              outstanding[t] = 0; done[t]++; think[t] = $urandom % 4;
            end
          end
          rx[t][f.vc].delete();
        end
      end
    end

    // LLC: directory actions and classifier queries
    foreach (reqs[i]) begin
      int t, s;
      blk_t b;
      t = reqs[i].t; s = reqs[i].src; b = reqs[i].b;
      if (!dir.exists(b)) dir[b] = '{ST_I, '0, 0};
      if (reqs[i].m == M_READ) begin
        if (reqs[i].svc) begin
          // a write or an eviction may have overtaken this request on its way
          // from the router to the slice; such races are counted, not failed
          if (dir[b].st != ST_S) n_race++;
          n_served_rbc++;
        end else begin
          n_served_llc++;
          if (dir[b].st == ST_E && !dir[b].sharers[s]) begin
            e2s_valid[t] = 1; e2s_blk[t] = b;
          end
          inject(t, 1, mk_head(s, t, M_DATA, b), BODY_FLITS, b, dir[b].ver);
        end
        if (dir[b].st == ST_I) dir[b].st = ST_E;
        else if (dir[b].sharers != (NT'(1) << s)) dir[b].st = ST_S;
        dir[b].sharers[s] = 1'b1;
        shr_valid[t] = 1; shr_blk[t] = b; shr_count[t] = 7'(popcount(dir[b].sharers));
      end else begin
        n_served_llc++;
        dir[b].ver++;
        dir[b].st = ST_M;
        dir[b].sharers = NT'(1) << s;
        inv_q[t].push_back(b);          // keep any RBC copy out, whatever its timing
        if (reqs[i].m == M_WRITE) inject(t, 1, mk_head(s, t, M_DATA, b), BODY_FLITS, b, dir[b].ver);
        else inject(t, 1, mk_head(s, t, M_ACK, b), 0, b, dir[b].ver);
      end
    end

    // occasional LLC eviction of a hot block
    if ($urandom % 400 == 0) begin
      blk_t b;
      b = blk_t'((((cyc % 2) ? HOT_A : HOT_B) << 6) | ($urandom % 24));
      if (dir.exists(b)) begin dir[b].st = ST_I; dir[b].sharers = '0; end
      inv_q[home_of(b)].push_back(b);
    end

    for (int t = 0; t < NT; t++) begin
      if (inv_q[t].size() > 0) begin inv_valid[t] = 1; inv_blk[t] = inv_q[t][0]; end
      else if (fill_q[t].size() > 0) begin
        fill_valid[t] = 1; fill_blk[t] = fill_q[t][0].b;
        for (int k = 0; k < BODY_FLITS; k++) fill_data[t][k] = word(fill_q[t][0].b, k, fill_q[t][0].ver);
      end
    end

    #1;
    for (int t = 0; t < NT; t++) begin
      if (e2s_valid[t] && e2s_promote[t])
        fill_q[t].push_back('{e2s_blk[t], dir[e2s_blk[t]].ver});
      if (inv_valid[t] && inv_ready[t]) void'(inv_q[t].pop_front());
      else if (fill_valid[t] && fill_ready[t]) void'(fill_q[t].pop_front());
    end

    // cores issue misses; NIC injects one flit per tile per cycle
    for (int t = 0; t < NT; t++) begin
      if (nic_in_credit[t].valid) inj_cred[t][nic_in_credit[t].vc]++;
      if (!outstanding[t] && force_rd[t]) begin
        force_rd[t] = 0;
        out_blk[t] = force_blk;
        out_ver[t] = dir.exists(force_blk) ? dir[force_blk].ver : 0;
        outstanding[t] = 1;
        issued[t]++;
        inject(t, 0, mk_head(home_of(force_blk), t, M_READ, force_blk), 0, force_blk, 0);
      end else if (!outstanding[t] && issued[t] < N_REQ) begin
        if (think[t] > 0) think[t]--;
        else begin
          msg_e m;
          blk_t b;
          b = pick_block(t, m);
          out_blk[t] = b;
          out_ver[t] = dir.exists(b) ? dir[b].ver : 0;
          outstanding[t] = 1;
          issued[t]++;
          inject(t, 0, mk_head(home_of(b), t, m, b), 0, b, 0);
        end
      end
      nic_in[t] = '0;
      if (inj_q[t].size() > 0) begin
        flit_t f;
        f = inj_q[t][0].flits[inj_beat[t]];
        if (inj_cred[t][f.vc] > 0) begin
          nic_in[t].valid = 1'b1;
          nic_in[t].flit = f;
          inj_cred[t][f.vc]--;
          if (inj_beat[t] == inj_q[t][0].flits.size() - 1) begin
            inj_beat[t] = 0; void'(inj_q[t].pop_front());
          end else inj_beat[t]++;
        end
      end
    end
  end

  // ---------------------------------------------------------------- control
  task automatic finish_report();
    int total;
    total = 0;
    for (int t = 0; t < NT; t++) total += done[t];
    $display("misses done=%0d served by RBC=%0d by LLC=%0d races=%0d cycles=%0d", total, n_served_rbc, n_served_llc, n_race, cyc);
    $display("rbc read_hit=%0d write_inv=%0d llc_inv=%0d fill=%0d evict=%0d reply_stall=%0d",
             n_read_hit, n_write_inv, n_llc_inv, n_fill, n_evict, n_reply_stall);
    $display("ht insert=%0d hit=%0d pollution=%0d spec_fail=%0d credit_stall=%0d",
             n_ht_insert, n_ht_hit, n_pollution, n_spec_fail, n_credit_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    finish_report();
  end

  initial begin
    nic_in = '0; nic_out_credit = '0;
    shr_valid = '0; shr_blk = '0; shr_count = '0; e2s_valid = '0; e2s_blk = '0;
    fill_valid = '0; fill_blk = '0; fill_data = '0; inv_valid = '0; inv_blk = '0;
    n_read_hit = 0; n_write_inv = 0; n_llc_inv = 0; n_fill = 0; n_evict = 0;
    n_reply_stall = 0; n_ht_insert = 0; n_ht_hit = 0; n_pollution = 0;
    n_spec_fail = 0; n_credit_stall = 0; n_served_rbc = 0; n_served_llc = 0; n_race = 0;
    for (int t = 0; t < NT; t++) begin
      issued[t] = 0; done[t] = 0; outstanding[t] = 0; force_rd[t] = 0; think[t] = t % 7;
      inj_beat[t] = 0; inj_cred[t][0] = BUF_DEPTH; inj_cred[t][1] = BUF_DEPTH;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    begin
      int total;
      do begin
        @(posedge clk);
        total = 0;
        for (int t = 0; t < NT; t++) total += done[t];
      end while (total < NT * N_REQ);
    end
    // burst: a fresh zone becomes hot, one of its blocks is promoted on its
    // E->S transition, then every core reads it at once
    begin
      blk_t y, x;
      y = blk_t'((HOT_A << 6) | 40);
      x = blk_t'((HOT_A << 6) | 41);
      burst(y, 0, 6);
      burst(x, 0, 0);
      burst(x, 1, 1);
      burst(x, 0, NT - 1);
    end
    repeat (50) @(posedge clk);
    checks++;
    if (n_served_rbc != n_read_hit) begin failures++; $display("FAIL serviced count mismatch"); end
    begin
      int counts [11];
      counts = '{n_read_hit, n_write_inv, n_llc_inv, n_fill, n_evict, n_reply_stall,
                 n_ht_insert, n_ht_hit, n_pollution, n_spec_fail, n_credit_stall};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    finish_report();
  end
endmodule
