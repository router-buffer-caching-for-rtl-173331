// tb_rbc: directed test of the router buffer cache at its default size of
// 8 entries x 9 flits.
// A monitor checks every reply flit against a list of expected replies
// (requester, block, the block's eight data words, head/body/tail marking,
// VC) and the one-cycle gap between an accepted read hit and its head flit
// when the queue was idle. The sequence covers: fills into empty entries,
// read hits and misses, LRU replacement with the reported hit count
// (including a saturated count of 3), invalidation by a write and by the LLC
// controller, refills into invalidated entries, a full reply queue refusing
// a read hit, the busy rule, and lookup priority over fills.
module tb_rbc;
  import rbc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lk_valid, lk_hit, lk_accept, inv_valid, inv_ready, fill_valid, fill_ready;
  msg_e lk_msg;
  blk_t lk_blk, inv_blk, fill_blk, ev_blk;
  logic [COORD_W-1:0] lk_src_x, lk_src_y;
  blk_data_t fill_data;
  logic ev_valid, rp_valid, rp_ready;
  logic [HIT_CTR_W-1:0] ev_hits;
  flit_t rp_flit;
  logic e_rh, e_wi, e_li, e_f, e_rs;

  rbc dut (.clk, .rst_n, .my_x(3'd2), .my_y(3'd3),
           .lk_valid, .lk_msg, .lk_blk, .lk_src_x, .lk_src_y, .lk_hit, .lk_accept,
           .inv_valid, .inv_blk, .inv_ready, .fill_valid, .fill_blk, .fill_data, .fill_ready,
           .ev_valid, .ev_blk, .ev_hits, .rp_valid, .rp_flit, .rp_ready,
           .ev_read_hit(e_rh), .ev_write_inv(e_wi), .ev_llc_inv(e_li), .ev_fill(e_f),
           .ev_reply_stall(e_rs));

  function automatic blk_t B(int i);
    return blk_t'(42'h3_0000_0000 + i * 64 + 5);
  endfunction

  function automatic logic [FLIT_W-1:0] word(blk_t b, int k);
    return {b[31:0] ^ 32'hC0FF_EE00, 24'(k * 7 + 1), 8'(k)};
  endfunction

  // ---------------------------------------------------------- reply monitor
  typedef struct { blk_t blk; int x; int y; } exp_t;
  exp_t exp_q [$];
  int beat = 0, replies = 0;

  always @(posedge clk) if (rst_n && rp_valid && rp_ready) begin
    head_t h;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected reply flit"); end
    else begin
      if (rp_flit.vc != VC_W'(RBC_VC)) failures++;
      if (beat == 0) begin
        h = head_t'(rp_flit.data);
        if (rp_flit.ftype != F_HEAD || h.msg != M_DATA || h.blk != exp_q[0].blk ||
            h.dst_x != 3'(exp_q[0].x) || h.dst_y != 3'(exp_q[0].y) ||
            h.src_x != 3'd2 || h.src_y != 3'd3) begin
          failures++; $display("FAIL reply head %h", rp_flit);
        end
      end else begin
        if (rp_flit.ftype != (beat == 8 ? F_TAIL : F_BODY) ||
            rp_flit.data != word(exp_q[0].blk, beat - 1)) begin
          failures++; $display("FAIL reply body beat %0d", beat);
        end
      end
      if (beat == 8) begin beat = 0; void'(exp_q.pop_front()); replies++; end
      else beat++;
    end
  end

  // ---------------------------------------------------------- drivers
  task automatic fill(int i, logic exp_ev, int ev_i = 0, int ev_h = 0);
    @(negedge clk);
    fill_valid = 1; fill_blk = B(i);
    for (int k = 0; k < BODY_FLITS; k++) fill_data[k] = word(B(i), k);
    #1;
    checks++; if (!fill_ready) begin failures++; $display("FAIL fill %0d not ready", i); end
    @(negedge clk); fill_valid = 0;
    checks++;
    if (ev_valid !== exp_ev || (exp_ev && (ev_blk != B(ev_i) || ev_hits != 2'(ev_h)))) begin
      failures++; $display("FAIL fill %0d eviction report v=%0d blk=%h hits=%0d", i, ev_valid, ev_blk, ev_hits);
    end
  endtask

  task automatic look(msg_e m, int i, logic exp_hit, logic exp_acc = 1, int sx = 1, int sy = 1);
    @(negedge clk);
    lk_valid = 1; lk_msg = m; lk_blk = B(i); lk_src_x = 3'(sx); lk_src_y = 3'(sy);
    #1;
    checks++;
    if (lk_hit !== exp_hit || lk_accept !== exp_acc) begin
      failures++; $display("FAIL lookup %0d hit=%0d acc=%0d", i, lk_hit, lk_accept);
    end
    if (m == M_READ && exp_hit && exp_acc) exp_q.push_back('{B(i), sx, sy});
    @(negedge clk); lk_valid = 0;
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    while (exp_q.size() != 0 && guard < 200) begin @(negedge clk); guard++; end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lk_valid = 0; inv_valid = 0; fill_valid = 0; rp_ready = 1;
    lk_msg = M_READ; lk_blk = '0; inv_blk = '0; fill_blk = '0; fill_data = '0;
    lk_src_x = 0; lk_src_y = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) fill(i, 0);
    // read hit; head flit one cycle after the lookup, 9 flits back to back
    @(negedge clk);
    lk_valid = 1; lk_msg = M_READ; lk_blk = B(3); lk_src_x = 1; lk_src_y = 4;
    exp_q.push_back('{B(3), 1, 4});
    #1; checks++; if (!lk_hit || !lk_accept || rp_valid) failures++;
    @(negedge clk); lk_valid = 0;
    for (int k = 0; k < 9; k++) begin
      checks++; if (!rp_valid) begin failures++; $display("FAIL reply gap at beat %0d", k); end
      @(negedge clk);
    end
    checks++; if (rp_valid || replies != 1) failures++;
    look(M_READ, 20, 0);
    look(M_READ, 0, 1);
    drain();
    fill(8, 1, 1, 0);                       // LRU B1 replaced, 0 hits
    for (int r = 0; r < 3; r++) begin look(M_READ, 3, 1); drain(); end
    look(M_WRITE, 5, 1);                    // write hit invalidates
    look(M_READ, 5, 0);
    @(negedge clk); inv_valid = 1; inv_blk = B(6); #1;
    checks++; if (!inv_ready) failures++;
    @(negedge clk); inv_valid = 0;
    look(M_READ, 6, 0);
    look(M_UPGRADE, 30, 0);
    fill(9, 0); fill(10, 0);                // into the two invalid entries
    fill(11, 1, 2, 0);
    fill(12, 1, 4, 0);
    fill(13, 1, 7, 0);
    fill(14, 1, 0, 1);
    fill(15, 1, 8, 0);
    fill(16, 1, 3, 3);                      // saturated counter reported as 3
    fill(16, 0);                            // refill in place: no report
    // full reply queue refuses a read hit; busy entry B10 survives
    rp_ready = 0;
    for (int r = 0; r < 4; r++) look(M_READ, 10, 1, 1, r, 2);
    look(M_READ, 10, 1, 0);                 // refused
    checks++; if (exp_q.size() != 4) failures++;
    // B10 is LRU among 9..16? make every other entry recent, then fill:
    // the victim must not be the busy B10
    for (int i = 11; i <= 16; i++) begin
      // (reads would be refused; fills of present blocks refresh recency)
      fill(i, 0);
    end
    fill(9, 0);
    fill(40, 1, 11, 0);                     // LRU idle entry is B11, not B10
    // lookups win over fills
    @(negedge clk); lk_valid = 1; lk_msg = M_READ; lk_blk = B(99); fill_valid = 1; fill_blk = B(41);
    #1; checks++; if (fill_ready) failures++;
    @(negedge clk); lk_valid = 0; fill_valid = 0;
    rp_ready = 1;
    drain();
    checks++; if (replies != 9) begin failures++; $display("FAIL replies=%0d", replies); end
    look(M_READ, 10, 1);
    drain();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
