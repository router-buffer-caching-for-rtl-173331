// tb_rbc_classifier: directed sequences on the classifier.
//  1. A block whose sharer count exceeds ST=5 records its page and zone; a
//     count of exactly 5 does not.
//  2. An E->S read to another block of the same zone is promoted, one of a
//     different zone of the same page is not (page partitioning), one of an
//     unknown page is not.
//  3. Four consecutive low-reuse evictions (hits < 3) trigger pollution
//     control, which removes the two most recently used zones; an eviction
//     with 3 hits lowers the low-reuse count.
module tb_rbc_classifier;
  import rbc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic shr_valid, e2s_valid, e2s_promote, rep_valid, ev_insert, ev_ht_hit, ev_pollution;
  blk_t shr_blk, e2s_blk, rep_blk;
  logic [6:0] shr_count;
  logic [HIT_CTR_W-1:0] rep_hits;
  logic [2:0] ht_count;
  int n_poll = 0;

  rbc_classifier dut (.clk, .rst_n, .shr_valid, .shr_blk, .shr_count, .e2s_valid, .e2s_blk,
                      .e2s_promote, .rep_valid, .rep_blk, .rep_hits, .ev_insert, .ev_ht_hit,
                      .ev_pollution, .ht_count);

  always @(posedge clk) if (ev_pollution) n_poll++;

  // block address from page, zone and block-in-zone
  function automatic blk_t mk(int page, int zone, int b);
    return blk_t'((page << 6) | (zone << 4) | b);
  endfunction

  task automatic sharers(blk_t b, int cnt);
    @(negedge clk); shr_valid = 1; shr_blk = b; shr_count = 7'(cnt);
    @(negedge clk); shr_valid = 0;
  endtask

  task automatic ask(blk_t b, logic exp, string what);
    @(negedge clk); e2s_valid = 1; e2s_blk = b; #1;
    checks++;
    if (e2s_promote !== exp) begin failures++; $display("FAIL %s", what); end
    @(negedge clk); e2s_valid = 0;
  endtask

  task automatic report(int hits);
    @(negedge clk); rep_valid = 1; rep_blk = '0; rep_hits = 2'(hits);
    @(negedge clk); rep_valid = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shr_valid = 0; e2s_valid = 0; rep_valid = 0; shr_blk = '0; e2s_blk = '0;
    shr_count = '0; rep_hits = '0; rep_blk = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. threshold
    sharers(mk(10, 1, 3), 5);
    ask(mk(10, 1, 7), 0, "count == ST must not record");
    sharers(mk(10, 1, 3), 6);
    checks++; if (ht_count != 1) failures++;
    // 2. zones
    ask(mk(10, 1, 7), 1, "same zone promotes");
    ask(mk(10, 2, 7), 0, "other zone of same page must not promote");
    ask(mk(11, 1, 7), 0, "unknown page must not promote");
    // fill the table with three more zones (MRU order: 13.0, 12.0, 11.3, 10.1)
    sharers(mk(11, 3, 0), 9);
    sharers(mk(12, 0, 0), 9);
    sharers(mk(13, 0, 0), 9);
    checks++; if (ht_count != 4) failures++;
    // a fifth zone replaces the LRU one, 10.1
    sharers(mk(14, 2, 0), 9);
    ask(mk(10, 1, 0), 0, "LRU zone must be replaced");
    ask(mk(11, 3, 5), 1, "table keeps 11.3");
    // MRU order now: 11.3, 14.2, 13.0, 12.0
    // 3. pollution: hits 0,1 then a good one (3) then 2,2,0 -> 4th low fires
    report(0); report(1); report(3); report(2); report(2);
    checks++; if (n_poll != 0) failures++;
    report(0);
    repeat (3) @(negedge clk);
    checks++; if (n_poll != 1) failures++;
    checks++; if (ht_count != 2) failures++;
    ask(mk(11, 3, 1), 0, "MRU zone 11.3 removed");
    ask(mk(14, 2, 1), 0, "second MRU zone 14.2 removed");
    ask(mk(13, 0, 1), 1, "13.0 kept");
    ask(mk(12, 0, 1), 1, "12.0 kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
