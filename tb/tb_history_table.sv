// tb_history_table: random inserts, touching lookups, MRU removals and
// clears on the 4-entry table, checked every cycle against a reference list
// kept in recency order (hit/miss of the lookup key and the entry count).
// Keys come from a small pool so that hits, refreshes and LRU replacement
// all happen often.
module tb_history_table;
  import rbc_pkg::*;
  localparam int KW = PAGE_W + ZONE_W;
  int checks = 0, failures = 0;
  int n_evict = 0, n_rm = 0, n_hit = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [KW-1:0] lk_key, ins_key;
  logic lk_touch, lk_hit, ins_valid, rm_mru, clear;
  logic [2:0] count;
  logic [KW-1:0] model [$];

  history_table dut (.clk, .rst_n, .lk_key, .lk_touch, .lk_hit, .ins_valid, .ins_key,
                     .rm_mru, .clear, .count);

  function automatic int find(logic [KW-1:0] k);
    foreach (model[i]) if (model[i] == k) return i;
    return -1;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lk_key = '0; ins_key = '0; lk_touch = 0; ins_valid = 0; rm_mru = 0; clear = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int op, at;
      @(negedge clk);
      op = $urandom % 100;
      lk_key = KW'($urandom % 7);
      ins_key = KW'($urandom % 7);
      lk_touch = (op < 40);
      ins_valid = (op >= 40 && op < 85);
      rm_mru = (op >= 85 && op < 98);
      clear = (op >= 98);
      #1;
      checks++;
      if (lk_hit !== (find(lk_key) >= 0)) failures++;
      checks++;
      if (count !== 3'(model.size())) failures++;
      @(posedge clk);
      if (clear) model.delete();
      else if (rm_mru) begin
        if (model.size() > 0) begin void'(model.pop_front()); n_rm++; end
      end else if (ins_valid) begin
        at = find(ins_key);
        if (at >= 0) model.delete(at);
        else if (model.size() == 4) begin void'(model.pop_back()); n_evict++; end
        model.push_front(ins_key);
      end else if (lk_touch) begin
        at = find(lk_key);
        if (at >= 0) begin model.delete(at); model.push_front(lk_key); n_hit++; end
      end
    end
    checks++;
    if (n_evict == 0 || n_rm == 0 || n_hit == 0) failures++;
    $display("evictions=%0d removals=%0d touches=%0d", n_evict, n_rm, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
