// lru_ranks: recency ranks for N entries, rank 0 = most recently used.
//
// The ranks always form a permutation of 0..N-1. `touch` moves an entry to
// rank 0 and ages every entry that was more recent than it; `demote` moves an
// entry to rank N-1 and promotes every entry that was less recent. Callers
// demote entries that they invalidate, so valid entries hold ranks
// 0..V-1 and the least recently used valid entry is the one of largest rank.
// At most one of touch/demote acts per cycle; touch wins.
module lru_ranks #(
  parameter int unsigned N = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         touch,
  input  logic [$clog2(N)-1:0]         touch_idx,
  input  logic                         demote,
  input  logic [$clog2(N)-1:0]         demote_idx,
  output logic [N-1:0][$clog2(N)-1:0]  rank
);
  localparam int unsigned RW = $clog2(N);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) rank[i] <= RW'(i);
    end else if (touch) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (RW'(i) == touch_idx)              rank[i] <= '0;
        else if (rank[i] < rank[touch_idx])   rank[i] <= rank[i] + 1'b1;
      end
    end else if (demote) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (RW'(i) == demote_idx)             rank[i] <= RW'(N - 1);
        else if (rank[i] > rank[demote_idx])  rank[i] <= rank[i] - 1'b1;
      end
    end
  end
endmodule
