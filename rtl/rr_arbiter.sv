// rr_arbiter: round-robin arbiter over N requesters.
//
// grant is one-hot (or zero when nothing requests) and is combinational in
// req. The priority pointer moves to the requester just after the winner when
// `advance` is high, so every requester that keeps requesting is served
// within N grants. The router uses it in route computation (one RBC lookup
// per cycle), in VC allocation and in both phases of switch allocation.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;

  always_comb begin
    grant = '0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (grant == '0 && req[idx]) grant[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (advance && grant != '0) begin
      for (int unsigned i = 0; i < N; i++)
        if (grant[i]) ptr <= IW'((i + 1) % N);
    end
  end
endmodule
