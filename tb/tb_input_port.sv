// tb_input_port: random pushes into the three VC buffers and random pops,
// checked against one reference queue per VC (order kept per VC, VCs
// independent, full/empty flags exact).
module tb_input_port;
  import rbc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t in;
  logic  [NUM_VC-1:0] pop;
  flit_t [NUM_VC-1:0] front;
  logic  [NUM_VC-1:0] empty, full;
  flit_t q [NUM_VC][$];

  input_port dut (.clk, .rst_n, .in, .pop, .front, .empty, .full);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0; pop = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int v = 0; v < NUM_VC; v++) begin
        checks++;
        if (empty[v] !== (q[v].size() == 0) || full[v] !== (q[v].size() == BUF_DEPTH)) failures++;
        if (q[v].size() > 0) begin
          checks++;
          if (front[v] !== q[v][0]) failures++;
        end
      end
      // drive: one push on a random VC that has room, random pops
      in = '0;
      if ($urandom % 3 != 0) begin
        int v;
        v = $urandom % NUM_VC;
        if (q[v].size() < BUF_DEPTH || (q[v].size() == BUF_DEPTH && 0)) begin
          in.valid = 1'b1;
          in.flit  = {$urandom, $urandom, $urandom};
          in.flit.vc = VC_W'(v);
        end
      end
      for (int v = 0; v < NUM_VC; v++) pop[v] = (q[v].size() > 0) && ($urandom % 2 == 0);
      @(posedge clk);
      #1;
      for (int v = 0; v < NUM_VC; v++) if (pop[v]) void'(q[v].pop_front());
      if (in.valid) q[in.flit.vc].push_back(in.flit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
