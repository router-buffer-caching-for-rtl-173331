// tb_switch_allocator: random switch requests. Checks per cycle: a grant only
// for a requesting VC, at most one grant per input port and per output port,
// the crossbar select names the granted input, and some grant whenever
// anything requests. A VC that keeps requesting is served within 15 cycles.
module tb_switch_allocator;
  import rbc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NUM_PORTS-1:0][NUM_VC-1:0] req, grant;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][PORT_W-1:0] req_port;
  logic [NUM_PORTS-1:0] out_valid;
  logic [NUM_PORTS-1:0][PORT_W-1:0] out_sel;
  int wait_cnt;

  switch_allocator dut (.clk, .rst_n, .req, .req_port, .grant, .out_valid, .out_sel);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; req_port = '0; wait_cnt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NUM_PORTS; p++)
        for (int v = 0; v < NUM_VC; v++) begin
          req[p][v] = 1'($urandom);
          req_port[p][v] = PORT_W'($urandom % NUM_PORTS);
        end
      req[1][2] = 1'b1; req_port[1][2] = 3'd4;
      #1;
      begin
        int any_req, any_grant;
        int per_out [NUM_PORTS];
        any_req = 0; any_grant = 0;
        for (int o = 0; o < NUM_PORTS; o++) per_out[o] = 0;
        for (int p = 0; p < NUM_PORTS; p++) begin
          checks++;
          if (!$onehot0(grant[p])) failures++;
          for (int v = 0; v < NUM_VC; v++) begin
            if (req[p][v]) any_req = 1;
            if (grant[p][v]) begin
              any_grant = 1;
              checks++;
              if (!req[p][v]) failures++;
              per_out[req_port[p][v]]++;
              if (!out_valid[req_port[p][v]] || out_sel[req_port[p][v]] != PORT_W'(p)) failures++;
            end
          end
        end
        for (int o = 0; o < NUM_PORTS; o++) begin
          checks++;
          if (per_out[o] > 1 || (per_out[o] == 1) != out_valid[o]) failures++;
        end
        checks++;
        if (any_req && !any_grant) failures++;
        if (grant[1][2]) wait_cnt = 0; else wait_cnt++;
        checks++;
        if (wait_cnt > 15) failures++;
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
