// tb_vc_allocator: random requests and busy VCs. Checks per cycle: grants go
// only to requesters, each granted VC is the lowest free VC of the requested
// output, one grant per output, and an output with a free VC and a requester
// always grants. A requester that keeps requesting one output must be served
// within NUM_PORTS*NUM_VC cycles (round robin).
module tb_vc_allocator;
  import rbc_pkg::*;
  localparam int NI = NUM_PORTS * NUM_VC;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NI-1:0] req, grant;
  logic [NI-1:0][PORT_W-1:0] req_port;
  logic [NUM_PORTS-1:0][NUM_VC-1:0] busy;
  logic [NI-1:0][VC_W-1:0] grant_vc;
  int wait_cnt;

  vc_allocator dut (.clk, .rst_n, .req, .req_port, .busy, .grant, .grant_vc);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; req_port = '0; busy = '0; wait_cnt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        req[i] = ($urandom % 2);
        req_port[i] = PORT_W'($urandom % NUM_PORTS);
      end
      // requester 0 always asks for output 2
      req[0] = 1'b1; req_port[0] = 3'd2;
      for (int o = 0; o < NUM_PORTS; o++) busy[o] = NUM_VC'($urandom % 8);
      busy[2] = (n % 4 == 0) ? '1 : 3'b001;
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        int ng, nreq, lowest;
        ng = 0; nreq = 0; lowest = -1;
        for (int v = NUM_VC - 1; v >= 0; v--) if (!busy[o][v]) lowest = v;
        for (int i = 0; i < NI; i++) if (req[i] && req_port[i] == o) begin
          nreq++;
          if (grant[i]) begin
            ng++;
            checks++;
            if (lowest < 0 || grant_vc[i] != VC_W'(lowest)) failures++;
          end
        end
        checks++;
        if (ng != ((nreq > 0 && lowest >= 0) ? 1 : 0)) failures++;
      end
      for (int i = 0; i < NI; i++) if (grant[i] && !req[i]) failures++;
      if (grant[0]) wait_cnt = 0;
      else if (busy[2] != '1) wait_cnt++;
      checks++;
      if (wait_cnt > NI) failures++;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
