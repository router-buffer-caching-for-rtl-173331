// tb_crossbar: random select patterns on the 5x5 crossbar; every output must
// carry the selected input's flit when valid and an idle flit otherwise.
module tb_crossbar;
  import rbc_pkg::*;
  int checks = 0, failures = 0;
  flit_t [NUM_PORTS-1:0] fin;
  logic  [NUM_PORTS-1:0] sv;
  logic  [NUM_PORTS-1:0][PORT_W-1:0] sel;
  link_t [NUM_PORTS-1:0] fout;

  crossbar dut (.in_flit(fin), .sel_valid(sv), .sel(sel), .out(fout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        fin[p] = {$urandom, $urandom, $urandom};
        sv[p]  = 1'($urandom);
        sel[p] = PORT_W'($urandom % NUM_PORTS);
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        checks++;
        if (fout[o].valid !== sv[o] || fout[o].flit !== (sv[o] ? fin[sel[o]] : '0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
