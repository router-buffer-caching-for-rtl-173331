// tb_xy_route: exhaustive check of the X-Y routing unit over every pair of
// current and destination tiles of an 8x8 mesh, against a reference written
// from the rule "X first, then Y, local at the destination".
module tb_xy_route;
  import rbc_pkg::*;
  int checks = 0, failures = 0;
  logic [COORD_W-1:0] cx, cy, dx, dy;
  port_e op;
  logic  home;

  xy_route dut (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .out_port(op), .at_home(home));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++)
    for (int c = 0; c < 8; c++) for (int d = 0; d < 8; d++) begin
      port_e exp;
      cx = 3'(a); cy = 3'(b); dx = 3'(c); dy = 3'(d);
      #1;
      if (c > a) exp = P_EAST;
      else if (c < a) exp = P_WEST;
      else if (d > b) exp = P_SOUTH;
      else if (d < b) exp = P_NORTH;
      else exp = P_LOCAL;
      checks++;
      if (op !== exp || home !== (exp == P_LOCAL)) begin
        failures++;
        if (failures < 5) $display("FAIL cur=(%0d,%0d) dst=(%0d,%0d) got %s", a, b, c, d, op.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
