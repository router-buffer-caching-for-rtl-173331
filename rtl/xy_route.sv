// xy_route: the router's routing unit, dimension-ordered X-Y routing.
//
// A packet first travels along X until its column matches, then along Y, and
// leaves on the local port at its destination tile. The unit is purely
// combinational and is evaluated once per head flit, in the first router
// stage. `at_home` is high when the destination is this tile, which is also
// the condition for an RBC lookup. X-Y routing is the source's choice; the
// direction names (east = +x, south = +y) are this design's.
module xy_route
  import rbc_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              out_port,
  output logic               at_home
);
  always_comb begin
    at_home = 1'b0;
    if (dst_x > cur_x)      out_port = P_EAST;
    else if (dst_x < cur_x) out_port = P_WEST;
    else if (dst_y > cur_y) out_port = P_SOUTH;
    else if (dst_y < cur_y) out_port = P_NORTH;
    else begin
      out_port = P_LOCAL;
      at_home  = 1'b1;
    end
  end
endmodule
