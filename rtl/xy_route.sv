// xy_route: route computation (RC) for dimension-order XY routing.
//
// A packet first travels along X until its column matches the destination,
// then along Y; at the destination it leaves through the local port. Purely
// combinational. Direction names: EAST is towards larger x, SOUTH towards
// larger y (this orientation is a choice of this design).
module xy_route
  import noc_pkg::*;
(
  input  coord_t here_i,
  input  coord_t dst_i,
  output port_e  port_o
);
  always_comb begin
    if (dst_i.x > here_i.x)      port_o = P_EAST;
    else if (dst_i.x < here_i.x) port_o = P_WEST;
    else if (dst_i.y > here_i.y) port_o = P_SOUTH;
    else if (dst_i.y < here_i.y) port_o = P_NORTH;
    else                         port_o = P_LOCAL;
  end
endmodule
