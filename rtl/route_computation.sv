// route_computation: dimension-ordered XY routing for the 2D mesh. A head flit
// first travels along x until its column matches, then along y; at its own
// tile it leaves through the local port. DST is {x[1:0], y[1:0]}; east is
// x+1, south is y+1. The routing algorithm is this design's choice.
// Purely combinational.
module route_computation
  import noc_pkg::*;
(
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic [ADDR_W-1:0]  dst_i,
  output port_e              port_o
);
  logic [COORD_W-1:0] dx, dy;
  assign dx = dst_i[ADDR_W-1 -: COORD_W];
  assign dy = dst_i[COORD_W-1:0];

  always_comb begin
    if      (dx > my_x) port_o = PORT_E;
    else if (dx < my_x) port_o = PORT_W;
    else if (dy > my_y) port_o = PORT_S;
    else if (dy < my_y) port_o = PORT_N;
    else                port_o = PORT_L;
  end
endmodule
