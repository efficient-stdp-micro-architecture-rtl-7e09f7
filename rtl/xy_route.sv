// xy_route: routing unit of a mesh router (deterministic XY routing).
//
// Combinational. Given the destination address of the flit at the head of
// an input buffer and the coordinates of this router, it picks the output
// port: first along x (east when the destination column is larger, west when
// smaller), then along y (south when the destination row is larger, north
// when smaller), and the local port once both coordinates match. XY routing
// is the algorithm of the network description; the direction names
// (north = y-1) are this design's convention.
module xy_route
  import snn_pkg::*;
(
  input  naddr_t             dst,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  output port_e              out_port
);
  always_comb begin
    if (dst.x > my_x)      out_port = PORT_E;
    else if (dst.x < my_x) out_port = PORT_W;
    else if (dst.y > my_y) out_port = PORT_S;
    else if (dst.y < my_y) out_port = PORT_N;
    else                   out_port = PORT_L;
  end
endmodule
