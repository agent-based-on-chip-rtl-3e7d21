// Routing function of Dynamic-XY (DyXY) adaptive routing.
//
// Given the router's own coordinates and the destination of a header flit,
// it returns the minimal-path output directions: at most one in X (East or
// West) and at most one in Y (North or South); both are productive and the
// selection function picks one of them. When the packet has arrived the
// only candidate is the Local port. Deadlock freedom comes from the
// subnetwork bit carried in the header: packets going east (or staying in
// their column) use the increasing subnetwork, whose Y links are vc1;
// packets going west use the decreasing subnetwork, vc2. subnet_of gives
// the bit a network interface writes into a new header; the VC used on a Y
// output is that header bit. Purely combinational. The low bit of port_x is
// always 0 by the port encoding (East = 2, West = 4).
// Rows grow southwards: North is row y-1, East is column x+1.
module anoc_route_dyxy
  import anoc_pkg::*;
(
  input  coord_t cur_x,
  input  coord_t cur_y,
  input  coord_t dst_x,
  input  coord_t dst_y,
  output logic   at_dest,   // deliver to the Local port
  output logic   cand_x,    // an X direction is productive
  output logic   cand_y,    // a Y direction is productive
  output port_e  port_x,    // P_EAST or P_WEST (valid when cand_x)
  output port_e  port_y,    // P_NORTH or P_SOUTH (valid when cand_y)
  output logic   subnet_of  // subnetwork for a packet injected here
);
  always_comb begin
    cand_x    = (dst_x != cur_x);
    cand_y    = (dst_y != cur_y);
    at_dest   = !cand_x && !cand_y;
    port_x    = (dst_x > cur_x) ? P_EAST  : P_WEST;
    port_y    = (dst_y > cur_y) ? P_SOUTH : P_NORTH;
    subnet_of = (dst_x < cur_x);
  end
endmodule
