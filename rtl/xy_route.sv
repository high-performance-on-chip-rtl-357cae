// xy_route: the routing unit of a router input channel.
//
// Dimension-order (XY) routing: a packet first travels along X until its
// column matches, then along Y, then leaves through the Local port. X grows
// towards East, Y grows towards South (row 0 is the northern edge). Purely
// combinational; it reads the destination fields of a header flit.
// XY routing follows the reference design; the compass convention is this
// design's choice.
module xy_route
  import noc_pkg::*;
#(
  parameter int unsigned MY_X = 0,
  parameter int unsigned MY_Y = 0
) (
  input  logic [XW-1:0] dst_x,
  input  logic [YW-1:0] dst_y,
  output port_e         out_port
);
  always_comb begin
    if (int'(dst_x) > int'(MY_X))      out_port = P_EAST;
    else if (int'(dst_x) < int'(MY_X)) out_port = P_WEST;
    else if (int'(dst_y) > int'(MY_Y)) out_port = P_SOUTH;
    else if (int'(dst_y) < int'(MY_Y)) out_port = P_NORTH;
    else                               out_port = P_LOCAL;
  end
endmodule
