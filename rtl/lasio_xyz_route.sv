// lasio_xyz_route - deterministic XYZ routing decision (combinational).
//
// Compares the router's own address with a packet's destination and picks
// the output port: first correct x (East for a larger destination x, West
// for a smaller one), then, once x matches, correct y (North/South), then,
// once x and y match, correct z (Top/Bottom), and deliver on Local when all
// three coordinates match. This is the order of the transition conditions of
// the arbitration state machine; which compass port stands for which axis
// sign is this design's choice.
module lasio_xyz_route
  import lasio_pkg::*;
(
  input  addr_t here,
  input  addr_t dst,
  output port_e out_port
);
  always_comb begin
    if (dst.x > here.x)      out_port = P_EAST;
    else if (dst.x < here.x) out_port = P_WEST;
    else if (dst.y > here.y) out_port = P_NORTH;
    else if (dst.y < here.y) out_port = P_SOUTH;
    else if (dst.z > here.z) out_port = P_TOP;
    else if (dst.z < here.z) out_port = P_BOTTOM;
    else                     out_port = P_LOCAL;
  end
endmodule
