// xy_route: route computation (the "X-Y router") for the head flit of a channel.
//
// Combinational. From the router's own coordinates and the flit's destination
// it returns the output port. With MIXED = 0 it is plain dimension-order
// routing: first along X to the destination column, then along Y.
//
// With MIXED = 1 (the mixed mesh, where odd columns hold straight-only proposed
// routers) the X leg first heads for a turn column T, the destination column
// with its lowest bit cleared, i.e. the destination column if it is even and
// the column just west of it otherwise. The flit turns into Y there, and on
// reaching the destination row moves along X again (at most one column east)
// to its destination. Every turn thus happens in an even, conventional, column.
// The document names X-Y routing only; the turn-column rule is this design's.
// A flit addressed to the router itself is routed to the local port.
module xy_route
  import noc_pkg::*;
#(
  parameter int COORD_W = 2,
  parameter bit MIXED   = 1'b1
) (
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              port
);

  logic [COORD_W-1:0] turn_x;

  always_comb begin
    turn_x = MIXED ? (dst_x & ~COORD_W'(1)) : dst_x;
    if (cur_x == dst_x && cur_y == dst_y)
      port = P_LOCAL;
    else if (cur_y == dst_y)
      port = (dst_x > cur_x) ? P_EAST : P_WEST;
    else if (cur_x == turn_x)
      port = (dst_y > cur_y) ? P_SOUTH : P_NORTH;
    else
      port = (turn_x > cur_x) ? P_EAST : P_WEST;
  end

endmodule
