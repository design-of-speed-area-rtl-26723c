// noc_pkg: shared constants of the mesh network-on-chip.
//
// Port numbering used by every router, crossbar and route-computation block,
// and a helper that returns the port on the opposite side of a router (the
// port a flit leaves by when it travels straight through). Coordinates grow
// eastward (x) and southward (y). The numbering is a choice of this design.
package noc_pkg;

  localparam int NPORTS = 5;

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  // Port on the other side of the router: north <-> south, east <-> west.
  function automatic port_e opposite(port_e p);
    case (p)
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      default: return P_LOCAL;
    endcase
  endfunction

endpackage
