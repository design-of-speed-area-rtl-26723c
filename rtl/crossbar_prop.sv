// crossbar_prop: the proposed router's straight-only crossbar.
//
// Combinational. Four 2x1 multiplexers drive the north, east, south and west
// outputs: each passes either the input on the opposite side (a flit going
// straight through, sel_dir bit 0) or the local input (sel_dir bit 1). One
// 4x1 multiplexer drives the local output from the north, east, south or west
// input (sel_local = 0, 1, 2, 3). No turn from one direction into another is
// possible. The multiplexer count follows the document; that the 2x1
// multiplexers see the opposite and the local inputs is this design's reading
// of the router's straight data transfer. sel_dir is indexed by port number
// minus one (0 north, 1 east, 2 south, 3 west).
module crossbar_prop
  import noc_pkg::*;
#(
  parameter int FLIT_W = 8
) (
  input  logic [NPORTS-1:0][FLIT_W-1:0] in_flit,
  input  logic [3:0]                    sel_dir,
  input  logic [1:0]                    sel_local,
  output logic [NPORTS-1:0][FLIT_W-1:0] out_flit
);

  always_comb begin
    out_flit[P_LOCAL] = in_flit[int'(sel_local) + 1];
    out_flit[P_NORTH] = sel_dir[0] ? in_flit[P_LOCAL] : in_flit[P_SOUTH];
    out_flit[P_EAST]  = sel_dir[1] ? in_flit[P_LOCAL] : in_flit[P_WEST];
    out_flit[P_SOUTH] = sel_dir[2] ? in_flit[P_LOCAL] : in_flit[P_NORTH];
    out_flit[P_WEST]  = sel_dir[3] ? in_flit[P_LOCAL] : in_flit[P_EAST];
  end

endmodule
