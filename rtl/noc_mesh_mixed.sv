// noc_mesh_mixed: MESH_X x MESH_Y mesh integrating conventional and proposed routers.
//
// Columns alternate between router kinds: even columns (x = 0, 2, ...) hold
// conventional routers, odd columns the straight-only proposed routers, so
// half of a 4x4 mesh is of each kind. Neighbouring routers are joined by a
// pair of links (valid, flit, ready) per direction; links on the outer edge
// are tied off and never used by the routing. Routing (xy_route, MIXED = 1)
// heads along X for an even turn column, turns into Y there, and finishes
// with at most one step east, so every turn falls in a conventional router and
// a proposed router only injects, ejects or passes flits straight on.
//
// Each node n = y*MESH_X + x has a local injection port (inj_valid/inj_flit/
// inj_ready) and a local ejection port (ej_valid/ej_flit/ej_ready), both
// valid/ready. A flit carries its destination column in bits [COORD_W-1:0]
// and row in [2*COORD_W-1:COORD_W]; the rest is payload. An unblocked flit
// takes two cycles per router from injection to ejection. A core must not
// address a flit to its own node.
//
// Mixing the two router kinds in one mesh, half each, is the document's
// proposal; the column placement, the routing rule and the link handshake
// are this design's.
module noc_mesh_mixed
  import noc_pkg::*;
#(
  parameter int MESH_X  = 4,
  parameter int MESH_Y  = 4,
  parameter int FLIT_W  = 8,
  parameter int COORD_W = 2
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [MESH_X*MESH_Y-1:0]             inj_valid,
  input  logic [MESH_X*MESH_Y-1:0][FLIT_W-1:0] inj_flit,
  output logic [MESH_X*MESH_Y-1:0]             inj_ready,
  output logic [MESH_X*MESH_Y-1:0]             ej_valid,
  output logic [MESH_X*MESH_Y-1:0][FLIT_W-1:0] ej_flit,
  input  logic [MESH_X*MESH_Y-1:0]             ej_ready
);

  localparam int N = MESH_X * MESH_Y;

  logic [N-1:0][NPORTS-1:0]             iv, ir, ov, ordy;
  logic [N-1:0][NPORTS-1:0][FLIT_W-1:0] iflit, oflit;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int n = y * MESH_X + x;

      // Local port.
      assign iv[n][P_LOCAL]    = inj_valid[n];
      assign iflit[n][P_LOCAL] = inj_flit[n];
      assign inj_ready[n]      = ir[n][P_LOCAL];
      assign ej_valid[n]       = ov[n][P_LOCAL];
      assign ej_flit[n]        = oflit[n][P_LOCAL];
      assign ordy[n][P_LOCAL]  = ej_ready[n];

      // North neighbour is n - MESH_X.
      if (y > 0) begin : g_n
        assign iv[n][P_NORTH]    = ov[n-MESH_X][P_SOUTH];
        assign iflit[n][P_NORTH] = oflit[n-MESH_X][P_SOUTH];
        assign ordy[n][P_NORTH]  = ir[n-MESH_X][P_SOUTH];
      end else begin : g_n_edge
        assign iv[n][P_NORTH]    = 1'b0;
        assign iflit[n][P_NORTH] = '0;
        assign ordy[n][P_NORTH]  = 1'b0;
      end
      // South neighbour is n + MESH_X.
      if (y < MESH_Y-1) begin : g_s
        assign iv[n][P_SOUTH]    = ov[n+MESH_X][P_NORTH];
        assign iflit[n][P_SOUTH] = oflit[n+MESH_X][P_NORTH];
        assign ordy[n][P_SOUTH]  = ir[n+MESH_X][P_NORTH];
      end else begin : g_s_edge
        assign iv[n][P_SOUTH]    = 1'b0;
        assign iflit[n][P_SOUTH] = '0;
        assign ordy[n][P_SOUTH]  = 1'b0;
      end
      // East neighbour is n + 1.
      if (x < MESH_X-1) begin : g_e
        assign iv[n][P_EAST]    = ov[n+1][P_WEST];
        assign iflit[n][P_EAST] = oflit[n+1][P_WEST];
        assign ordy[n][P_EAST]  = ir[n+1][P_WEST];
      end else begin : g_e_edge
        assign iv[n][P_EAST]    = 1'b0;
        assign iflit[n][P_EAST] = '0;
        assign ordy[n][P_EAST]  = 1'b0;
      end
      // West neighbour is n - 1.
      if (x > 0) begin : g_w
        assign iv[n][P_WEST]    = ov[n-1][P_EAST];
        assign iflit[n][P_WEST] = oflit[n-1][P_EAST];
        assign ordy[n][P_WEST]  = ir[n-1][P_EAST];
      end else begin : g_w_edge
        assign iv[n][P_WEST]    = 1'b0;
        assign iflit[n][P_WEST] = '0;
        assign ordy[n][P_WEST]  = 1'b0;
      end

      if (x % 2 == 0) begin : g_conv
        noc_router_conv #(
          .FLIT_W(FLIT_W), .COORD_W(COORD_W), .X(x), .Y(y), .MIXED(1'b1)
        ) u_router (
          .clk, .rst_n,
          .in_valid(iv[n]), .in_flit(iflit[n]), .in_ready(ir[n]),
          .out_valid(ov[n]), .out_flit(oflit[n]), .out_ready(ordy[n])
        );
      end else begin : g_prop
        noc_router_prop #(
          .FLIT_W(FLIT_W), .COORD_W(COORD_W), .X(x), .Y(y), .MIXED(1'b1)
        ) u_router (
          .clk, .rst_n,
          .in_valid(iv[n]), .in_flit(iflit[n]), .in_ready(ir[n]),
          .out_valid(ov[n]), .out_flit(oflit[n]), .out_ready(ordy[n])
        );
      end
    end
  end

`ifndef SYNTHESIS
  initial begin
    assert (MESH_X <= (1 << COORD_W) && MESH_Y <= (1 << COORD_W))
      else $error("mesh does not fit the COORD_W-bit address fields");
    assert (FLIT_W >= 2*COORD_W) else $error("flit too narrow for the address");
  end
`endif

endmodule
