// noc_router_prop: the proposed five-port router with a straight-only crossbar.
//
// Same channel structure as the conventional router (infifo, X-Y route
// computation, arbiter, crossbar, outfifo on each of the local, north, east,
// south and west ports), with three reductions:
//  * the crossbar is four 2x1 multiplexers and one 4x1 multiplexer
//    (crossbar_prop): a direction output takes either the flit going straight
//    through from the opposite input or a flit from the local input, and the
//    local output takes a flit from any direction input;
//  * the decoders are replaced by OR gates (or_select) on the one-hot grant;
//  * the north, east, south and west buffers hold DIR_DEPTH = 8 flits, the
//    local buffers LOCAL_DEPTH = 16.
// A flit arriving on a direction input is ejected to the local port when it
// is addressed to this router and otherwise always continues straight on; it
// cannot turn. Flits from the local input are routed by xy_route. In a mesh,
// turns must therefore be made by conventional routers (see noc_mesh_mixed).
//
// Flit format, handshake and timing are those of noc_router_conv: two cycles
// per unblocked hop, at most one flit per input and per output each cycle.
// Each direction output arbitrates round robin between its straight input and
// the local input; the local output arbitrates among the four directions.
// Multiplexer counts, OR-gate select and buffer depths follow the document;
// which inputs feed each 2x1 multiplexer, the pipeline and the arbitration
// policy are this design's choices.
module noc_router_prop
  import noc_pkg::*;
#(
  parameter int FLIT_W      = 8,
  parameter int COORD_W     = 2,
  parameter int DIR_DEPTH   = 8,
  parameter int LOCAL_DEPTH = 16,
  parameter int X           = 1,
  parameter int Y           = 0,
  parameter bit MIXED       = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NPORTS-1:0]             in_valid,
  input  logic [NPORTS-1:0][FLIT_W-1:0] in_flit,
  output logic [NPORTS-1:0]             in_ready,
  output logic [NPORTS-1:0]             out_valid,
  output logic [NPORTS-1:0][FLIT_W-1:0] out_flit,
  input  logic [NPORTS-1:0]             out_ready
);

  logic [NPORTS-1:0]             head_valid, head_pop;
  logic [NPORTS-1:0][FLIT_W-1:0] head_flit;
  port_e                         route [NPORTS];
  port_e                         local_route;
  logic [NPORTS-1:0]             to_here;

  logic [NPORTS-1:0]             ofifo_ready;
  logic [NPORTS-1:0][FLIT_W-1:0] xbar_out;
  logic [3:0][1:0]               dir_gnt;     // per direction output: {local, straight}
  logic [3:0]                    local_gnt;   // local output: from north, east, south, west
  logic [3:0]                    sel_dir;
  logic [1:0]                    sel_local;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    localparam int D = (p == 0) ? LOCAL_DEPTH : DIR_DEPTH;
    flit_fifo #(.FLIT_W(FLIT_W), .DEPTH(D)) u_infifo (
      .clk, .rst_n,
      .wr_valid(in_valid[p]), .wr_data(in_flit[p]), .wr_ready(in_ready[p]),
      .rd_valid(head_valid[p]), .rd_data(head_flit[p]), .rd_ready(head_pop[p])
    );
    assign to_here[p] = (head_flit[p][COORD_W-1:0] == COORD_W'(X)) &&
                        (head_flit[p][2*COORD_W-1:COORD_W] == COORD_W'(Y));
  end

  xy_route #(.COORD_W(COORD_W), .MIXED(MIXED)) u_route (
    .cur_x(COORD_W'(X)), .cur_y(COORD_W'(Y)),
    .dst_x(head_flit[P_LOCAL][COORD_W-1:0]), .dst_y(head_flit[P_LOCAL][2*COORD_W-1:COORD_W]),
    .port(local_route)
  );

  // Direction inputs: eject here or go straight on.
  always_comb begin
    route[P_LOCAL] = local_route;
    for (int p = 1; p < NPORTS; p++)
      route[p] = to_here[p] ? P_LOCAL : opposite(port_e'(p));
  end

  // Direction outputs: a 2x1 multiplexer each, select = local grant line.
  for (genvar d = 0; d < 4; d++) begin : g_dir
    localparam port_e OUTP = port_e'(d + 1);
    localparam port_e STR  = opposite(OUTP);
    logic [1:0] req;
    assign req[0] = head_valid[STR]     && (route[STR] == OUTP);
    assign req[1] = head_valid[P_LOCAL] && (route[P_LOCAL] == OUTP);
    rr_arbiter #(.N(2)) u_arb (
      .clk, .rst_n, .req(req), .en(ofifo_ready[d+1]), .gnt(dir_gnt[d])
    );
    assign sel_dir[d] = dir_gnt[d][1];
  end

  // Local output: 4x1 multiplexer, select from OR gates.
  logic [3:0] local_req;
  always_comb begin
    for (int k = 0; k < 4; k++)
      local_req[k] = head_valid[k+1] && (route[k+1] == P_LOCAL);
  end
  rr_arbiter #(.N(4)) u_arb_local (
    .clk, .rst_n, .req(local_req), .en(ofifo_ready[P_LOCAL]), .gnt(local_gnt)
  );
  or_select u_or (.gnt(local_gnt), .sel(sel_local));

  crossbar_prop #(.FLIT_W(FLIT_W)) u_xbar (
    .in_flit(head_flit), .sel_dir(sel_dir), .sel_local(sel_local), .out_flit(xbar_out)
  );

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    localparam int D = (o == 0) ? LOCAL_DEPTH : DIR_DEPTH;
    logic wr;
    assign wr = (o == 0) ? (|local_gnt) : (|dir_gnt[(o == 0) ? 0 : o-1]);
    flit_fifo #(.FLIT_W(FLIT_W), .DEPTH(D)) u_outfifo (
      .clk, .rst_n,
      .wr_valid(wr), .wr_data(xbar_out[o]), .wr_ready(ofifo_ready[o]),
      .rd_valid(out_valid[o]), .rd_data(out_flit[o]), .rd_ready(out_ready[o])
    );
  end

  // Pops: a direction input is taken by the local output or by the output
  // opposite it; the local input by any direction output.
  always_comb begin
    head_pop[P_LOCAL] = dir_gnt[0][1] | dir_gnt[1][1] | dir_gnt[2][1] | dir_gnt[3][1];
    for (int p = 1; p < NPORTS; p++)
      head_pop[p] = local_gnt[p-1] | dir_gnt[int'(opposite(port_e'(p))) - 1][0];
  end

endmodule
