// noc_router_conv: the conventional five-port mesh router.
//
// Ports 0..4 are local, north, east, south and west; each has an input
// channel with an infifo and an output channel with an outfifo, DEPTH flits
// of FLIT_W bits each. A flit's destination column is in bits
// [COORD_W-1:0] and its row in bits [2*COORD_W-1:COORD_W].
//
// Every cycle the head flit of each non-empty infifo is routed by xy_route
// (router position X, Y). For each output a round-robin arbiter chooses among
// the four other inputs that want it, provided the outfifo has room; a 4x2
// decoder turns the grant into the select of that output's 4x1 crossbar
// multiplexer, and the chosen flit moves from its infifo into the outfifo at
// the clock edge. Outfifos feed the links with valid/ready.
//
// Timing: a flit accepted on in_* at edge t shows on out_* after edge t+1
// when nothing blocks it, so one hop through router and link costs two
// cycles. Each input moves at most one flit per cycle and each output accepts
// at most one. A flit must not be routed back to the port it came from (the
// crossbar has no such path); xy_route never asks for that except for a flit
// a core addresses to itself, which a core must not send.
//
// The component list, the five 4x1 multiplexers, the decoders and the
// 16-flit buffers follow the document. The pipeline, handshake and
// arbitration policy are this design's own.
module noc_router_conv
  import noc_pkg::*;
#(
  parameter int FLIT_W  = 8,
  parameter int COORD_W = 2,
  parameter int DEPTH   = 16,
  parameter int X       = 0,
  parameter int Y       = 0,
  parameter bit MIXED   = 1'b1
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

  logic [NPORTS-1:0][3:0]        req, gnt;
  logic [NPORTS-1:0][1:0]        sel;
  logic [NPORTS-1:0][FLIT_W-1:0] xbar_out;
  logic [NPORTS-1:0]             ofifo_ready;

  // Input channels: infifo and route computation.
  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    flit_fifo #(.FLIT_W(FLIT_W), .DEPTH(DEPTH)) u_infifo (
      .clk, .rst_n,
      .wr_valid(in_valid[p]), .wr_data(in_flit[p]), .wr_ready(in_ready[p]),
      .rd_valid(head_valid[p]), .rd_data(head_flit[p]), .rd_ready(head_pop[p])
    );
    xy_route #(.COORD_W(COORD_W), .MIXED(MIXED)) u_route (
      .cur_x(COORD_W'(X)), .cur_y(COORD_W'(Y)),
      .dst_x(head_flit[p][COORD_W-1:0]), .dst_y(head_flit[p][2*COORD_W-1:COORD_W]),
      .port(route[p])
    );
  end

  // Candidate k of output o is input k when k < o, else input k+1.
  function automatic int cand(int o, int k);
    return (k < o) ? k : k + 1;
  endfunction

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int k = 0; k < 4; k++)
        req[o][k] = head_valid[cand(o, k)] && (route[cand(o, k)] == port_e'(o));
  end

  // Output channels: arbiter, decoder, outfifo.
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    rr_arbiter #(.N(4)) u_arb (
      .clk, .rst_n, .req(req[o]), .en(ofifo_ready[o]), .gnt(gnt[o])
    );
    sel_decoder u_dec (.gnt(gnt[o]), .sel(sel[o]));
    flit_fifo #(.FLIT_W(FLIT_W), .DEPTH(DEPTH)) u_outfifo (
      .clk, .rst_n,
      .wr_valid(|gnt[o]), .wr_data(xbar_out[o]), .wr_ready(ofifo_ready[o]),
      .rd_valid(out_valid[o]), .rd_data(out_flit[o]), .rd_ready(out_ready[o])
    );
  end

  crossbar_conv #(.FLIT_W(FLIT_W)) u_xbar (
    .in_flit(head_flit), .sel(sel), .out_flit(xbar_out)
  );

  // An input is popped when any output granted it.
  always_comb begin
    head_pop = '0;
    for (int o = 0; o < NPORTS; o++)
      for (int k = 0; k < 4; k++)
        if (gnt[o][k]) head_pop[cand(o, k)] = 1'b1;
  end

endmodule
