// flit_fifo: the infifo / outfifo buffer of a router channel.
//
// A synchronous circular buffer of DEPTH words of FLIT_W bits with a
// valid/ready handshake on both sides. The write side accepts a word when
// wr_valid and wr_ready are high at a clock edge; wr_ready is low while the
// buffer is full (also when a word leaves in the same cycle). The read side is
// show-ahead: rd_data is the oldest word whenever rd_valid is high, and it is
// removed at the edge where rd_valid and rd_ready are both high. A word written
// at one edge is visible on rd_data after that edge (one cycle latency).
// Reset is synchronous and active low and empties the buffer.
//
// The 8-bit word and the depths (16 words in a conventional router, 8 on the
// direction ports of the proposed router) follow the document; the pointer and
// counter organisation is this design's own.
module flit_fifo #(
  parameter int FLIT_W = 8,
  parameter int DEPTH  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_valid,
  input  logic [FLIT_W-1:0] wr_data,
  output logic              wr_ready,
  output logic              rd_valid,
  output logic [FLIT_W-1:0] rd_data,
  input  logic              rd_ready
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [FLIT_W-1:0] mem [DEPTH];
  logic [AW-1:0]     wptr, rptr;
  logic [AW:0]       count;

  logic do_wr, do_rd;

  assign wr_ready = (count != (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rptr];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= incr(wptr);
      if (do_rd) rptr <= incr(rptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

`ifndef SYNTHESIS
  // The count can never exceed the depth.
  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
  // Link rule: a word offered and not taken stays offered, unchanged.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           rd_valid && !rd_ready |=> rd_valid && $stable(rd_data));
`endif

endmodule
