// rr_arbiter: round-robin arbiter for one output port of a router.
//
// N requesters compete for the output. When en is high (the output buffer
// can take a flit) the arbiter grants exactly one requesting line, searching
// from the line after the one granted last; gnt is one-hot or zero and is
// combinational from req, en and the stored pointer. The pointer moves past
// the granted line at the clock edge, so a line that keeps requesting waits at
// most N-1 grants. The document says the arbiter allocates crossbar time slots
// and outputs grant signals; the round-robin policy is this design's choice.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         en,
  output logic [N-1:0] gnt
);

  localparam int PW = (N > 1) ? $clog2(N) : 1;

  logic [PW-1:0] ptr;
  logic [PW-1:0] win;
  logic          found;

  always_comb begin
    gnt   = '0;
    win   = ptr;
    found = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (!found && req[(int'(ptr) + i) % N]) begin
        found = 1'b1;
        win   = PW'((int'(ptr) + i) % N);
      end
    end
    if (found && en) gnt[win] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      ptr <= '0;
    else if (found && en)
      ptr <= (int'(win) == N-1) ? '0 : win + 1'b1;
  end

`ifndef SYNTHESIS
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_gnt_req: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);
`endif

endmodule
