// crossbar_conv: the conventional router's 5x5 crossbar, five 4x1 multiplexers.
//
// Combinational. Output port o is driven by one of the four input ports other
// than o (a flit never leaves by the port it came in on). sel[o] indexes those
// four inputs in ascending port order: input = sel[o] when sel[o] < o, else
// sel[o] + 1. Ports are numbered as in noc_pkg (0 local, 1 north, 2 east,
// 3 south, 4 west). Five 4x1 multiplexers follow the document; the input order
// is this design's choice.
module crossbar_conv
  import noc_pkg::*;
#(
  parameter int FLIT_W = 8
) (
  input  logic [NPORTS-1:0][FLIT_W-1:0] in_flit,
  input  logic [NPORTS-1:0][1:0]        sel,
  output logic [NPORTS-1:0][FLIT_W-1:0] out_flit
);

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      out_flit[o] = in_flit[(int'(sel[o]) < o) ? int'(sel[o]) : int'(sel[o]) + 1];
  end

endmodule
