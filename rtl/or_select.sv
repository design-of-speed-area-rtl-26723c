// or_select: the proposed router's OR-gate replacement for the 4x2 decoder.
//
// Combinational. For a one-hot grant vector the multiplexer select is built
// from two 2-input OR gates: sel[0] = gnt[1] | gnt[3], sel[1] = gnt[2] | gnt[3].
// Replacing the decoders by two-input OR gates follows the document; which
// grant lines feed each gate is this design's reading. The output
// is only meaningful for a one-hot (or all-zero) grant, which the arbiter
// guarantees. The 2x1 multiplexers of the proposed crossbar need no gate at
// all: their select is the local input's grant line. Grant line 0 enters no
// gate (it selects input 0, the all-zero code), so a lint tool reports it as
// unused; it is kept so the port matches the arbiter's grant vector.
module or_select (
  input  logic [3:0] gnt,
  output logic [1:0] sel
);

  assign sel[0] = gnt[1] | gnt[3];
  assign sel[1] = gnt[2] | gnt[3];

endmodule
