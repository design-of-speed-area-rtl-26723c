// sel_decoder: the 4x2 decoder of the conventional router's arbiter.
//
// Combinational. It turns the four grant lines of one output into the 2-bit
// select of that output's 4x1 crossbar multiplexer. It is written as a full
// priority case over the four lines (the lowest granted line wins), which is
// the kind of logic the proposed router replaces by plain OR gates. The
// document shows this circuit only as a figure; the priority reading is this
// design's choice. With a one-hot grant, as the arbiter produces, its output
// equals the index of the granted line.
module sel_decoder (
  input  logic [3:0] gnt,
  output logic [1:0] sel
);

  always_comb begin
    casez (gnt)
      4'b???1: sel = 2'd0;
      4'b??10: sel = 2'd1;
      4'b?100: sel = 2'd2;
      4'b1000: sel = 2'd3;
      default: sel = 2'd0;
    endcase
  end

endmodule
