// tb_crossbar_conv: test of the five 4x1 multiplexer crossbar.
//
// With random flits on the five inputs, every select value of every output is
// applied and the output compared with the expected input (the four inputs
// other than the output's own port, in ascending order).
module tb_crossbar_conv;
  localparam int W = 8;
  logic [4:0][W-1:0] in_flit, out_flit;
  logic [4:0][1:0] sel;
  int checks = 0, failures = 0;

  crossbar_conv #(.FLIT_W(W)) dut (.in_flit, .sel, .out_flit);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++) begin
      for (int i = 0; i < 5; i++) in_flit[i] = W'($urandom);
      for (int s = 0; s < 4; s++) begin
        for (int o = 0; o < 5; o++) sel[o] = 2'((s + o + r) % 4);
        #1;
        for (int o = 0; o < 5; o++) begin
          int k, src;
          k = int'(sel[o]);
          src = (k < o) ? k : k + 1;
          checks++;
          if (out_flit[o] != in_flit[src]) begin
            failures++; $display("FAIL out %0d sel %0d", o, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
