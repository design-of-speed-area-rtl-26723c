// tb_sel_decoder: exhaustive test of the conventional 4x2 decoder.
//
// Applies all 16 grant patterns; the select must equal the index of the
// lowest set line (0 for no line set).
module tb_sel_decoder;
  logic [3:0] gnt;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  sel_decoder dut (.gnt, .sel);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 16; g++) begin
      int e;
      e = 0;
      for (int i = 3; i >= 0; i--) if (g[i]) e = i;
      gnt = 4'(g);
      #1;
      checks++;
      if (int'(sel) != e) begin failures++; $display("FAIL gnt=%b sel=%0d exp=%0d", gnt, sel, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
