// tb_or_select: test of the OR-gate select logic.
//
// For each one-hot grant the select must be the index of the granted line;
// the all-zero grant must give select 0.
module tb_or_select;
  logic [3:0] gnt;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  or_select dut (.gnt, .sel);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -1; i < 4; i++) begin
      gnt = (i < 0) ? 4'b0 : 4'(1 << i);
      #1;
      checks++;
      if (int'(sel) != ((i < 0) ? 0 : i)) begin failures++; $display("FAIL gnt=%b sel=%0d", gnt, sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
