// tb_crossbar_prop: test of the straight-only crossbar.
//
// With distinct random flits on the five inputs, checks for every select
// value that each direction output carries either the opposite input or the
// local input, and that the local output carries the selected direction input.
module tb_crossbar_prop;
  localparam int W = 8;
  logic [4:0][W-1:0] in_flit, out_flit;
  logic [3:0] sel_dir;
  logic [1:0] sel_local;
  int checks = 0, failures = 0;
  // Opposite of ports 1..4 (north, east, south, west).
  int opp[5] = '{0, 3, 4, 1, 2};

  crossbar_prop #(.FLIT_W(W)) dut (.in_flit, .sel_dir, .sel_local, .out_flit);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 5; i++) in_flit[i] = W'(16 * r + i + 1);
      for (int s = 0; s < 16; s++) begin
        sel_dir = 4'(s);
        sel_local = 2'(s % 4);
        #1;
        checks++;
        if (out_flit[0] != in_flit[int'(sel_local) + 1]) begin failures++; $display("FAIL local sel %0d", sel_local); end
        for (int d = 1; d < 5; d++) begin
          checks++;
          if (out_flit[d] != (sel_dir[d-1] ? in_flit[0] : in_flit[opp[d]])) begin
            failures++; $display("FAIL dir %0d sel %b", d, sel_dir);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
