// tb_noc_mesh_8x8: the mixed mesh at the 8x8 size of the area comparison.
//
// Runs mesh_size_run on an 8x8 mesh of 32 conventional and 32 proposed
// routers. Node addresses need 3 bits per coordinate, and the flit is widened
// to 12 bits so that it carries the destination and the 6-bit source node
// number the scoreboard needs; buffer depths stay at the router defaults.
// A watchdog ends the run with a failure if it does not finish.
module tb_noc_mesh_8x8;
  logic clk = 0;
  logic start = 0;
  logic done;
  int checks, failures;

  always #5 clk = ~clk;

  mesh_size_run #(.MX(8), .MY(8), .CW(3), .W(12), .RANDOM_CYCLES(6000)) u_run (
    .clk, .start, .done, .checks, .failures);

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    start = 1;
    #1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
