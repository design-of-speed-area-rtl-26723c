// tb_rr_arbiter: self-checking test of the round-robin arbiter (N = 4).
//
// Applies random request vectors and enables and compares the grant each
// cycle with a reference model of round-robin order (search starts after the
// last granted line). Checks that no grant is given while en is low and that
// four lines requesting continuously are served in strict rotation.
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt, exp_gnt;
  logic en;
  int checks = 0, failures = 0;
  int last;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .en, .gnt);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s req=%b gnt=%b exp=%b", what, req, gnt, exp_gnt); end
  endtask

  function automatic logic [N-1:0] model(logic [N-1:0] r, int after);
    for (int i = 1; i <= N; i++)
      if (r[(after + i) % N]) return N'(1) << ((after + i) % N);
    return '0;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; en = 0; last = N - 1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // Continuous full request: strict rotation 0,1,2,3,0,...
    req = '1; en = 1;
    for (int i = 0; i < 8; i++) begin
      #1; exp_gnt = N'(1) << (i % N);
      check(gnt == exp_gnt, "rotation");
      @(negedge clk);
    end
    last = 3;
    for (int c = 0; c < 3000; c++) begin
      req = N'($urandom);
      en  = $urandom_range(0, 3) != 0;
      #1;
      exp_gnt = en ? model(req, last) : '0;
      check(gnt == exp_gnt, "random");
      if (exp_gnt != 0) last = $clog2(exp_gnt);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
