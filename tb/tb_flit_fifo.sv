// tb_flit_fifo: self-checking test of the channel buffer.
//
// Drives random pushes and pops into an 8-deep FIFO and compares every cycle
// with a queue model: rd_valid, wr_ready (full exactly at 8 words), the head
// word, and the one-cycle write-to-read latency. Also fills the buffer to the
// brim and checks that a ninth word is refused. Ends with a TB_RESULT line.
module tb_flit_fifo;
  localparam int W = 8, D = 8;
  logic clk = 0, rst_n = 0;
  logic wv, wr, rv, rr;
  logic [W-1:0] wd, rd;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  flit_fifo #(.FLIT_W(W), .DEPTH(D)) dut (
    .clk, .rst_n, .wr_valid(wv), .wr_data(wd), .wr_ready(wr),
    .rd_valid(rv), .rd_data(rd), .rd_ready(rr));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wv = 0; rr = 0; wd = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(!rv && wr, "empty after reset");
    // Fill without popping.
    for (int i = 0; i < D + 2; i++) begin
      wv = 1; wd = W'(8'hA0 + i); rr = 0;
      @(negedge clk);
      check(wr == (i + 1 < D), $sformatf("wr_ready while filling %0d", i));
    end
    wv = 0;
    check(rv && rd == 8'hA0, "head after fill");
    // Drain.
    for (int i = 0; i < D; i++) begin
      check(rv && rd == W'(8'hA0 + i), $sformatf("drain %0d", i));
      rr = 1; @(negedge clk); rr = 0;
    end
    check(!rv, "empty after drain");
    // Random traffic against a queue model.
    for (int c = 0; c < 4000; c++) begin
      wv = $urandom_range(0, 1) == 1;
      wd = W'($urandom);
      rr = $urandom_range(0, 2) != 0;
      #1;
      check(rv == (q.size() > 0), "rd_valid vs model");
      check(wr == (q.size() < D), "wr_ready vs model");
      if (q.size() > 0) check(rd == q[0], "head vs model");
      @(posedge clk);
      if (rv && rr) void'(q.pop_front());
      if (wv && wr) q.push_back(wd);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
