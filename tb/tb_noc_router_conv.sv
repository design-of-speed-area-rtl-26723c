// tb_noc_router_conv: self-checking test of the conventional router.
//
// The router sits at column 2, row 1 of a 4x4 mesh. Flits are 16 bits wide
// here so the payload can carry the source port and a sequence number:
// {src[2:0], seq[8:0], dst_y[1:0], dst_x[1:0]}. A scoreboard holds, per input
// and output pair, the flits expected in order; the expected output is worked
// out independently with the mixed-mesh X-Y rule. Phases:
//  1. latency: one flit from the local port to the east port must appear on
//     out_valid two clock edges after it was accepted;
//  2. buffer depth: with the east output blocked, the west input accepts
//     exactly 16 + 16 flits (infifo + outfifo), and so does the local input;
//  3. contention: local and west inputs both stream to the east output and
//     must share it (each gets at least a third of the grants);
//  4. random traffic on all five inputs with random back-pressure, which
//     exercises turns between every pair of different ports.
// Every delivered flit is checked, and all must be delivered at the end.
module tb_noc_router_conv;
  import noc_pkg::*;
  localparam int W = 16, CX = 2, CY = 1;
  logic clk = 0, rst_n = 0;
  logic [4:0] in_valid, in_ready, out_valid, out_ready;
  logic [4:0][W-1:0] in_flit, out_flit;
  int checks = 0, failures = 0;
  logic [W-1:0] expq [5][5][$];
  int seq [5];
  int delivered [5];

  noc_router_conv #(.FLIT_W(W), .COORD_W(2), .X(CX), .Y(CY)) dut (
    .clk, .rst_n, .in_valid, .in_flit, .in_ready, .out_valid, .out_flit, .out_ready);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int ref_mixed(int x, int y, int tx, int ty);
    int t;
    t = (tx % 2 == 0) ? tx : tx - 1;
    if (x == tx && y == ty) return 0;
    if (y == ty) return (tx > x) ? 2 : 4;
    if (x != t) return (t > x) ? 2 : 4;
    return (ty > y) ? 3 : 1;
  endfunction

  function automatic int exp_port(int inp, int tx, int ty);
    return ref_mixed(CX, CY, tx, ty);
  endfunction

  function automatic logic [W-1:0] mkflit(int src, int tx, int ty);
    seq[src]++;
    return {3'(src), 9'(seq[src]), 2'(ty), 2'(tx)};
  endfunction

  // One clock: sample handshakes just before the edge, update the scoreboard.
  task automatic step();
    logic [4:0] ih, oh;
    logic [4:0][W-1:0] iflt, oflt;
    #4;
    ih = in_valid & in_ready; oh = out_valid & out_ready;
    iflt = in_flit; oflt = out_flit;
    @(posedge clk);
    for (int p = 0; p < 5; p++) begin
      if (ih[p]) expq[p][exp_port(p, int'(iflt[p][1:0]), int'(iflt[p][3:2]))].push_back(iflt[p]);
      if (oh[p]) begin
        int src;
        src = int'(oflt[p][15:13]);
        checks++;
        if (src > 4 || expq[src][p].size() == 0 || expq[src][p][0] != oflt[p]) begin
          failures++; $display("FAIL out %0d got %h", p, oflt[p]);
        end else void'(expq[src][p].pop_front());
        delivered[p]++;
      end
    end
    @(negedge clk);
  endtask

  function automatic int pending();
    int n = 0;
    for (int a = 0; a < 5; a++) for (int b = 0; b < 5; b++) n += expq[a][b].size();
    return n;
  endfunction

  task automatic drain();
    in_valid = '0; out_ready = '1;
    for (int i = 0; i < 200 && pending() != 0; i++) step();
    check(pending() == 0, "all flits delivered");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, acc, win_l, win_w;
    in_valid = '0; in_flit = '0; out_ready = '0;
    for (int p = 0; p < 5; p++) begin seq[p] = 0; delivered[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);

    // 1. latency, local -> east (destination 3,1).
    out_ready = '1;
    in_valid[0] = 1; in_flit[0] = mkflit(0, 3, 1);
    step();
    in_valid = '0;
    lat = 1;
    while (!out_valid[2] && lat < 10) begin step(); lat++; end
    check(out_valid[2] && lat == 2, $sformatf("latency %0d edges, expected 2", lat));
    drain();

    // 2a. depth, west input straight to east, east blocked.
    out_ready = '0; acc = 0;
    for (int i = 0; i < 40; i++) begin
      in_valid[4] = 1; in_flit[4] = (in_ready[4]) ? mkflit(4, 3, 1) : in_flit[4];
      if (in_ready[4]) acc++;
      step();
    end
    check(acc == 32, $sformatf("west->east buffering %0d, expected 32", acc));
    drain();
    // 2b. depth, local input to east, east blocked.
    out_ready = '0; acc = 0;
    for (int i = 0; i < 60; i++) begin
      in_valid[0] = 1; in_flit[0] = (in_ready[0]) ? mkflit(0, 3, 1) : in_flit[0];
      if (in_ready[0]) acc++;
      step();
    end
    check(acc == 32, $sformatf("local->east buffering %0d, expected 32", acc));
    drain();

    // 3. contention on the east output: local and west streams.
    out_ready = '1;
    begin
      int d0, d4;
      d0 = 0; d4 = 0;
      for (int i = 0; i < 60; i++) begin
        if (!in_valid[0] || in_ready[0]) in_flit[0] = mkflit(0, 3, 1);
        if (!in_valid[4] || in_ready[4]) in_flit[4] = mkflit(4, 3, 1);
        in_valid[0] = 1; in_valid[4] = 1;
        if (out_valid[2] && out_flit[2][15:13] == 3'd0) d0++;
        if (out_valid[2] && out_flit[2][15:13] == 3'd4) d4++;
        step();
      end
      check(d0 >= 15 && d4 >= 15, $sformatf("east output shared: local %0d west %0d", d0, d4));
    end
    drain();

    // 4. random traffic.
    for (int c = 0; c < 3000; c++) begin
      for (int p = 0; p < 5; p++) begin
        if (!in_valid[p] || in_ready[p]) begin
          int tx, ty, e;
          do begin
            tx = $urandom_range(0, 3); ty = $urandom_range(0, 3);
            e = exp_port(p, tx, ty);
          end while (e == p);
          in_valid[p] = $urandom_range(0, 2) != 0;
          in_flit[p] = mkflit(p, tx, ty);
        end
        out_ready[p] = $urandom_range(0, 3) != 0;
      end
      step();
    end
    drain();
    for (int p = 0; p < 5; p++) check(delivered[p] > 0, $sformatf("output %0d used", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
