// mesh_size_run: traffic and checking engine for one size of the mixed mesh.
//
// Instantiates noc_mesh_mixed with an MX x MY size, CW-bit coordinates and
// W-bit flits whose payload carries the source node number, and once start is
// high runs: the latency of the longest corner-to-corner path (2 clock edges
// per router), single flits between node pairs (every pair up to 64 nodes;
// for bigger meshes all pairs from node 0, to the last node, and between
// index neighbours), uniform random traffic with ejection back-pressure for
// RANDOM_CYCLES cycles, and contention of two neighbours sending to one node.
// A scoreboard checks every ejected flit; mechanism counters (turns, straight
// passes through proposed routers, stalls, contention) must all be non-zero.
// Results are returned on checks/failures when done rises.
module mesh_size_run #(
  parameter int MX = 8,
  parameter int MY = 8,
  parameter int CW = 3,
  parameter int W  = 12,
  parameter int RANDOM_CYCLES = 3000
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  import noc_pkg::*;
  localparam int N = MX * MY, SW = W - 2 * CW;
  logic rst_n = 0;
  logic [N-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
  logic [N-1:0][W-1:0] inj_flit, ej_flit;
  int outstanding [N][N];
  int total_out;
  int n_turn_xy, n_turn_yx, n_straight_prop, n_inj_prop, n_ej_prop;
  int n_inj_stall, n_ej_stall, n_contention;

  noc_mesh_mixed #(.MESH_X(MX), .MESH_Y(MY), .FLIT_W(W), .COORD_W(CW)) dut (.clk, .rst_n, .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit, .ej_ready);


  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Reference route (independent of the RTL): port number 0 L, 1 N, 2 E, 3 S, 4 W.
  function automatic int ref_route(int x, int y, int tx, int ty);
    int t;
    t = tx - (tx % 2);
    if (x == tx && y == ty) return 0;
    if (y == ty) return (tx > x) ? 2 : 4;
    if (x != t) return (t > x) ? 2 : 4;
    return (ty > y) ? 3 : 1;
  endfunction

  // Walk a path and count the mechanisms it exercises; returns routers visited.
  function automatic int walk(int s, int d, bit count);
    int x, y, tx, ty, p, last, r;
    x = s % MX; y = s / MX; tx = d % MX; ty = d / MX; last = 0; r = 1;
    if (count && (x % 2 == 1)) n_inj_prop++;
    forever begin
      p = ref_route(x, y, tx, ty);
      if (p == 0) break;
      if (count && last != 0) begin
        if ((last == 2 || last == 4) && (p == 1 || p == 3)) n_turn_xy++;
        if ((last == 1 || last == 3) && (p == 2 || p == 4)) n_turn_yx++;
        if (p == last && (x % 2 == 1)) n_straight_prop++;
      end
      case (p) 1: y--; 2: x++; 3: y++; default: x--; endcase
      last = p; r++;
    end
    if (count && (x % 2 == 1)) n_ej_prop++;
    return r;
  endfunction

  function automatic logic [W-1:0] mkflit(int s, int d);
    return {SW'(s), CW'(d / MX), CW'(d % MX)};
  endfunction

  // Scoreboard and stall counters, sampled just before each edge.
  task automatic step();
    logic [N-1:0] ih, eh;
    logic [N-1:0][W-1:0] ifl, efl;
    #4;
    ih = inj_valid & inj_ready; eh = ej_valid & ej_ready;
    ifl = inj_flit; efl = ej_flit;
    n_inj_stall += $countones(inj_valid & ~inj_ready);
    n_ej_stall  += $countones(ej_valid & ~ej_ready);
    @(posedge clk);
    for (int n = 0; n < N; n++) begin
      if (ih[n]) begin
        int d;
        d = int'(ifl[n][2*CW-1:CW]) * MX + int'(ifl[n][CW-1:0]);
        outstanding[n][d]++; total_out++;
        void'(walk(n, d, 1'b1));
      end
      if (eh[n]) begin
        int s, d;
        s = int'(efl[n][W-1:2*CW]);
        d = int'(efl[n][2*CW-1:CW]) * MX + int'(efl[n][CW-1:0]);
        checks++;
        if (d != n || outstanding[s][n] == 0) begin
          failures++; $display("FAIL node %0d ejected %h", n, efl[n]);
        end else begin
          outstanding[s][n]--; total_out--;
        end
      end
    end
    @(negedge clk);
  endtask

  task automatic drain(int limit);
    inj_valid = '0; ej_ready = '1;
    for (int i = 0; i < limit && total_out != 0; i++) step();
    check(total_out == 0, $sformatf("all flits delivered (%0d left)", total_out));
  endtask

  initial begin
    int lat, r;
    done = 0; checks = 0; failures = 0;
    wait (start);
    inj_valid = '0; inj_flit = '0; ej_ready = '1; total_out = 0;
    n_turn_xy = 0; n_turn_yx = 0; n_straight_prop = 0; n_inj_prop = 0; n_ej_prop = 0;
    n_inj_stall = 0; n_ej_stall = 0; n_contention = 0;
    for (int a = 0; a < N; a++) for (int b = 0; b < N; b++) outstanding[a][b] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);

    // 1. latency (0,0) -> (3,3).
    r = walk(0, N - 1, 1'b0);
    check(r == MX + MY - 1, $sformatf("path length %0d routers", r));
    inj_valid[0] = 1; inj_flit[0] = mkflit(0, N - 1);
    step();
    inj_valid = '0;
    lat = 1;
    while (!ej_valid[N-1] && lat < 80) begin step(); lat++; end
    check(ej_valid[N-1] && lat == 2 * r, $sformatf("latency %0d edges, expected %0d", lat, 2 * r));
    drain(50);

    // 2. every ordered pair, one flit at a time, latency checked against path length.
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) begin
      if (s == d) continue;
      if (N > 64 && s != 0 && d != N - 1 && s != d + 1) continue;
      r = walk(s, d, 1'b0);
      inj_valid[s] = 1; inj_flit[s] = mkflit(s, d);
      step();
      inj_valid = '0;
      lat = 1;
      while (!ej_valid[d] && lat < 80) begin step(); lat++; end
      check(lat == 2 * r, $sformatf("latency %0d->%0d: %0d edges, expected %0d", s, d, lat, 2 * r));
      drain(10);
    end

    // 3. uniform random traffic with ejection back-pressure.
    for (int c = 0; c < RANDOM_CYCLES; c++) begin
      for (int n = 0; n < N; n++) begin
        if (!inj_valid[n] || inj_ready[n]) begin
          int d;
          do d = $urandom_range(0, N - 1); while (d == n);
          inj_valid[n] = $urandom_range(0, 3) != 0;
          inj_flit[n] = mkflit(n, d);
        end
        ej_ready[n] = $urandom_range(0, 2) != 0;
      end
      step();
    end
    drain(2000);

    // 4. output contention: the two row neighbours of a node send to it at
    //    the same edge. Both flits reach the node's router in the same cycle
    //    and compete for its local output: one is ejected after 2 x 2 edges,
    //    the other one edge later. Run for a proposed (x = 1) and a
    //    conventional (x = 2) destination in every row.
    for (int y = 0; y < MY; y++) for (int dx = 1; dx <= 2; dx++) begin
      int d, a, b, t1, t2, cyc;
      d = y * MX + dx; a = d - 1; b = d + 1;
      ej_ready = '1;
      inj_valid[a] = 1; inj_flit[a] = mkflit(a, d);
      inj_valid[b] = 1; inj_flit[b] = mkflit(b, d);
      step();
      inj_valid = '0;
      t1 = 0; t2 = 0;
      for (cyc = 1; cyc < 12; cyc++) begin
        if (ej_valid[d]) begin
          if (t1 == 0) t1 = cyc; else if (t2 == 0) t2 = cyc;
        end
        step();
      end
      check(t1 == 4 && t2 == 5, $sformatf("contention at node %0d: ejected at %0d and %0d, expected 4 and 5", d, t1, t2));
      if (t1 == 4 && t2 == 5) n_contention++;
      drain(10);
    end

    $display("%0dx%0d mesh: turn X->Y %0d, turn Y->X %0d, straight through proposed %0d", MX, MY, n_turn_xy, n_turn_yx, n_straight_prop);
    $display("inject at proposed %0d, eject at proposed %0d", n_inj_prop, n_ej_prop);
    $display("injection stalls %0d, ejection stalls %0d, output contention %0d", n_inj_stall, n_ej_stall, n_contention);
    check(n_turn_xy > 0, "turn X->Y happened");
    check(n_turn_yx > 0, "turn Y->X happened");
    check(n_straight_prop > 0, "straight pass through proposed router happened");
    check(n_inj_prop > 0, "injection at proposed router happened");
    check(n_ej_prop > 0, "ejection at proposed router happened");
    check(n_inj_stall > 0, "injection stall happened");
    check(n_ej_stall > 0, "ejection stall happened");
    check(n_contention > 0, "output contention happened");
    done = 1;
  end
endmodule
