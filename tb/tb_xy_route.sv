// tb_xy_route: exhaustive test of route computation.
//
// For every router position and destination in a 4x4 mesh, and for both
// plain X-Y (MIXED = 0) and mixed-mesh routing (MIXED = 1), compares the
// output port with an independent reference. It also walks every
// source/destination pair hop by hop with the MIXED routing and checks that
// each flit arrives, never leaves the mesh, and never turns in an odd column.
module tb_xy_route;
  import noc_pkg::*;
  logic [1:0] cx, cy, dx, dy;
  port_e p_mixed, p_plain;
  int checks = 0, failures = 0;

  xy_route #(.COORD_W(2), .MIXED(1'b1)) dut_m (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .port(p_mixed));
  xy_route #(.COORD_W(2), .MIXED(1'b0)) dut_p (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .port(p_plain));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic port_e ref_plain(int x, int y, int tx, int ty);
    if (x < tx) return P_EAST;
    if (x > tx) return P_WEST;
    if (y < ty) return P_SOUTH;
    if (y > ty) return P_NORTH;
    return P_LOCAL;
  endfunction

  function automatic port_e ref_mixed(int x, int y, int tx, int ty);
    int t;
    t = (tx % 2 == 0) ? tx : tx - 1;
    if (x == tx && y == ty) return P_LOCAL;
    if (y == ty) return (tx > x) ? P_EAST : P_WEST;
    if (x != t) return (t > x) ? P_EAST : P_WEST;
    return (ty > y) ? P_SOUTH : P_NORTH;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++) for (int y = 0; y < 4; y++)
      for (int tx = 0; tx < 4; tx++) for (int ty = 0; ty < 4; ty++) begin
        cx = 2'(x); cy = 2'(y); dx = 2'(tx); dy = 2'(ty);
        #1;
        check(p_plain == ref_plain(x, y, tx, ty), $sformatf("plain %0d,%0d->%0d,%0d", x, y, tx, ty));
        check(p_mixed == ref_mixed(x, y, tx, ty), $sformatf("mixed %0d,%0d->%0d,%0d", x, y, tx, ty));
      end
    // Hop-by-hop walk with the DUT: must arrive, stay inside, turn only in even columns.
    for (int sx = 0; sx < 4; sx++) for (int sy = 0; sy < 4; sy++)
      for (int tx = 0; tx < 4; tx++) for (int ty = 0; ty < 4; ty++) begin
        int x, y, hops;
        port_e last;
        bit ok;
        if (sx == tx && sy == ty) continue;
        x = sx; y = sy; hops = 0; last = P_LOCAL; ok = 1;
        while (ok && hops < 20) begin
          cx = 2'(x); cy = 2'(y); dx = 2'(tx); dy = 2'(ty);
          #1;
          if (p_mixed == P_LOCAL) break;
          if (hops > 0 && p_mixed != last && (x % 2) == 1) ok = 0;
          last = p_mixed;
          case (p_mixed)
            P_EAST:  x++;
            P_WEST:  x--;
            P_SOUTH: y++;
            P_NORTH: y--;
            default: ok = 0;
          endcase
          if (x < 0 || x > 3 || y < 0 || y > 3) ok = 0;
          hops++;
        end
        check(ok && x == tx && y == ty, $sformatf("walk %0d,%0d->%0d,%0d", sx, sy, tx, ty));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
