// tb_xy_route: exhaustive test of the X-Y routing decision on a 4x4 mesh.
//
// For every (current, destination) pair it checks the port against the rule
// "x first: x below destination -> west, above -> east; then y below ->
// north, above -> south; equal -> local".  Then, for every source and
// destination, it walks the packet hop by hop (west = x+1, east = x-1,
// north = y+1, south = y-1) and checks that it arrives in exactly
// |dx| + |dy| hops and never moves in y while x is still unsettled.
module tb_xy_route;
  import noc_pkg::*;
  addr_t cur, dest;
  port_e port;
  int checks = 0, failures = 0;

  xy_route dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cx = 0; cx < 4; cx++) for (int cy = 0; cy < 4; cy++)
      for (int dx = 0; dx < 4; dx++) for (int dy = 0; dy < 4; dy++) begin
        port_e exp;
        cur = '{x: 2'(cx), y: 2'(cy)};
        dest = '{x: 2'(dx), y: 2'(dy)};
        #1;
        if (dx > cx)      exp = P_WEST;
        else if (dx < cx) exp = P_EAST;
        else if (dy > cy) exp = P_NORTH;
        else if (dy < cy) exp = P_SOUTH;
        else              exp = P_LOCAL;
        check(port == exp, $sformatf("(%0d,%0d)->(%0d,%0d): port %s, expected %s",
                                     cx, cy, dx, dy, port.name(), exp.name()));
      end
    // hop-by-hop walks
    for (int s = 0; s < 16; s++) for (int d = 0; d < 16; d++) begin
      int x, y, hops;
      bit y_moved_early;
      x = s % 4; y = s / 4; hops = 0; y_moved_early = 0;
      dest = '{x: 2'(d % 4), y: 2'(d / 4)};
      forever begin
        cur = '{x: 2'(x), y: 2'(y)};
        #1;
        if (port == P_LOCAL || hops > 10) break;
        case (port)
          P_WEST:  x++;
          P_EAST:  x--;
          P_NORTH: begin if (x != d % 4) y_moved_early = 1; y++; end
          P_SOUTH: begin if (x != d % 4) y_moved_early = 1; y--; end
          default: ;
        endcase
        hops++;
      end
      check(x == d % 4 && y == d / 4, $sformatf("walk %0d->%0d ended at (%0d,%0d)", s, d, x, y));
      check(hops == ((s%4 > d%4) ? s%4 - d%4 : d%4 - s%4) + ((s/4 > d/4) ? s/4 - d/4 : d/4 - s/4),
            $sformatf("walk %0d->%0d took %0d hops", s, d, hops));
      check(!y_moved_early, $sformatf("walk %0d->%0d moved in y before x", s, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
