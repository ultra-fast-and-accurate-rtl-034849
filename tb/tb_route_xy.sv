// tb_route_xy: every source/destination pair of a 16x16 corner of the mesh
// plus random pairs over the full 128x128 range; the expected port follows
// the XY rule (x first, then y, else local).
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_route_xy;
  import noc_pkg::*;
  logic [COORD_W-1:0] cx, cy, dx, dy;
  port_e port;
  int checks = 0, failures = 0;

  route_xy dut (.cur_x(cx), .cur_y(cy), .dest({dy, dx}), .port(port));

  task automatic one(int a, int b, int c, int d);
    port_e e;
    cx = COORD_W'(a); cy = COORD_W'(b); dx = COORD_W'(c); dy = COORD_W'(d);
    #1;
    if (c > a) e = P_EAST;
    else if (c < a) e = P_WEST;
    else if (d > b) e = P_SOUTH;
    else if (d < b) e = P_NORTH;
    else e = P_LOCAL;
    checks++;
    if (port !== e) begin
      failures++;
      $display("FAIL (%0d,%0d)->(%0d,%0d): %0d expected %0d", a, b, c, d, port, e);
    end
  endtask

  initial begin
    for (int a = 0; a < 16; a += 3)
      for (int b = 0; b < 16; b += 3)
        for (int c = 0; c < 16; c++)
          for (int d = 0; d < 16; d++)
            one(a, b, c, d);
    for (int i = 0; i < 2000; i++)
      one($urandom % 128, $urandom % 128, $urandom % 128, $urandom % 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
