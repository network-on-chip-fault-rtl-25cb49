// tb_xy_route: exhaustively checks XY routing over a 16 x 16 coordinate
// space: X is resolved first (east when the destination column is larger,
// west when smaller), then Y (north larger, south smaller), then local.
module tb_xy_route;
  import noc_pkg::*;

  int checks = 0, failures = 0;
  logic [COORD_W-1:0] cx, cy, dx, dy;
  port_e got, exp;

  xy_route dut (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .out_port(got));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        for (int c = 0; c < 16; c += 3)
          for (int d = 0; d < 16; d += 3) begin
            cx = COORD_W'(a); cy = COORD_W'(b); dx = COORD_W'(c); dy = COORD_W'(d);
            #1;
            if (c > a)      exp = P_EAST;
            else if (c < a) exp = P_WEST;
            else if (d > b) exp = P_NORTH;
            else if (d < b) exp = P_SOUTH;
            else            exp = P_LOCAL;
            checks++;
            if (got != exp) begin
              failures++;
              if (failures < 10) $display("FAIL cur=(%0d,%0d) dst=(%0d,%0d) got %0d exp %0d", a, b, c, d, got, exp);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
