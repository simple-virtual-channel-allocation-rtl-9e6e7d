// tb_la_route: exhaustive check of look-ahead routing on an 8x8 mesh. For
// every router, output port and destination the expected next-router port is
// worked out here from the coordinates of the neighbour.
module tb_la_route;
  import noc_pkg::*;
  coord_t cur_x, cur_y, dst_x, dst_y;
  port_e op, pre_route;
  int checks = 0, failures = 0;

  la_route dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cx = 0; cx < 8; cx++)
      for (int cy = 0; cy < 8; cy++)
        for (int o = 0; o < 5; o++)
          for (int dx = 0; dx < 8; dx++)
            for (int dy = 0; dy < 8; dy++) begin
              int nx, ny;
              port_e exp;
              nx = cx; ny = cy;
              if (o == 0) nx = cx + 1;
              if (o == 1) nx = cx - 1;
              if (o == 2) ny = cy - 1;
              if (o == 3) ny = cy + 1;
              if (o == 4)       exp = P_LOCAL;
              else if (dx > nx) exp = P_EAST;
              else if (dx < nx) exp = P_WEST;
              else if (dy > ny) exp = P_NORTH;
              else if (dy < ny) exp = P_SOUTH;
              else              exp = P_LOCAL;
              // only moves that stay inside the mesh matter
              if (nx < 0 || nx > 7 || ny < 0 || ny > 7) continue;
              cur_x = coord_t'(cx); cur_y = coord_t'(cy);
              dst_x = coord_t'(dx); dst_y = coord_t'(dy);
              op = port_e'(o);
              #1;
              checks++;
              if (pre_route != exp) begin
                failures++;
                if (failures < 10)
                  $display("FAIL (%0d,%0d) op=%0d dst=(%0d,%0d): got %0d exp %0d", cx, cy, o, dx, dy, pre_route, exp);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
