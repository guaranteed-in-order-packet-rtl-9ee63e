// tb_xy_route: exhaustive check of XY route computation over every pair of
// nodes of an 8 x 8 mesh, and of the hop count it produces: following the
// computed ports from any source reaches the destination in exactly
// |dx| + |dy| hops, X hops first.
module tb_xy_route;
  import noc_pkg::*;
  coord_t here, dst;
  port_e port;
  int checks = 0, failures = 0;

  xy_route dut (.here_i(here), .dst_i(dst), .port_o(port));

  initial begin
    for (int sx = 0; sx < 8; sx++) for (int sy = 0; sy < 8; sy++)
      for (int dx = 0; dx < 8; dx++) for (int dy = 0; dy < 8; dy++) begin
        int cx, cy, hops;
        bit moved_y;
        cx = sx; cy = sy; hops = 0; moved_y = 0;
        dst.x = 3'(dx); dst.y = 3'(dy);
        forever begin
          here.x = 3'(cx); here.y = 3'(cy);
          #1;
          if (port == P_LOCAL) break;
          checks++;
          case (port)
            P_EAST:  begin if (moved_y || dx <= cx) failures++; cx++; end
            P_WEST:  begin if (moved_y || dx >= cx) failures++; cx--; end
            P_SOUTH: begin if (dx != cx || dy <= cy) failures++; cy++; moved_y = 1; end
            P_NORTH: begin if (dx != cx || dy >= cy) failures++; cy--; moved_y = 1; end
            default: failures++;
          endcase
          hops++;
          if (hops > 14) break;
        end
        checks++;
        if (cx != dx || cy != dy || hops != ((dx > sx ? dx - sx : sx - dx) + (dy > sy ? dy - sy : sy - dy))) begin
          failures++;
          $display("FAIL route %0d,%0d -> %0d,%0d", sx, sy, dx, dy);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
