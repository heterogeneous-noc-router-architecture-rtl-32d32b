// tb_route_xy: exhaustive test of the XY route computation over a 16x16 mesh
// for several router positions, against an independently written reference.
module tb_route_xy;
  import hnoc_pkg::*;
  logic [COORD_W-1:0] my_x, my_y, dst_x, dst_y;
  port_e oport;
  int checks = 0, failures = 0;

  route_xy dut (.my_x, .my_y, .dst_x, .dst_y, .oport);

  function automatic port_e ref_route(int mx, int my, int dx, int dy);
    if (dx != mx) return (dx > mx) ? P_EAST : P_WEST;
    if (dy != my) return (dy > my) ? P_NORTH : P_SOUTH;
    return P_LOCAL;
  endfunction

  initial begin
    int pos [4][2] = '{'{0, 0}, '{2, 2}, '{15, 7}, '{5, 15}};
    for (int i = 0; i < 4; i++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) begin
          my_x = 4'(pos[i][0]); my_y = 4'(pos[i][1]); dst_x = 4'(x); dst_y = 4'(y);
          #1;
          checks++;
          if (oport != ref_route(pos[i][0], pos[i][1], x, y)) begin
            failures++;
            $display("router (%0d,%0d) dest (%0d,%0d): got %s", pos[i][0], pos[i][1], x, y, oport.name());
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
