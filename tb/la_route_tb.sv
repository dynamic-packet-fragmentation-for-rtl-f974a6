// la_route_tb: exhaustive check of the look-ahead XY route over every
// router position in the 4x4 mesh, every output port that stays inside the
// mesh and every destination, against an independent model: move one hop,
// then go east/west until the column matches, then north/south.
`timescale 1ns/1ps
module la_route_tb;
  import noc_pkg::*;
  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  port_e out_port, next_port;
  int checks = 0, failures = 0;

  la_route dut (.*);

  function automatic int ref_route(int cx, int cy, int op, int dx, int dy);
    int nx, ny;
    nx = cx; ny = cy;
    if (op == 0) return 0;
    if (op == 2) nx++;
    if (op == 4) nx--;
    if (op == 1) ny++;
    if (op == 3) ny--;
    if (dx > nx) return 2;
    if (dx < nx) return 4;
    if (dy > ny) return 1;
    if (dy < ny) return 3;
    return 0;
  endfunction

  initial begin
    for (int cx = 0; cx < 4; cx++)
      for (int cy = 0; cy < 4; cy++)
        for (int op = 0; op < 5; op++) begin
          if ((op == 2 && cx == 3) || (op == 4 && cx == 0) ||
              (op == 1 && cy == 3) || (op == 3 && cy == 0)) continue;
          for (int dx = 0; dx < 4; dx++)
            for (int dy = 0; dy < 4; dy++) begin
              cur_x = COORD_W'(cx); cur_y = COORD_W'(cy);
              dst_x = COORD_W'(dx); dst_y = COORD_W'(dy);
              out_port = port_e'(op);
              #1;
              checks++;
              if (int'(next_port) != ref_route(cx, cy, op, dx, dy)) begin
                failures++;
                if (failures < 10) $display("FAIL (%0d,%0d) op %0d dst (%0d,%0d): %0d", cx, cy, op, dx, dy, next_port);
              end
            end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
