// la_route: look-ahead XY route computation (the preRC step).
//
// A header carries the output port it must take at the router that receives
// it. While the header is written into that router, this block works out the
// port it must take one hop further on: it steps the router's own coordinates
// one hop in the direction of out_port and applies dimension-order routing
// (X first, then Y) from there to the destination. The result is written into
// the header before it leaves, so no router spends a pipeline stage on
// routing. A header leaving on the local port keeps P_LOCAL.
//
// Purely combinational. Follows the document: look-ahead routing overlapped
// with buffer write, XY routing on a 2D mesh. Own choice: the port numbering
// and coordinate convention (north is +y, east is +x).
module la_route
  import noc_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  port_e              out_port,  // port taken at this router
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              next_port  // port to take at the next router
);

  logic [COORD_W-1:0] nx, ny;

  always_comb begin
    nx = cur_x;
    ny = cur_y;
    unique case (out_port)
      P_EAST:  nx = cur_x + 1'b1;
      P_WEST:  nx = cur_x - 1'b1;
      P_NORTH: ny = cur_y + 1'b1;
      P_SOUTH: ny = cur_y - 1'b1;
      default: ;
    endcase
    next_port = (out_port == P_LOCAL) ? P_LOCAL : xy_dir(nx, ny, dst_x, dst_y);
  end

endmodule
