// noc_mesh: MESH_X x MESH_Y mesh of fragmentation routers (default 4x4).
//
// Router (x, y) sits at node n = y*MESH_X + x. Its east port connects to the
// west port of (x+1, y) and its north port to the south port of (x, y+1).
// Every router output that leads to a neighbour goes through a link_pipe
// (one link cycle for flits and one for returning credits), so a hop costs
// one router cycle plus one link cycle. Ports on the mesh edge are tied off:
// dimension-order routing never sends a flit off the mesh.
//
// Each node's local port is brought out for a network interface. inj_link
// injects flits: the head flit's la_port must be the XY direction from the
// node itself (noc_pkg::xy_dir), flits of one packet are sent on one VC only
// while inj_credit shows room, and inj_next announces one cycle ahead the VC
// of the next injected flit. ej_link delivers flits; ej_credit returns one
// credit per consumed flit per VC, and a receiver that never holds credits
// back may return them at once. The interface that reassembles fragments
// at the destination is not part of this design. frag_credit/frag_empty
// report, per node and input port, the cycles in which a packet was
// fragmented.
//
// Follows the document: 4x4 2D mesh, XY routing, single-cycle routers and
// links. Coordinates are COORD_W = 2 bits wide, so MESH_X and MESH_Y may not
// exceed 4 without widening noc_pkg.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int MESH_X = 4,
  parameter int MESH_Y = 4
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  link_t                            inj_link   [MESH_X*MESH_Y],
  input  la_t                              inj_next   [MESH_X*MESH_Y],
  output logic  [NUM_VC-1:0]               inj_credit [MESH_X*MESH_Y],
  output link_t                            ej_link    [MESH_X*MESH_Y],
  input  logic  [NUM_VC-1:0]               ej_credit  [MESH_X*MESH_Y],
  output logic  [NUM_PORTS-1:0]            frag_credit[MESH_X*MESH_Y],
  output logic  [NUM_PORTS-1:0]            frag_empty [MESH_X*MESH_Y]
);

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int n = y * MESH_X + x;

      link_t                             in_link  [NUM_PORTS];
      la_t                               in_next  [NUM_PORTS];
      link_t                             out_link [NUM_PORTS];
      logic  [NUM_PORTS-1:0][NUM_VC-1:0] cr_out, cr_in;
      // link stage behind each output port (index = output port)
      link_t                             l_link   [NUM_PORTS];
      la_t                               l_next   [NUM_PORTS];
      logic  [NUM_VC-1:0]                l_cr     [NUM_PORTS];  // to this router

      // local port
      assign in_link[P_LOCAL]   = inj_link[n];
      assign in_next[P_LOCAL]   = inj_next[n];
      assign cr_in[P_LOCAL]     = ej_credit[n];
      assign inj_credit[n]      = cr_out[P_LOCAL];
      assign ej_link[n]         = out_link[P_LOCAL];
      assign l_link[P_LOCAL]    = '0;
      assign l_next[P_LOCAL]    = '0;
      assign l_cr[P_LOCAL]      = '0;

      // east side
      if (x < MESH_X - 1) begin : g_e
        link_pipe u_link_e (
          .clk, .rst_n,
          .up_link (out_link[P_EAST]), .dn_link (l_link[P_EAST]), .dn_next (l_next[P_EAST]),
          .dn_credit (g_y[y].g_x[x+1].cr_out[P_WEST]), .up_credit (l_cr[P_EAST])
        );
        assign in_link[P_EAST] = g_y[y].g_x[x+1].l_link[P_WEST];
        assign in_next[P_EAST] = g_y[y].g_x[x+1].l_next[P_WEST];
        assign cr_in[P_EAST]   = l_cr[P_EAST];
      end else begin : g_e_edge
        assign l_link[P_EAST]  = '0;
        assign l_next[P_EAST]  = '0;
        assign l_cr[P_EAST]    = '0;
        assign in_link[P_EAST] = '0;
        assign in_next[P_EAST] = '0;
        assign cr_in[P_EAST]   = '0;
      end

      // west side
      if (x > 0) begin : g_w
        link_pipe u_link_w (
          .clk, .rst_n,
          .up_link (out_link[P_WEST]), .dn_link (l_link[P_WEST]), .dn_next (l_next[P_WEST]),
          .dn_credit (g_y[y].g_x[x-1].cr_out[P_EAST]), .up_credit (l_cr[P_WEST])
        );
        assign in_link[P_WEST] = g_y[y].g_x[x-1].l_link[P_EAST];
        assign in_next[P_WEST] = g_y[y].g_x[x-1].l_next[P_EAST];
        assign cr_in[P_WEST]   = l_cr[P_WEST];
      end else begin : g_w_edge
        assign l_link[P_WEST]  = '0;
        assign l_next[P_WEST]  = '0;
        assign l_cr[P_WEST]    = '0;
        assign in_link[P_WEST] = '0;
        assign in_next[P_WEST] = '0;
        assign cr_in[P_WEST]   = '0;
      end

      // north side
      if (y < MESH_Y - 1) begin : g_n
        link_pipe u_link_n (
          .clk, .rst_n,
          .up_link (out_link[P_NORTH]), .dn_link (l_link[P_NORTH]), .dn_next (l_next[P_NORTH]),
          .dn_credit (g_y[y+1].g_x[x].cr_out[P_SOUTH]), .up_credit (l_cr[P_NORTH])
        );
        assign in_link[P_NORTH] = g_y[y+1].g_x[x].l_link[P_SOUTH];
        assign in_next[P_NORTH] = g_y[y+1].g_x[x].l_next[P_SOUTH];
        assign cr_in[P_NORTH]   = l_cr[P_NORTH];
      end else begin : g_n_edge
        assign l_link[P_NORTH]  = '0;
        assign l_next[P_NORTH]  = '0;
        assign l_cr[P_NORTH]    = '0;
        assign in_link[P_NORTH] = '0;
        assign in_next[P_NORTH] = '0;
        assign cr_in[P_NORTH]   = '0;
      end

      // south side
      if (y > 0) begin : g_s
        link_pipe u_link_s (
          .clk, .rst_n,
          .up_link (out_link[P_SOUTH]), .dn_link (l_link[P_SOUTH]), .dn_next (l_next[P_SOUTH]),
          .dn_credit (g_y[y-1].g_x[x].cr_out[P_NORTH]), .up_credit (l_cr[P_SOUTH])
        );
        assign in_link[P_SOUTH] = g_y[y-1].g_x[x].l_link[P_NORTH];
        assign in_next[P_SOUTH] = g_y[y-1].g_x[x].l_next[P_NORTH];
        assign cr_in[P_SOUTH]   = l_cr[P_SOUTH];
      end else begin : g_s_edge
        assign l_link[P_SOUTH]  = '0;
        assign l_next[P_SOUTH]  = '0;
        assign l_cr[P_SOUTH]    = '0;
        assign in_link[P_SOUTH] = '0;
        assign in_next[P_SOUTH] = '0;
        assign cr_in[P_SOUTH]   = '0;
      end

      frag_router #(.X(x), .Y(y)) u_router (
        .clk, .rst_n,
        .in_link, .in_next,
        .credit_out  (cr_out),
        .out_link,
        .credit_in   (cr_in),
        .frag_credit (frag_credit[n]),
        .frag_empty  (frag_empty[n])
      );
    end
  end

endmodule
