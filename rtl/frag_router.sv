// frag_router: five-port, four-VC mesh router with dynamic packet
// fragmentation.
//
// Idea: in a virtual-channel router a VC is held by a packet until its tail
// leaves, even when the VC's buffer is empty because the packet is blocked
// elsewhere. This router instead cuts ("fragments") a packet when it is about
// to stall on a credit shortage or on an empty buffer: the body flit being
// sent is re-typed as a virtual tail, which frees the output VC downstream,
// and the rest of the packet later gets a new VC behind a copy of its header
// (a virtual head) kept in a per-VC header buffer. Downstream routers treat
// virtual heads and tails as ordinary ones.
//
// Pipeline (one router cycle plus one link cycle per hop, the link being
// link_pipe outside the router): a head flit is buffered (or bypasses the
// buffer), has its next-hop route precomputed, wins switch and VC allocation
// and crosses the switch into the output register in one cycle. Once a head is through, the input VC holds its
// input port, the output port and one output VC (winner-take-all): body and
// tail flits follow one per cycle without switch allocation until the tail or
// a virtual tail, so the router behaves like a wormhole router whose worms
// can be cut.
//
// Ports are numbered local, north, east, south, west (noc_pkg::port_e). Per
// port: in_link from upstream with in_next, the VC of the flit arriving in
// the following cycle; credit_out to upstream (one bit per VC, registered);
// out_link (registered) to downstream; credit_in from downstream. frag_credit/frag_empty pulse per input port when that port's
// sending VC fragments a packet. X and Y are the router's mesh coordinates.
//
// Follows the document: 5 ports, 4 VCs, 5-entry flip-flop buffers per VC plus
// a header buffer, bypass, combined SA/VA, no SA for body and tail flits,
// both fragmentation triggers, XY look-ahead routing. This design's own
// choices are listed in the blocks it instantiates.
module frag_router
  import noc_pkg::*;
#(
  parameter int X = 0,
  parameter int Y = 0
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  link_t                             in_link    [NUM_PORTS],
  input  la_t                               in_next    [NUM_PORTS],
  output logic  [NUM_PORTS-1:0][NUM_VC-1:0] credit_out,
  output link_t                             out_link   [NUM_PORTS],
  input  logic  [NUM_PORTS-1:0][NUM_VC-1:0] credit_in,
  output logic  [NUM_PORTS-1:0]             frag_credit,
  output logic  [NUM_PORTS-1:0]             frag_empty
);

  logic  [NUM_PORTS-1:0][NUM_VC-1:0] cr_ok, cr_last, vc_free;
  logic  [NUM_PORTS-1:0]             lreq, gnt, alloc, out_busy;
  port_e                             lreq_port [NUM_PORTS];
  logic  [VC_W-1:0]                  gnt_vc    [NUM_PORTS];
  logic  [VC_W-1:0]                  alloc_vc  [NUM_PORTS];
  xbar_t                             xin       [NUM_PORTS];
  xbar_t                             xout      [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    input_unit u_in (
      .clk, .rst_n,
      .cur_x (COORD_W'(X)), .cur_y (COORD_W'(Y)),
      .in_link (in_link[p]), .in_next (in_next[p]),
      .credit_out (credit_out[p]),
      .cr_ok, .cr_last,
      .lreq (lreq[p]), .lreq_port (lreq_port[p]),
      .sa_gnt (gnt[p]), .sa_vc (gnt_vc[p]),
      .xout (xin[p]),
      .frag_credit (frag_credit[p]), .frag_empty (frag_empty[p])
    );
  end

  switch_alloc u_sa (
    .clk, .rst_n,
    .lreq, .lreq_port, .out_busy, .vc_free,
    .gnt, .gnt_vc, .alloc, .alloc_vc
  );

  crossbar u_xbar (.xin, .xout);

  for (genvar q = 0; q < NUM_PORTS; q++) begin : g_out
    out_unit #(.DEPTH(BUF_DEPTH)) u_out (
      .clk, .rst_n,
      .xin (xout[q]), .alloc (alloc[q]), .alloc_vc (alloc_vc[q]),
      .credit_in (credit_in[q]),
      .out_link (out_link[q]),
      .busy (out_busy[q]), .vc_free (vc_free[q]),
      .cr_ok (cr_ok[q]), .cr_last (cr_last[q])
    );

    // No two inputs drive the same output in one cycle.
    logic [NUM_PORTS-1:0] drv;
    for (genvar p = 0; p < NUM_PORTS; p++) begin : g_drv
      assign drv[p] = xin[p].valid && (xin[p].port == port_e'(q));
    end
    a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(drv));
  end

endmodule
