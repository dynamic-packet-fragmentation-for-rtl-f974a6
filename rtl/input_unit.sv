// input_unit: one router input port.
//
// Holds a flip-flop flit buffer (with bypass) and a VC controller for each of
// the NUM_VC virtual channels, and the V:1 local arbiter. Arriving flits are
// steered into the buffer of the VC named on the link. While one VC holds the
// port (it is streaming a packet or fragment through the switch) no other VC
// of the port may request; otherwise the local arbiter picks one requesting
// VC and forwards its request to the switch allocator. The VC that sends this
// cycle (the streaming VC, or the one whose header was just granted) drives
// the crossbar input through the read mux.
//
// Fragments of one packet must leave in the order they arrived. The port
// therefore keeps an age matrix over its VCs: a VC counts as occupied while
// it has buffered flits, a flit arriving, or a header waiting in its header
// buffer, and VCs are ordered by when their occupancy began. Among VCs that
// request the same output port only the oldest may compete in the local
// arbiter (a later fragment of a packet always targets the same output as
// the earlier one, and its VC became occupied later).
//
// "more" for a VC is true when, after its head flit leaves, a flit remains in
// its buffer, or one is announced on in_next for the next cycle: this is how
// the VC controller sees whether it is about to run dry (buffer-empty stall).
// Every flit removed from a buffer (sent, bypassed or moved into the header
// buffer) returns one credit upstream on credit_out, registered, one bit per
// VC.
//
// Timing: allocation request, grant and crossbar output are combinational in
// the cycle the flit is at the buffer head; credit_out is one cycle later.
// Follows the document's input unit (VC buffers, VC controllers, local
// arbiter, read mux). The per-VC credit vector and the in_next look-ahead are
// this design's choices.
module input_unit
  import noc_pkg::*;
(
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [COORD_W-1:0]                  cur_x,
  input  logic [COORD_W-1:0]                  cur_y,
  input  link_t                               in_link,
  input  la_t                                 in_next,
  output logic [NUM_VC-1:0]                   credit_out,
  // credit state of all output VCs of the router
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0]    cr_ok,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0]    cr_last,
  // switch allocator
  output logic                                lreq,
  output port_e                               lreq_port,
  input  logic                                sa_gnt,
  input  logic [VC_W-1:0]                     sa_vc,
  // crossbar
  output xbar_t                               xout,
  // fragmentation events of this port
  output logic                                frag_credit,
  output logic                                frag_empty
);

  logic [NUM_VC-1:0]        push, pop, head_valid, more, req, gnt, send, active;
  logic [NUM_VC-1:0]        vc_ok, vc_last, fc, fe, larb_gnt, larb_req;
  flit_t                    head      [NUM_VC];
  flit_t                    send_flit [NUM_VC];
  port_e                    req_port  [NUM_VC];
  port_e                    send_port [NUM_VC];
  logic [VC_W-1:0]          send_vc   [NUM_VC];
  logic [CNT_W-1:0]         count     [NUM_VC];
  logic                     port_busy;
  logic [NUM_VC-1:0]        req_hdr, occ, occ_q, rise, elig;
  logic [NUM_VC-1:0]        older   [NUM_VC];   // older[u][v]: u occupied before v
  logic [NUM_VC-1:0]        older_n [NUM_VC];

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    assign push[v] = in_link.valid && (in_link.vc == VC_W'(v));
    assign more[v] = (int'(count[v]) + int'(push[v]) >= 2) ||
                     (in_next.valid && in_next.vc == VC_W'(v));
    assign vc_ok[v]   = cr_ok[send_port[v]][send_vc[v]];
    assign vc_last[v] = cr_last[send_port[v]][send_vc[v]];
    assign gnt[v]     = larb_gnt[v] && sa_gnt;

    flit_fifo #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .push (push[v]), .din (in_link.flit), .pop (pop[v]),
      .head_valid (head_valid[v]), .head (head[v]), .count (count[v])
    );

    vc_ctrl u_ctrl (
      .clk, .rst_n, .cur_x, .cur_y,
      .head_valid (head_valid[v]), .head (head[v]), .more (more[v]), .pop (pop[v]),
      .cr_ok (vc_ok[v]), .cr_last (vc_last[v]),
      .req (req[v]), .req_port (req_port[v]), .req_hdr (req_hdr[v]), .gnt (gnt[v]), .gnt_vc (sa_vc),
      .send (send[v]), .send_flit (send_flit[v]), .send_port (send_port[v]),
      .send_vc (send_vc[v]), .active (active[v]),
      .frag_credit (fc[v]), .frag_empty (fe[v])
    );
  end

  // age order of occupied VCs
  assign occ  = push | req_hdr | head_valid;
  assign rise = occ & ~occ_q;

  always_comb begin
    for (int u = 0; u < NUM_VC; u++)
      for (int v = 0; v < NUM_VC; v++)
        older_n[u][v] = (u == v) ? 1'b0 :
                        rise[v]  ? occ_q[u] :
                        rise[u]  ? 1'b0 : older[u][v];
    for (int v = 0; v < NUM_VC; v++) begin
      elig[v] = req[v];
      for (int u = 0; u < NUM_VC; u++)
        if (req[u] && req_port[u] == req_port[v] && older_n[u][v]) elig[v] = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      occ_q <= '0;
      for (int u = 0; u < NUM_VC; u++) older[u] <= '0;
    end else begin
      occ_q <= occ;
      older <= older_n;
    end
  end

  assign port_busy = |active;
  assign larb_req  = port_busy ? '0 : elig;

  rr_arbiter #(.N(NUM_VC)) u_local_arb (
    .clk, .rst_n, .req (larb_req), .advance (sa_gnt), .gnt (larb_gnt)
  );

  always_comb begin
    lreq      = |larb_gnt;
    lreq_port = P_LOCAL;
    xout      = '0;
    for (int v = 0; v < NUM_VC; v++) begin
      if (larb_gnt[v]) lreq_port = req_port[v];
      if (send[v]) begin
        xout.valid = 1'b1;
        xout.port  = send_port[v];
        xout.vc    = send_vc[v];
        xout.flit  = send_flit[v];
      end
    end
  end

  assign frag_credit = |fc;
  assign frag_empty  = |fe;

  always_ff @(posedge clk) begin
    if (!rst_n) credit_out <= '0;
    else        credit_out <= pop;
  end

  // Only one VC of a port crosses the switch per cycle.
  a_one_sender: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(send));

endmodule
