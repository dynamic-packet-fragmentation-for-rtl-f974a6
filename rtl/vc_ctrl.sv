// vc_ctrl: controller of one input virtual channel, with the header buffer
// and the dynamic packet fragmentation logic.
//
// States:
//   IDLE   - no packet. A (virtual) head flit reaching the buffer head is
//            copied into the header buffer and removed from the flit buffer,
//            with its next-hop port precomputed (look-ahead routing). In the
//            same cycle it requests switch and VC allocation; if granted it
//            leaves at once.
//   ROUTE  - the header waits in the header buffer for allocation.
//   ACTIVE - the VC holds its input port, an output port and an output VC.
//            Body and tail flits stream through without switch allocation,
//            one per cycle while a flit and a credit are available.
//   FRAG   - the packet was fragmented. As soon as a flit of the rest of the
//            packet is available, the VC requests allocation again and sends
//            the header buffer contents first, typed as a virtual head.
// Fragmentation happens when a body flit is sent in ACTIVE and either
//   - credit stall: it uses the output VC's last credit and no credit is
//     returning in this cycle, or
//   - buffer-empty stall: it is the only flit left (buffer plus arriving
//     flit) and none is announced for the next cycle.
// The flit then leaves typed as a virtual tail, the output VC and both ports
// are released, and the controller moves to FRAG. A received virtual
// head/tail is handled like a normal head/tail.
//
// Interface: head_valid/head from the flit buffer; more = another flit of
// this VC will be available after the head leaves; cr_ok/cr_last describe the
// held output VC; req/req_port ask for allocation, gnt/gnt_vc answer in the
// same cycle; send/send_flit/send_port/send_vc go to the switch; pop removes
// the head from the flit buffer. All outputs are combinational; the state
// and header buffer change at the rising edge; synchronous active-low reset.
//
// Follows the document: the header copy, the two fragmentation triggers, the
// virtual-tail re-typing and virtual-head insertion, no switch allocation for
// body/tail flits. Own choices: the state encoding, a fragment is only
// re-issued once one of its flits is present, and a connection that runs out
// of flits or credits without a fragmentation trigger (e.g. right after a
// header) simply waits.
module vc_ctrl
  import noc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [COORD_W-1:0]  cur_x,
  input  logic [COORD_W-1:0]  cur_y,
  // flit buffer
  input  logic                head_valid,
  input  flit_t               head,
  input  logic                more,
  output logic                pop,
  // held output VC
  input  logic                cr_ok,
  input  logic                cr_last,
  // allocation
  output logic                req,
  output port_e               req_port,
  output logic                req_hdr,   // request made for the header buffer (ROUTE)
  input  logic                gnt,
  input  logic [VC_W-1:0]     gnt_vc,
  // switch
  output logic                send,
  output flit_t               send_flit,
  output port_e               send_port,
  output logic [VC_W-1:0]     send_vc,
  output logic                active,
  // fragmentation events
  output logic                frag_credit,
  output logic                frag_empty
);

  typedef enum logic [1:0] {S_IDLE, S_ROUTE, S_ACTIVE, S_FRAG} state_e;

  state_e           state;
  flit_t            hdr;       // header copy, la_port already set for next hop
  port_e            hdr_port;  // output port at this router
  logic [VC_W-1:0]  ovc;
  port_e            nport;
  flit_t            head_fwd;
  flit_t            base_flit;
  logic             cap;

  la_route u_route (
    .cur_x, .cur_y,
    .out_port  (head.la_port),
    .dst_x     (head.dst_x),
    .dst_y     (head.dst_y),
    .next_port (nport)
  );

  always_comb begin
    head_fwd         = head;
    head_fwd.la_port = nport;
  end

  assign active  = (state == S_ACTIVE);
  assign req_hdr = (state == S_ROUTE);
  assign cap    = (state == S_IDLE) && head_valid && is_head(head.ftype);

  always_comb begin
    req         = 1'b0;
    req_port    = hdr_port;
    pop         = 1'b0;
    send        = 1'b0;
    base_flit   = hdr;
    send_port   = hdr_port;
    send_vc     = ovc;
    unique case (state)
      S_IDLE: begin
        req      = cap;
        req_port = head.la_port;
        pop      = cap;
        if (cap && gnt) begin
          send      = 1'b1;
          base_flit = head_fwd;
          send_port = head.la_port;
          send_vc   = gnt_vc;
        end
      end
      S_ROUTE: begin
        req = 1'b1;
        if (gnt) begin
          send    = 1'b1;
          send_vc = gnt_vc;
        end
      end
      S_FRAG: begin
        req = head_valid;
        if (head_valid && gnt) begin
          send            = 1'b1;
          base_flit.ftype = F_VHEAD;
          send_vc         = gnt_vc;
        end
      end
      S_ACTIVE: begin
        if (head_valid && cr_ok) begin
          send      = 1'b1;
          pop       = 1'b1;
          base_flit = head;
        end
      end
      default: ;
    endcase
  end

  // Fragmentation decision, kept apart from the send decision: whether a flit
  // leaves never depends on the look-ahead of the upstream link.
  always_comb begin
    frag_credit = 1'b0;
    frag_empty  = 1'b0;
    send_flit   = base_flit;
    if (active && send && !is_tail(head.ftype)) begin
      frag_credit = cr_last;
      frag_empty  = !more;
      if (cr_last || !more) send_flit.ftype = F_VTAIL;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      hdr      <= '0;
      hdr_port <= P_LOCAL;
      ovc      <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cap) begin
          hdr      <= head_fwd;
          hdr_port <= head.la_port;
          ovc      <= gnt_vc;
          state    <= gnt ? S_ACTIVE : S_ROUTE;
        end
        S_ROUTE, S_FRAG: if (send) begin
          ovc   <= gnt_vc;
          state <= S_ACTIVE;
        end
        S_ACTIVE: if (send) begin
          if (is_tail(head.ftype))      state <= S_IDLE;
          else if (cr_last || !more)    state <= S_FRAG;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new packet must start with a head flit.
  a_head_first: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == S_IDLE && head_valid) |-> is_head(head.ftype));
  // Allocation is only granted to a requester.
  a_gnt_req: assert property (@(posedge clk) disable iff (!rst_n) gnt |-> req);

endmodule
