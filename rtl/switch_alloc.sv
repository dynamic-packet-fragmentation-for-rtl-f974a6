// switch_alloc: global switch arbitration followed by VC allocation.
//
// Each input port presents at most one request (its local arbiter's winner)
// for one output port. For every output port a P:1 round-robin arbiter picks
// one requesting input, and virtual-channel allocation then simply takes the
// lowest-numbered output VC of that port that is not allocated and has at
// least one credit. An output port that is held by a streaming connection, or
// that has no such VC, takes no requests, so a grant always comes with a VC.
// Both steps happen in the same cycle (combined SAVA stage).
//
// Interface: lreq/lreq_port per input; out_busy, vc_free per output;
// per-input result gnt/gnt_vc and per-output result alloc/alloc_vc (used by
// the output unit to mark the VC allocated). Combinational, except for the
// round-robin pointers, which move on a grant.
//
// Follows the document: SA winner selected by local and global arbitration,
// then VA by finding a free output VC at the winner's requested port. Own
// choices: round-robin order, lowest-index VC choice, and requiring a credit.
module switch_alloc
  import noc_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic  [NUM_PORTS-1:0]            lreq,
  input  port_e                            lreq_port [NUM_PORTS],
  input  logic  [NUM_PORTS-1:0]            out_busy,
  input  logic  [NUM_PORTS-1:0][NUM_VC-1:0] vc_free,
  output logic  [NUM_PORTS-1:0]            gnt,
  output logic  [VC_W-1:0]                 gnt_vc   [NUM_PORTS],
  output logic  [NUM_PORTS-1:0]            alloc,
  output logic  [VC_W-1:0]                 alloc_vc [NUM_PORTS]
);

  logic [NUM_PORTS-1:0] oreq [NUM_PORTS];   // [output][input]
  logic [NUM_PORTS-1:0] ognt [NUM_PORTS];

  for (genvar q = 0; q < NUM_PORTS; q++) begin : g_out
    always_comb begin
      for (int p = 0; p < NUM_PORTS; p++)
        oreq[q][p] = lreq[p] && (lreq_port[p] == port_e'(q)) &&
                     !out_busy[q] && (vc_free[q] != '0);
    end

    rr_arbiter #(.N(NUM_PORTS)) u_global_arb (
      .clk, .rst_n, .req (oreq[q]), .advance (1'b1), .gnt (ognt[q])
    );

    always_comb begin
      alloc[q]    = |ognt[q];
      alloc_vc[q] = '0;
      for (int v = NUM_VC - 1; v >= 0; v--)
        if (vc_free[q][v]) alloc_vc[q] = VC_W'(v);
    end
  end

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      gnt[p]    = 1'b0;
      gnt_vc[p] = '0;
      for (int q = 0; q < NUM_PORTS; q++)
        if (ognt[q][p]) begin
          gnt[p]    = 1'b1;
          gnt_vc[p] = alloc_vc[q];
        end
    end
  end

endmodule
