// out_unit: one router output port.
//
// Keeps, for each downstream virtual channel, an "allocated" flag and a
// credit counter. A VC is allocated when the switch allocator grants it and
// released when a tail or virtual-tail flit is sent on it. The counter starts
// at the downstream buffer depth, drops for every flit sent and rises for
// every credit returned. Because a connection holds the output port until its
// tail, at most one VC of a port is allocated at a time; the port is busy
// while one is.
//
// The flit leaving the crossbar is registered here (end of switch
// traversal); the register drives the link.
//
// Outputs to the VC controllers: cr_ok (credit left) and cr_last (exactly one
// credit left and none returning this cycle: the credit-stall trigger).
// vc_free tells VA which VCs it may take. Synchronous active-low reset.
// Follows the document's credit count and output VC hold. The release on
// tail and the one-credit-per-bit return are this design's choices.
module out_unit
  import noc_pkg::*;
#(
  parameter int DEPTH = BUF_DEPTH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  xbar_t              xin,        // flit from the crossbar
  input  logic               alloc,
  input  logic [VC_W-1:0]    alloc_vc,
  input  logic [NUM_VC-1:0]  credit_in,
  output link_t              out_link,
  output logic               busy,
  output logic [NUM_VC-1:0]  vc_free,
  output logic [NUM_VC-1:0]  cr_ok,
  output logic [NUM_VC-1:0]  cr_last
);

  localparam int CW = $clog2(DEPTH + 1);

  logic [NUM_VC-1:0] alloced;
  logic [CW-1:0]     credit [NUM_VC];

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    logic sent;
    assign sent       = xin.valid && (xin.vc == VC_W'(v));
    assign cr_ok[v]   = (credit[v] != '0);
    assign cr_last[v] = (credit[v] == CW'(1)) && !credit_in[v];
    assign vc_free[v] = !alloced[v] && (credit[v] == CW'(DEPTH));

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        alloced[v] <= 1'b0;
        credit[v]  <= CW'(DEPTH);
      end else begin
        credit[v] <= credit[v] - CW'(sent) + CW'(credit_in[v]);
        if (alloc && alloc_vc == VC_W'(v))          alloced[v] <= 1'b1;
        else if (sent && is_tail(xin.flit.ftype))   alloced[v] <= 1'b0;
      end
    end

    a_credit_pos: assert property (@(posedge clk) disable iff (!rst_n) sent |-> cr_ok[v]);
    a_credit_max: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(credit_in[v] && !sent && credit[v] == CW'(DEPTH)));
  end

  assign busy          = |alloced;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_link <= '0;
    end else begin
      out_link.valid <= xin.valid;
      out_link.vc    <= xin.vc;
      out_link.flit  <= xin.flit;
    end
  end

  a_one_alloc: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(alloced));

endmodule
