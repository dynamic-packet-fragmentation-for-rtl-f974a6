// link_pipe: the link traversal (LT) stage between two neighbouring routers.
//
// One register for the flit going downstream and one for the credits going
// back upstream: a flit leaving a router's output register spends one cycle
// on the link before the next router can buffer or forward it, and a credit
// likewise takes one link cycle. With one router cycle and one link cycle
// each way, the credit loop is 5 cycles: buffer slot freed, credit register,
// credit link, counter update and switch traversal upstream, flit link.
// up_next exposes, one cycle ahead, which VC the link will deliver next: it
// is the content of the upstream output register, not yet on the link.
//
// Interface: up_link/up_credit face the upstream router (its out_link, and
// the credits that return to it), dn_link/dn_credit face the downstream
// router. Synchronous active-low reset clears both registers. Follows the
// document: single-cycle link latency. The look-ahead tap is this design's
// way of telling a router that a flit is coming into its buffer.
module link_pipe
  import noc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  link_t              up_link,     // from upstream output register
  output link_t              dn_link,     // to downstream input
  output la_t                dn_next,     // flit that dn_link carries next cycle
  input  logic [NUM_VC-1:0]  dn_credit,   // credits from downstream input
  output logic [NUM_VC-1:0]  up_credit    // credits to upstream output
);

  assign dn_next.valid = up_link.valid;
  assign dn_next.vc    = up_link.vc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dn_link   <= '0;
      up_credit <= '0;
    end else begin
      dn_link   <= up_link;
      up_credit <= dn_credit;
    end
  end

endmodule
