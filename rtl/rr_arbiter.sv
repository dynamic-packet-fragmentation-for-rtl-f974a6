// rr_arbiter: round-robin arbiter with a one-hot grant.
//
// Serves as the V:1 local arbiter of an input port (one request per VC) and
// as the P:1 global arbiter of an output port (one request per input port).
// The request just after the last winner has the highest priority. The
// priority pointer moves only when the caller says the grant was used
// (advance), so a grant that loses later in the same cycle (for example in
// virtual-channel allocation) does not cost the requester its turn. Winner-
// take-all behaviour is obtained around it: a VC that wins keeps the switch
// until its packet or fragment ends, so the arbiter is not consulted then.
//
// Combinational grant; pointer updates at the rising edge; synchronous
// active-low reset. The document names the local and global arbiters; the
// round-robin policy is this design's choice.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] last;   // index of the last winner

  // Scan from the request after the last winner, wrapping around.
  logic [2*N-1:0] req2, pick2;
  logic [N-1:0]   mask;

  always_comb begin
    for (int i = 0; i < N; i++) mask[i] = (i > int'(last));
    // masked requests first, then all requests (the wrapped half)
    req2  = {req, req & mask};
    pick2 = req2 & ~(req2 - 1'b1);   // lowest set bit
    gnt   = pick2[N-1:0] | pick2[2*N-1:N];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last <= IW'(N - 1);
    end else if (advance && gnt != '0) begin
      for (int i = 0; i < N; i++)
        if (gnt[i]) last <= IW'(i);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
