// crossbar: NUM_PORTS x NUM_PORTS flit switch.
//
// Each input carries at most one flit per cycle together with the output port
// it is routed to (and its output VC). Each output takes the flit of the
// input that addresses it. The allocators guarantee that no two inputs
// address the same output in a cycle (the router checks this). Purely
// combinational. The document only names the crossbar; the one-hot
// AND-OR multiplexer form is this design's choice.
module crossbar
  import noc_pkg::*;
(
  input  xbar_t xin  [NUM_PORTS],
  output xbar_t xout [NUM_PORTS]
);

  for (genvar q = 0; q < NUM_PORTS; q++) begin : g_out
    always_comb begin
      xout[q] = '0;
      for (int p = 0; p < NUM_PORTS; p++)
        if (xin[p].valid && (xin[p].port == port_e'(q))) xout[q] = xout[q] | xin[p];
    end
  end

endmodule
