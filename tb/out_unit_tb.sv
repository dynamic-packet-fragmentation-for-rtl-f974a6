// out_unit_tb: drives an output unit like a router would (allocation of a
// free VC, a stream of flits on the allocated VC ending in a tail or virtual
// tail, only when a credit is left) while a model of the downstream buffers
// returns credits at random. Checks the credit flags (cr_ok, cr_last, which
// must be "one credit left and none returning"), vc_free (only VCs not
// allocated and with an empty downstream buffer), busy, and the one-cycle
// output register.
`timescale 1ns/1ps
module out_unit_tb;
  import noc_pkg::*;
  localparam int D = BUF_DEPTH;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  xbar_t xin;
  logic alloc, busy;
  logic [VC_W-1:0] alloc_vc;
  logic [NUM_VC-1:0] credit_in, vc_free, cr_ok, cr_last;
  link_t out_link;
  int cred [NUM_VC];
  int held [NUM_VC];      // flits sitting downstream
  bit alc [NUM_VC];
  int cur = -1, sent_in_pkt = 0;
  int checks = 0, failures = 0, n_last = 0, n_pkts = 0;
  xbar_t prev;

  out_unit dut (.*);

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    xin = '0; alloc = 0; alloc_vc = '0; credit_in = '0;
    for (int v = 0; v < NUM_VC; v++) begin cred[v] = D; held[v] = 0; alc[v] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      xin = '0; alloc = 0; credit_in = '0;
      for (int v = 0; v < NUM_VC; v++)
        if (held[v] > 0 && $urandom_range(2) == 0) credit_in[v] = 1'b1;
      #1;
      for (int v = 0; v < NUM_VC; v++) begin
        chk(cr_ok[v] == (cred[v] > 0), "cr_ok");
        chk(cr_last[v] == (cred[v] == 1 && !credit_in[v]), "cr_last");
        chk(vc_free[v] == (!alc[v] && cred[v] == D), "vc_free");
        if (cr_last[v]) n_last++;
      end
      chk(busy == (cur >= 0), "busy");
      if (cur < 0) begin
        for (int v = 0; v < NUM_VC; v++)
          if (cur < 0 && vc_free[v] && $urandom_range(1)) begin
            alloc = 1; alloc_vc = VC_W'(v); cur = v; sent_in_pkt = 0;
          end
      end
      if (cur >= 0 && cred[cur] > 0 && $urandom_range(3) != 0) begin
        xin.valid = 1; xin.vc = VC_W'(cur);
        xin.flit  = {$urandom, $urandom, $urandom, $urandom};
        xin.flit.ftype = (sent_in_pkt == 0) ? F_HEAD :
                         ($urandom_range(5) == 0) ? F_TAIL :
                         ($urandom_range(5) == 0) ? F_VTAIL : F_BODY;
      end
      prev = xin;
      @(posedge clk); #1;
      chk(out_link.valid == prev.valid && (!prev.valid || (out_link.vc == prev.vc && out_link.flit == prev.flit)),
          "output register");
      for (int v = 0; v < NUM_VC; v++) if (credit_in[v]) begin cred[v]++; held[v]--; end
      if (alloc) alc[cur] = 1;
      if (prev.valid) begin
        cred[cur]--; held[cur]++; sent_in_pkt++;
        if (is_tail(prev.flit.ftype)) begin alc[cur] = 0; cur = -1; n_pkts++; end
      end
    end
    chk(n_last > 0 && n_pkts > 10, "stream coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
