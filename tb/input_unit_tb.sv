// input_unit_tb: one input port at router (1,1), with the switch allocator
// and the output credit state modelled by the testbench.
//
// Directed part: heads arrive on VC 2 and then VC 0 for the same output
// while allocation is refused; when it is granted, VC 2 (the older) must go
// first although the round-robin pointer favours VC 0.
// Random part: packets of 6 flits arrive on all VCs, interleaved one flit per
// cycle, with gaps; grants, output VCs and credit flags are random. The
// crossbar output is checked per input VC: flits in order with intact
// payload, heads and virtual heads on the packet's output port, every flit
// of a fragment on the output VC granted to it, and one credit returned for
// every flit that arrived.
`timescale 1ns/1ps
module input_unit_tb;
  import noc_pkg::*;
  localparam int LEN = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [COORD_W-1:0] cur_x = 1, cur_y = 1;
  link_t in_link;
  la_t in_next;
  logic [NUM_VC-1:0] credit_out;
  logic [NUM_PORTS-1:0][NUM_VC-1:0] cr_ok, cr_last;
  logic lreq, sa_gnt, frag_credit, frag_empty;
  port_e lreq_port;
  logic [VC_W-1:0] sa_vc;
  xbar_t xout;

  input_unit dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int pushed [NUM_VC], credits [NUM_VC], nxt_idx [NUM_VC], got_idx [NUM_VC], ovc [NUM_VC];
  int pkt_in [NUM_VC], pkt_out [NUM_VC];
  port_e port_of [NUM_VC];
  int n_frag = 0, n_vh = 0;
  link_t pend;

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, m); end
  endtask

  function automatic flit_t mk(int v, int pkt, int idx);
    flit_t f;
    f = '0;
    f.ftype = (idx == 0) ? F_HEAD : (idx == LEN - 1) ? F_TAIL : F_BODY;
    f.dst_x = 3; f.dst_y = COORD_W'(v % 4);          // from (1,1): always east
    if (v == 1) begin f.dst_x = 1; f.dst_y = 3; end  // VC 1 goes north
    f.la_port = xy_dir(2'd1, 2'd1, f.dst_x, f.dst_y);
    f.data[7:0] = 8'(idx); f.data[15:8] = 8'(pkt); f.data[19:16] = 4'(v);
    f.data[51:20] = 32'(v * 131 + pkt * 7 + idx) ^ 32'hCAFE_F00D;
    return f;
  endfunction

  // observe the crossbar output of the current cycle
  task automatic observe();
    if (xout.valid) begin
      int v, pkt, idx;
      v = int'(xout.flit.data[19:16]); pkt = int'(xout.flit.data[15:8]); idx = int'(xout.flit.data[7:0]);
      chk(xout.flit.data[51:20] == 32'(v * 131 + pkt * 7 + idx) ^ 32'hCAFE_F00D, "payload");
      chk(pkt == pkt_out[v], "packet order");
      if (is_head(xout.flit.ftype)) begin
        chk(xout.port == port_of[v], "head on wrong port");
        chk(sa_gnt && xout.vc == sa_vc, "head without grant");
        ovc[v] = int'(xout.vc);
        if (xout.flit.ftype == F_VHEAD) n_vh++;
        else begin chk(got_idx[v] == 0, "head inside packet"); got_idx[v] = 1; end
      end else begin
        chk(int'(xout.vc) == ovc[v], "flit on another output VC");
        chk(idx == got_idx[v], $sformatf("vc %0d order idx %0d exp %0d", v, idx, got_idx[v]));
        got_idx[v]++;
        if (xout.flit.ftype == F_TAIL) begin got_idx[v] = 0; pkt_out[v]++; end
        if (xout.flit.ftype == F_VTAIL) n_frag++;
      end
    end
  endtask

  task automatic step(bit rnd, bit gnt_en);
    link_t nx;
    // input side: decide next flit (announced on in_next), deliver the pending one
    nx = '0;
    if (rnd && $urandom_range(3) != 0) begin
      int v;
      v = $urandom_range(NUM_VC - 1);
      if (pushed[v] - credits[v] < BUF_DEPTH) begin
        nx.valid = 1; nx.vc = VC_W'(v); nx.flit = mk(v, pkt_in[v], nxt_idx[v]);
        pushed[v]++;
        nxt_idx[v]++;
        if (nxt_idx[v] == LEN) begin nxt_idx[v] = 0; pkt_in[v]++; end
      end
    end
    in_link = pend; in_next.valid = nx.valid; in_next.vc = nx.vc; pend = nx;
    cr_ok = '1; cr_last = '0;
    if (rnd) begin
      cr_ok = {($bits(cr_ok)/32 + 1){$urandom}} | {($bits(cr_ok)/32 + 1){$urandom}};
      if ($urandom_range(9) == 0) cr_last = {($bits(cr_last)/32 + 1){$urandom}};
      cr_last = cr_last & cr_ok;
    end
    sa_gnt = 0; sa_vc = VC_W'($urandom);
    #1;
    if (gnt_en && lreq && (!rnd || $urandom_range(9) < 7)) sa_gnt = 1;
    #1;
    observe();
    @(posedge clk); #1;
    cyc++;
    for (int v = 0; v < NUM_VC; v++) if (credit_out[v]) credits[v]++;
  endtask

  initial begin
    in_link = '0; in_next = '0; pend = '0; cr_ok = '1; cr_last = '0; sa_gnt = 0; sa_vc = '0;
    for (int v = 0; v < NUM_VC; v++) begin
      pushed[v] = 0; credits[v] = 0; nxt_idx[v] = 0; got_idx[v] = 0; pkt_in[v] = 0; pkt_out[v] = 0; ovc[v] = 0;
      port_of[v] = (v == 1) ? P_NORTH : P_EAST;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // directed: VC 2 head, then VC 0 head, both east, no grant
    pend.valid = 1; pend.vc = 2; pend.flit = mk(2, 0, 0); pushed[2]++; nxt_idx[2] = 1;
    step(0, 0);
    pend.valid = 1; pend.vc = 0; pend.flit = mk(0, 0, 0); pushed[0]++; nxt_idx[0] = 1;
    step(0, 0);
    in_link = '0; in_next = '0; pend = '0; sa_gnt = 0; sa_vc = 1;
    #1;
    chk(lreq && lreq_port == P_EAST, "request for east");
    sa_gnt = 1; #1;
    chk(xout.valid && xout.flit.data[19:16] == 4'd2, "older VC 2 goes first");
    observe();
    @(posedge clk); #1; cyc++;
    for (int v = 0; v < NUM_VC; v++) if (credit_out[v]) credits[v]++;

    // random traffic
    repeat (6000) step(1, 1);
    repeat (300) step(0, 1);
    for (int v = 0; v < NUM_VC; v++) begin
      chk(credits[v] == pushed[v], $sformatf("vc %0d credits %0d pushed %0d", v, credits[v], pushed[v]));
      chk(pkt_out[v] + 1 >= pkt_in[v], "packets stuck");
    end
    chk(n_frag > 0 && n_vh > 0, "no fragmentation seen");
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
