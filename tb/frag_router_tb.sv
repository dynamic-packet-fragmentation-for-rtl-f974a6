// frag_router_tb: one router at (1,1) with traffic sources on all five
// inputs and sinks on all five outputs.
//
// Each source sends packets of LEN flits, one at a time, on a VC of its
// choice, within its credits, announcing each flit a cycle ahead on in_next
// and pausing now and then mid-packet. A head's la_port is the XY direction
// from (1,1) to its destination. Sinks consume at a random rate and return a
// credit per consumed flit. Checks:
//   - a lone head leaves on out_link one cycle after it is on in_link (the
//     buffer is bypassed), and the rest of its packet follows one flit per
//     cycle with no fragmentation;
//   - every flit leaves on the port its header chose, in order within its
//     packet, with its payload intact; heads carry the look-ahead port for
//     the next router; virtual heads repeat the header; virtual tails appear
//     only inside packets;
//   - every packet is delivered after a drain.
// The run counts credit-stall and buffer-empty fragmentations, output
// contention and source pauses, and fails if any never happened.
`timescale 1ns/1ps
module frag_router_tb;
  import noc_pkg::*;
  localparam int P = NUM_PORTS, LEN = 8, RX = 1, RY = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  link_t in_link [P];
  la_t   in_next [P];
  logic [P-1:0][NUM_VC-1:0] credit_out, credit_in;
  link_t out_link [P];
  logic [P-1:0] frag_credit, frag_empty;

  frag_router #(.X(RX), .Y(RY)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_fc = 0, n_fe = 0, n_pause = 0, n_contend = 0, n_sent = 0, n_rcvd = 0, n_vh = 0;
  bit gen_on = 0;
  int inj_pct = 0, pause_pct = 0, sink_pct = 100;

  bit    s_act [P];
  int    s_dst [P], s_pkt [P], s_idx [P], s_vc [P], s_cr [P][NUM_VC];
  link_t s_pend [P];
  int    d_cur [P][NUM_VC];    // [out][vc] source input port, -1 none
  int    d_pkt [P][NUM_VC];
  int    d_idx [P][P];         // [out][src] next flit index
  int    d_inpkt [P][P];
  int    d_occ [P][NUM_VC];
  int    first_in = -1, first_out = -1, first_tail = -1;

  function automatic logic [DATA_W-1:0] mkdata(int src, int pkt, int idx);
    logic [DATA_W-1:0] d;
    d = '0;
    d[7:0] = 8'(idx); d[23:8] = 16'(pkt); d[27:24] = 4'(src);
    d[59:28] = 32'(src * 7919 + pkt * 104729 + idx * 31) ^ 32'h5A5A_1234;
    return d;
  endfunction

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, m); end
  endtask

  task automatic src_step(int p);
    link_t nx;
    nx = '0;
    if (!s_act[p] && gen_on && $urandom_range(99) < inj_pct) begin
      int v;
      v = -1;
      for (int k = 0; k < NUM_VC; k++) begin
        int c;
        c = (k + s_pkt[p]) % NUM_VC;
        if (v < 0 && s_cr[p][c] == BUF_DEPTH) v = c;
      end
      if (v >= 0) begin
        s_act[p] = 1; s_idx[p] = 0; s_vc[p] = v;
        s_dst[p] = $urandom_range(15);
      end
    end
    if (s_act[p] && s_cr[p][s_vc[p]] > 0) begin
      if (s_idx[p] > 0 && $urandom_range(99) < pause_pct) n_pause++;
      else begin
        nx.valid = 1; nx.vc = VC_W'(s_vc[p]);
        nx.flit.ftype = (s_idx[p] == 0) ? F_HEAD : (s_idx[p] == LEN - 1) ? F_TAIL : F_BODY;
        nx.flit.dst_x = COORD_W'(s_dst[p] % 4); nx.flit.dst_y = COORD_W'(s_dst[p] / 4);
        nx.flit.la_port = xy_dir(COORD_W'(RX), COORD_W'(RY), nx.flit.dst_x, nx.flit.dst_y);
        nx.flit.data = mkdata(p, s_pkt[p], s_idx[p]);
        if (first_in < 0) first_in = cyc + 1;
        s_cr[p][s_vc[p]]--;
        s_idx[p]++;
        if (s_idx[p] == LEN) begin s_act[p] = 0; s_pkt[p]++; n_sent++; end
      end
    end
    in_link[p] = s_pend[p];
    in_next[p].valid = nx.valid; in_next[p].vc = nx.vc;
    s_pend[p] = nx;
  endtask

  task automatic sink_step(int q);
    link_t l;
    int v, src, pkt, idx;
    l = out_link[q];
    credit_in[q] = '0;
    if (l.valid) begin
      v = int'(l.vc); src = int'(l.flit.data[27:24]); pkt = int'(l.flit.data[23:8]); idx = int'(l.flit.data[7:0]);
      d_occ[q][v]++;
      chk(d_occ[q][v] <= BUF_DEPTH, "sink overrun");
      chk(l.flit.data == mkdata(src, pkt, idx), "payload");
      if (is_head(l.flit.ftype)) begin
        port_e exp_q;
        exp_q = xy_dir(COORD_W'(RX), COORD_W'(RY), l.flit.dst_x, l.flit.dst_y);
        chk(exp_q == port_e'(q), "head left on the wrong port");
        chk(d_cur[q][v] < 0, "head on a busy VC");
        d_cur[q][v] = src; d_pkt[q][v] = pkt;
        if (q != int'(P_LOCAL)) begin
          logic [COORD_W-1:0] nx, ny;
          nx = (q == int'(P_EAST)) ? COORD_W'(RX + 1) : (q == int'(P_WEST)) ? COORD_W'(RX - 1) : COORD_W'(RX);
          ny = (q == int'(P_NORTH)) ? COORD_W'(RY + 1) : (q == int'(P_SOUTH)) ? COORD_W'(RY - 1) : COORD_W'(RY);
          chk(l.flit.la_port == xy_dir(nx, ny, l.flit.dst_x, l.flit.dst_y), "look-ahead port");
        end
        if (l.flit.ftype == F_HEAD) begin
          chk(d_inpkt[q][src] < 0 && idx == 0, "head inside a packet");
          d_inpkt[q][src] = pkt; d_idx[q][src] = 1;
          if (first_out < 0) first_out = cyc;
        end else begin
          chk(d_inpkt[q][src] == pkt, "virtual head outside its packet");
          n_vh++;
        end
      end else begin
        chk(d_cur[q][v] == src && d_pkt[q][v] == pkt, "flit on a VC of another packet");
        chk(d_inpkt[q][src] == pkt && idx == d_idx[q][src], $sformatf("flit order src %0d idx %0d exp %0d", src, idx, d_idx[q][src]));
        d_idx[q][src]++;
        if (l.flit.ftype == F_TAIL) begin
          chk(idx == LEN - 1, "early tail");
          d_cur[q][v] = -1; d_inpkt[q][src] = -1; n_rcvd++;
          if (first_tail < 0) first_tail = cyc;
        end else if (l.flit.ftype == F_VTAIL) begin
          chk(idx < LEN - 1, "virtual tail at end");
          d_cur[q][v] = -1;
        end
      end
    end
    for (int c = 0; c < NUM_VC; c++)
      if (d_occ[q][c] > 0 && $urandom_range(99) < sink_pct) begin
        d_occ[q][c]--; credit_in[q][c] = 1'b1;
      end
  endtask

  task automatic step();
    @(posedge clk); #1;
    cyc++;
    for (int p = 0; p < P; p++) begin
      for (int c = 0; c < NUM_VC; c++) if (credit_out[p][c]) s_cr[p][c]++;
      sink_step(p);
      src_step(p);
    end
    #7;
    for (int p = 0; p < P; p++) begin
      if (frag_credit[p]) n_fc++;
      if (frag_empty[p]) n_fe++;
    end
    // contention: two inputs heading to the same output with pending heads
    for (int a = 0; a < P; a++)
      for (int b2 = a + 1; b2 < P; b2++)
        if (in_link[a].valid && in_link[b2].valid && is_head(in_link[a].flit.ftype) &&
            is_head(in_link[b2].flit.ftype) && in_link[a].flit.la_port == in_link[b2].flit.la_port)
          n_contend++;
  endtask

  initial begin
    for (int p = 0; p < P; p++) begin
      in_link[p] = '0; in_next[p] = '0; s_pend[p] = '0; s_act[p] = 0; s_pkt[p] = 0;
      for (int c = 0; c < NUM_VC; c++) begin s_cr[p][c] = BUF_DEPTH; d_cur[p][c] = -1; d_occ[p][c] = 0; end
      for (int s = 0; s < P; s++) begin d_idx[p][s] = 0; d_inpkt[p][s] = -1; end
    end
    credit_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // lone packet from the west input to (3,1): leaves east
    s_act[P_WEST] = 1; s_idx[P_WEST] = 0; s_vc[P_WEST] = 0; s_dst[P_WEST] = 7;
    repeat (30) step();
    chk(first_out - first_in == 1, $sformatf("router latency %0d, expected 1", first_out - first_in));
    chk(first_tail - first_out == LEN - 1, "packet does not stream one flit per cycle");
    chk(n_fc == 0 && n_fe == 0, "fragmentation without blocking");

    gen_on = 1; inj_pct = 30; pause_pct = 5; sink_pct = 40;
    repeat (4000) step();
    gen_on = 0; sink_pct = 100;
    for (int k = 0; k < 2000 && (n_rcvd < n_sent || s_act.or() != 0); k++) step();
    chk(n_rcvd == n_sent, $sformatf("sent %0d received %0d", n_sent, n_rcvd));
    $display("router: packets %0d frag_credit %0d frag_empty %0d vhead %0d contention %0d pauses %0d",
             n_rcvd, n_fc, n_fe, n_vh, n_contend, n_pause);
    chk(n_fc > 0, "no credit-stall fragmentation");
    chk(n_fe > 0, "no buffer-empty fragmentation");
    chk(n_vh > 0, "no virtual head");
    chk(n_contend > 0, "no output contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
