// noc_mesh_tb: end-to-end test of the 4x4 fragmentation mesh at its default
// size.
//
// Every node has a traffic source and a sink standing in for a network
// interface. A source sends one packet at a time on a VC it picks, obeys the
// credits it receives, announces each flit one cycle ahead on inj_next and
// may pause mid-packet (to provoke buffer-empty fragmentation). A sink
// consumes flits at a random rate and returns credits only then (to provoke
// credit-stall fragmentation). Phases:
//   1. one packet from node 0 to node 15 in an empty network: the head must
//      arrive 2*6+1 cycles after injection (one router and one link cycle
//      per hop), the tail LEN-1 cycles later, with no fragmentation (5
//      buffer entries cover the 5-cycle credit loop);
//   2. uniform random traffic with 8-flit packets, then with 16-flit packets,
//      each followed by a drain.
// The sinks check every flit against the packet it belongs to: source,
// packet number, flit index and payload, in order per source, with virtual
// heads carrying their packet's header and virtual tails only inside a
// packet. The test counts fragmentations at credit stalls and at empty
// buffers, virtual heads and tails, source pauses and sink back-pressure,
// and fails if any of them never happened or if a packet went missing.
`timescale 1ns/1ps
module noc_mesh_tb;
  import noc_pkg::*;

  localparam int MX = 4, MY = 4, N = MX * MY;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t              inj_link   [N];
  la_t                inj_next   [N];
  logic [NUM_VC-1:0]  inj_credit [N];
  link_t              ej_link    [N];
  logic [NUM_VC-1:0]  ej_credit  [N];
  logic [NUM_PORTS-1:0] frag_credit [N];
  logic [NUM_PORTS-1:0] frag_empty  [N];

  noc_mesh dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;

  // statistics
  int n_frag_credit = 0, n_frag_empty = 0, n_vhead = 0, n_vtail = 0;
  int n_src_pause = 0, n_sink_hold = 0, n_pkts_sent = 0, n_pkts_rcvd = 0, n_flits_rcvd = 0;

  // ---------------- sources ----------------
  bit        s_active [N];
  int        s_dst    [N];
  int        s_len    [N];
  int        s_pkt    [N];        // packet number of this source
  int        s_idx    [N];
  int        s_vc     [N];
  int        s_cr     [N][NUM_VC];
  link_t     s_pend   [N];        // decided last cycle, on the link now
  bit        gen_on = 0;
  int        inj_pct = 0;          // packet start probability in percent
  int        pkt_len = 8;
  int        pause_pct = 0;
  int        first_inj_cyc = -1;

  // per destination: expected next packet / flit of each source
  int        d_last  [N][N];       // [dst][src] last packet completed, -1 none
  int        d_inpkt [N][N];       // [dst][src] packet in progress, -1 none
  int        d_idx   [N][N];       // [dst][src] next flit index
  int        d_len   [N][N];
  int        d_cur   [N][NUM_VC];  // [dst][vc] source of the fragment on the VC, -1 none
  int        d_occ   [N][NUM_VC];
  int        sink_pct = 100;
  int        head_lat = -1, tail_lat = -1;

  function automatic logic [DATA_W-1:0] mkdata(int src, int pkt, int idx, int len);
    logic [DATA_W-1:0] d;
    d = '0;
    d[7:0]   = 8'(idx);
    d[23:8]  = 16'(pkt);
    d[27:24] = 4'(src);
    d[35:28] = 8'(len);
    d[67:36] = 32'(src * 7919 + pkt * 104729 + idx * 31) ^ 32'hA5C3_0F1E;
    return d;
  endfunction

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  task automatic source_step(int n);
    link_t nx;
    nx = '0;
    if (!s_active[n] && gen_on && ($urandom_range(99) < inj_pct)) begin
      int v;
      int d;
      d = $urandom_range(N - 1);
      if (d != n) begin
        // pick a VC with a credit, round robin from a random start
        v = -1;
        for (int k = 0; k < NUM_VC; k++) begin
          int c;
          c = (k + n + s_pkt[n]) % NUM_VC;
          if (v < 0 && s_cr[n][c] > 0) v = c;
        end
        if (v >= 0) begin
          s_active[n] = 1; s_dst[n] = d; s_len[n] = pkt_len; s_idx[n] = 0; s_vc[n] = v;
        end
      end
    end
    if (s_active[n]) begin
      if (s_cr[n][s_vc[n]] == 0) begin
        // waiting for a credit
      end else if (s_idx[n] > 0 && $urandom_range(99) < pause_pct) begin
        n_src_pause++;
      end else begin
        nx.valid = 1;
        nx.vc    = VC_W'(s_vc[n]);
        nx.flit.dst_x = COORD_W'(s_dst[n] % MX);
        nx.flit.dst_y = COORD_W'(s_dst[n] / MX);
        nx.flit.la_port = xy_dir(COORD_W'(n % MX), COORD_W'(n / MX),
                                 COORD_W'(s_dst[n] % MX), COORD_W'(s_dst[n] / MX));
        nx.flit.ftype = (s_idx[n] == 0) ? F_HEAD :
                        (s_idx[n] == s_len[n] - 1) ? F_TAIL : F_BODY;
        nx.flit.data  = mkdata(n, s_pkt[n], s_idx[n], s_len[n]);
        s_cr[n][s_vc[n]]--;
        if (s_idx[n] == 0 && first_inj_cyc < 0) first_inj_cyc = cyc + 1;
        s_idx[n]++;
        if (s_idx[n] == s_len[n]) begin
          s_active[n] = 0;
          s_pkt[n]++;
          n_pkts_sent++;
        end
      end
    end
    inj_link[n] = s_pend[n];
    inj_next[n].valid = nx.valid;
    inj_next[n].vc    = nx.vc;
    s_pend[n] = nx;
  endtask

  task automatic sink_step(int n);
    link_t l;
    int src, pkt, idx, len, v;
    l = ej_link[n];
    ej_credit[n] = '0;
    if (l.valid) begin
      v   = int'(l.vc);
      src = int'(l.flit.data[27:24]);
      pkt = int'(l.flit.data[23:8]);
      idx = int'(l.flit.data[7:0]);
      len = int'(l.flit.data[35:28]);
      n_flits_rcvd++;
      d_occ[n][v]++;
      chk(d_occ[n][v] <= BUF_DEPTH, "sink buffer overrun");
      chk(l.flit.data == mkdata(src, pkt, idx, len), $sformatf("payload node %0d", n));
      if (is_head(l.flit.ftype)) begin
        chk(d_cur[n][v] < 0, "head while VC busy");
        d_cur[n][v] = src;
        chk(l.flit.dst_x == COORD_W'(n % MX) && l.flit.dst_y == COORD_W'(n / MX), "wrong destination");
        chk(l.flit.la_port == P_LOCAL, "head at destination not marked local");
        if (l.flit.ftype == F_HEAD) begin
          chk(d_inpkt[n][src] < 0, "head in the middle of a packet");
          chk(pkt > d_last[n][src], $sformatf("packet order %0d->%0d got %0d after %0d", src, n, pkt, d_last[n][src]));
          d_inpkt[n][src] = pkt;
          d_idx[n][src] = 1;
          d_len[n][src] = len;
          if (src == 0 && n == N - 1 && pkt == 0 && head_lat < 0) head_lat = cyc - first_inj_cyc;
        end else begin
          n_vhead++;
          chk(d_inpkt[n][src] == pkt, "virtual head of a packet not in progress");
        end
      end else begin
        chk(d_cur[n][v] == src, $sformatf("flit of %0d on VC held by %0d", src, d_cur[n][v]));
        chk(pkt == d_inpkt[n][src], "flit of a packet not in progress");
        chk(idx == d_idx[n][src], $sformatf("flit order %0d->%0d idx %0d exp %0d", src, n, idx, d_idx[n][src]));
        d_idx[n][src]++;
        if (l.flit.ftype == F_TAIL) begin
          chk(idx == len - 1, "tail not last");
          d_cur[n][v] = -1;
          d_idx[n][src] = 0;
          d_last[n][src] = pkt;
          d_inpkt[n][src] = -1;
          n_pkts_rcvd++;
          if (src == 0 && n == N - 1 && pkt == 0 && tail_lat < 0) tail_lat = cyc - first_inj_cyc;
        end else if (l.flit.ftype == F_VTAIL) begin
          chk(idx < len - 1, "virtual tail at packet end");
          d_cur[n][v] = -1;
          n_vtail++;
        end else begin
          chk(idx < len - 1, "body at packet end");
        end
      end
    end
    for (int c = 0; c < NUM_VC; c++) begin
      if (d_occ[n][c] > 0) begin
        if ($urandom_range(99) < sink_pct) begin
          d_occ[n][c]--;
          ej_credit[n][c] = 1'b1;
        end else n_sink_hold++;
      end
    end
  endtask

  task automatic step();
    @(posedge clk);
    #1;
    cyc++;
    for (int n = 0; n < N; n++) begin
      for (int c = 0; c < NUM_VC; c++) if (inj_credit[n][c]) s_cr[n][c]++;
      sink_step(n);
      source_step(n);
    end
    #7;
    for (int n = 0; n < N; n++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (frag_credit[n][p]) n_frag_credit++;
        if (frag_empty[n][p])  n_frag_empty++;
      end
    end
  endtask

  task automatic drain(int max_cycles);
    int k;
    gen_on = 0;
    sink_pct = 100;
    k = 0;
    while ((n_pkts_rcvd < n_pkts_sent || s_active.or() != 0) && k < max_cycles) begin
      step();
      k++;
    end
    chk(n_pkts_rcvd == n_pkts_sent, $sformatf("drain: sent %0d received %0d", n_pkts_sent, n_pkts_rcvd));
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin
      inj_link[n] = '0; inj_next[n] = '0; ej_credit[n] = '0; s_pend[n] = '0;
      s_active[n] = 0; s_pkt[n] = 0;
      for (int c = 0; c < NUM_VC; c++) begin
        s_cr[n][c] = BUF_DEPTH; d_cur[n][c] = -1; d_occ[n][c] = 0;
      end
      for (int s = 0; s < N; s++) begin
        d_last[n][s] = -1; d_inpkt[n][s] = -1; d_idx[n][s] = 0; d_len[n][s] = 0;
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---- phase 1: lone packet 0 -> 15 ----
    pkt_len = 16;
    s_active[0] = 1; s_dst[0] = N - 1; s_len[0] = 16; s_idx[0] = 0; s_vc[0] = 0;
    repeat (60) step();
    chk(head_lat == 2 * 6 + 1, $sformatf("head latency %0d, expected 13", head_lat));
    chk(tail_lat == 2 * 6 + 1 + 15, $sformatf("tail latency %0d, expected 28", tail_lat));
    chk(n_frag_credit == 0 && n_frag_empty == 0, "fragmentation in an empty network");
    chk(n_pkts_rcvd == 1, "lone packet not delivered");

    // ---- phase 2: uniform random, 8-flit packets ----
    pkt_len = 8; inj_pct = 6; pause_pct = 3; sink_pct = 60; gen_on = 1;
    repeat (3000) step();
    drain(5000);
    $display("8-flit: packets %0d, frag credit %0d, frag empty %0d, vhead %0d",
             n_pkts_rcvd, n_frag_credit, n_frag_empty, n_vhead);

    // ---- phase 3: uniform random, 16-flit packets ----
    pkt_len = 16; inj_pct = 4; pause_pct = 3; sink_pct = 60; gen_on = 1;
    repeat (3000) step();
    drain(8000);

    $display("totals: packets sent %0d received %0d flits %0d", n_pkts_sent, n_pkts_rcvd, n_flits_rcvd);
    $display("mechanisms: frag_credit=%0d frag_empty=%0d vhead=%0d vtail=%0d src_pause=%0d sink_hold=%0d",
             n_frag_credit, n_frag_empty, n_vhead, n_vtail, n_src_pause, n_sink_hold);
    chk(n_frag_credit > 0, "no credit-stall fragmentation");
    chk(n_frag_empty > 0,  "no buffer-empty fragmentation");
    chk(n_vhead > 0,       "no virtual head delivered");
    chk(n_vtail == n_vhead, "virtual tails and heads do not pair up");
    chk(n_src_pause > 0,   "no source pause");
    chk(n_sink_hold > 0,   "no sink back-pressure");
    chk(n_pkts_rcvd > 100, "too few packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
